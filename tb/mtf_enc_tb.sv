// mtf_enc_tb: self-checking testbench for the Move-To-Front row coder.
//
// First a directed sequence on a single 2-bit slice checks the list order by
// hand (values 2, 2, 1, 2, 3 must code as 2, 0, 2, 1, 3). Then random rows
// with strong reuse and a random enable are compared with the ordered-list
// reference model of tmab_ref_pkg, which only advances on enabled edges.
module mtf_enc_tb;
  import tmab_ref_pkg::*;
  localparam int W = 16, SLICE = 2;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] x = '0, y;
  int checks = 0, failures = 0;
  link_ref #(.HW(W), .SLICE(SLICE)) mdl;
  logic [W-1:0] recent [4];
  logic [W-1:0] exp_y;
  int kind;
  link_ref #(.HW(W), .SLICE(SLICE)) tmp;
  localparam logic [1:0] SEQ_IN  [5] = '{2'd2, 2'd2, 2'd1, 2'd2, 2'd3};
  localparam logic [1:0] SEQ_OUT [5] = '{2'd2, 2'd0, 2'd2, 2'd1, 2'd3};

  mtf_enc #(.W(W), .SLICE(SLICE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mdl = new();
    tmp = new();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Directed: list starts [0 1 2 3].
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      x  = {14'd0, SEQ_IN[i]};
      en = 1'b1;
      #1 check({14'd0, y[1:0]}, {14'd0, SEQ_OUT[i]}, "directed slice 0");
      @(posedge clk);
    end
    // Re-synchronise the model by reset.
    @(negedge clk);
    rst_n = 1'b0; en = 1'b0;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    mdl.reset();
    for (int i = 0; i < 4; i++) recent[i] = W'($urandom);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      kind = $urandom_range(0, 3);
      if (kind == 0) x = W'($urandom);
      else x = recent[$urandom_range(0, 3)];
      en = ($urandom_range(0, 3) != 0);
      #1;
      if (en) exp_y = mdl.mtf_code(x);
      else begin
        // Peek without advancing: code on a copy.
        tmp.lst = mdl.lst;
        exp_y = tmp.mtf_code(x);
      end
      check(y, exp_y, "random");
      recent[$urandom_range(0, 3)] = x;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
