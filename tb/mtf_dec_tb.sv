// mtf_dec_tb: self-checking testbench for the Move-To-Front row decoder.
//
// Rows with strong reuse are coded by the ordered-list reference model of
// tmab_ref_pkg and fed to the decoder with a random enable; the decoded row
// must equal the original. The model advances only on enabled edges, so a
// table that updates wrongly, or on the wrong edges, shows up as a wrong row
// later in the sequence.
module mtf_dec_tb;
  import tmab_ref_pkg::*;
  localparam int W = 16, SLICE = 2;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] y = '0, x;
  int checks = 0, failures = 0;
  link_ref #(.HW(W), .SLICE(SLICE)) mdl;
  link_ref #(.HW(W), .SLICE(SLICE)) tmp;
  logic [W-1:0] recent [4];
  logic [W-1:0] plain;
  int kind;

  mtf_dec #(.W(W), .SLICE(SLICE)) dut (.*);

  always #5 clk = ~clk;

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
    for (int i = 0; i < 4; i++) recent[i] = W'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      kind = $urandom_range(0, 3);
      if (kind == 0) plain = W'($urandom);
      else plain = recent[$urandom_range(0, 3)];
      en = ($urandom_range(0, 3) != 0);
      if (en) y = mdl.mtf_code(plain);
      else begin
        tmp.lst = mdl.lst;
        y = tmp.mtf_code(plain);
      end
      #1;
      checks++;
      if (x !== plain) begin
        failures++;
        if (failures < 10) $display("cycle %0d: decoded %h expected %h", i, x, plain);
      end
      recent[$urandom_range(0, 3)] = plain;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
