// xor_enc_tb: self-checking testbench for xor_enc.
//
// Drives random words with a random enable for 2000 cycles, mixing repeats,
// near neighbours and unrelated values, and compares the combinational output
// with a reference computed in the testbench: Y = X xor X_prev.
// The reference keeps its own copy of the previous value and advances it only
// on enabled clock edges, so a register that ignores the enable or holds the
// wrong value is caught.
module xor_enc_tb;
  localparam int          W = 16;
  localparam logic [31:0] K = 32'd1;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] prev;        // reference state: previous plain value
  logic [W-1:0] plain, code; // reference plain and coded words
  int checks = 0, failures = 0;
  int kind;

  xor_enc #(.W(W)) dut (.clk, .rst_n, .en, .x(din), .y(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      kind = $urandom_range(0, 3);
      unique case (kind)
        0:       plain = W'($urandom);
        1:       plain = prev;
        2:       plain = prev + W'(K);
        default: plain = prev ^ W'(1 << $urandom_range(0, W-1));
      endcase
      din = plain; code = plain ^ prev;
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (dout !== code) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: got %h expected %h", i, dout, code);
      end
      @(posedge clk);
      if (en) prev = plain;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
