// ts_dec_tb: self-checking testbench for the transition-signaling receiver.
//
// A reference transmitter in the testbench builds the bus word from random
// coded words with random ts_on (B = B_prev ^ Y, or B = Y); the decoder output
// must give back Y on every enabled word. Cycles with the enable low present
// a changed bus that must not disturb the decoder's stored word.
module ts_dec_tb;
  localparam int W = 16;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0, ts_on = 1'b0;
  logic [W-1:0] bus = '0, x;
  logic [W-1:0] word, bus_prev;
  int checks = 0, failures = 0;

  ts_dec #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      if (en) begin
        word  = W'($urandom);
        ts_on = ($urandom_range(0, 2) != 0);
        bus   = ts_on ? (bus_prev ^ word) : word;
        bus_prev = bus;
        #1;
        checks++;
        if (x !== word) begin
          failures++;
          if (failures < 10) $display("cycle %0d: decoded %h expected %h", i, x, word);
        end
      end else begin
        bus = W'($urandom);   // not a valid word: must be ignored
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
