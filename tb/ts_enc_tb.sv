// ts_enc_tb: self-checking testbench for the transition-signaling bus
// register.
//
// Random coded words are applied with random enable and random ts_on. After
// each clock edge the bus must equal the reference: previous bus xor word
// (signaling on), the word itself (signaling off), or the old bus (enable
// low). The number of bus lines that toggled is also checked to equal the
// number of ones in the word whenever signaling is on.
module ts_enc_tb;
  import tmab_ref_pkg::*;
  localparam int W = 16;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0, ts_on = 1'b0;
  logic [W-1:0] x = '0, bus;
  logic [W-1:0] exp_bus, old_bus;
  int checks = 0, failures = 0;

  ts_enc #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_bus = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x     = ($urandom_range(0, 1) == 1) ? W'($urandom) : W'(1 << $urandom_range(0, W-1));
      en    = ($urandom_range(0, 3) != 0);
      ts_on = ($urandom_range(0, 2) != 0);
      old_bus = bus;
      if (en) exp_bus = ts_on ? (exp_bus ^ x) : x;
      @(posedge clk);
      #1;
      checks++;
      if (bus !== exp_bus) begin
        failures++;
        if (failures < 10) $display("cycle %0d: bus %h expected %h", i, bus, exp_bus);
      end
      if (en && ts_on) begin
        checks++;
        if (popcount(64'(bus ^ old_bus)) != popcount(64'(x))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
