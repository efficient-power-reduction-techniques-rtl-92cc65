// tm_addr_decoder_tb: self-checking testbench for the receiver side.
//
// The reference model of tmab_ref_pkg codes a stream of addresses (row
// scheme and transition signaling changed at random between addresses) into
// row and column bus words, which the testbench drives with bus_row and
// bus_col, with random idle gaps during which the bus holds its value. The
// decoder must present the original row on dram_row one cycle after the row
// beat and the original address on dram_addr one cycle after the column
// beat, each with a one-cycle valid pulse.
module tm_addr_decoder_tb;
  import tmab_pkg::*;
  import tmab_ref_pkg::*;
  localparam int ADDR_W = 32, HW = ADDR_W / 2;

  logic              clk = 1'b0, rst_n = 1'b0;
  row_mode_e         row_mode = ROW_XOR;
  logic              ts_en = 1'b0;
  logic [HW-1:0]     bus = '0;
  logic              bus_row = 1'b0, bus_col = 1'b0;
  logic [HW-1:0]     dram_row;
  logic              dram_row_valid;
  logic [ADDR_W-1:0] dram_addr;
  logic              dram_addr_valid;

  int checks = 0, failures = 0;
  link_ref #(.HW(HW)) mdl;
  logic [ADDR_W-1:0] a, last;
  logic [HW-1:0]     rw, cw;
  int r;

  tm_addr_decoder #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mdl  = new();
    last = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) begin
        row_mode = row_mode_e'($urandom_range(0, 1));
        ts_en    = $urandom_range(0, 1) == 1;
      end
      r = $urandom_range(0, 99);
      if (r < 16)      a = last + 1;
      else if (r < 60) a = {last[ADDR_W-1:HW], HW'($urandom_range(0, 255))};
      else if (r < 80) a = {HW'($urandom_range(0, 3)), HW'($urandom)};
      else             a = ADDR_W'($urandom);
      last = a;
      mdl.encode(a, row_mode == ROW_MTF, ts_en, rw, cw);
      bus = rw; bus_row = 1'b1;
      @(negedge clk);
      check(dram_row_valid && dram_row == a[ADDR_W-1:HW], "row latched one cycle after row beat");
      check(!dram_addr_valid, "no address pulse after a row beat");
      bus = cw; bus_row = 1'b0; bus_col = 1'b1;
      @(negedge clk);
      check(dram_addr_valid && dram_addr == a,
            $sformatf("address %h expected %h", dram_addr, a));
      check(!dram_row_valid, "row pulse lasts one cycle");
      bus_col = 1'b0;
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        check(!dram_addr_valid && !dram_row_valid, "no pulses while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
