// tm_addr_bus_narrow_tb: the link built for a 4-bit multiplexed bus
// (ADDR_W = 8: 4-bit row and 4-bit column, two 2-bit MTF slices) with a
// column stride of K = 2.
//
// Random 8-bit addresses (half of them stepping the column by the stride,
// a quarter repeating the row) are sent with random gaps and random
// changes of row scheme and transition signaling between addresses. Every bus
// word is compared with the reference model of tmab_ref_pkg and every decoded
// address with the one sent, so the parameters that set the widths and the
// stride are exercised away from their defaults.
module tm_addr_bus_narrow_tb;
  import tmab_pkg::*;
  import tmab_ref_pkg::*;
  localparam int ADDR_W = 8, HW = 4;
  localparam logic [31:0] KS = 32'd2;

  logic              clk = 1'b0, rst_n = 1'b0;
  row_mode_e         row_mode = ROW_XOR;
  logic              ts_en = 1'b0;
  logic              addr_valid = 1'b0, addr_ready;
  logic [ADDR_W-1:0] addr = '0, last = '0;
  logic [HW-1:0]     bus, dram_row;
  logic              bus_row, bus_col, dram_row_valid, dram_addr_valid;
  logic [ADDR_W-1:0] dram_addr;

  int checks = 0, failures = 0;
  logic [HW-1:0]     wq[$];
  logic [ADDR_W-1:0] aq[$];
  link_ref #(.HW(HW), .SLICE(2), .K(2)) mdl;
  logic [HW-1:0] rw, cw, w;
  logic [ADDR_W-1:0] a;
  int r, sent = 0, got = 0;

  tm_addr_bus_top #(.ADDR_W(ADDR_W), .K(KS), .MTF_SLICE(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mdl = new();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (sent < 5000 || wq.size() != 0 || aq.size() != 0) begin
      @(negedge clk);
      if (bus_row || bus_col) begin
        check(wq.size() > 0, "unexpected beat");
        if (wq.size() > 0) begin
          w = wq.pop_front();
          check(bus == w, $sformatf("bus %h expected %h", bus, w));
        end
      end
      if (dram_addr_valid) begin
        check(aq.size() > 0, "unexpected address");
        if (aq.size() > 0) begin
          a = aq.pop_front();
          check(dram_addr == a, $sformatf("address %h expected %h", dram_addr, a));
          got++;
        end
      end
      addr_valid = 1'b0;
      if (sent < 5000) begin
        if (wq.size() == 0 && aq.size() == 0 && addr_ready && $urandom_range(0, 9) == 0) begin
          row_mode = row_mode_e'($urandom_range(0, 1));
          ts_en    = $urandom_range(0, 1) == 1;
        end else if ($urandom_range(0, 3) != 0 && !(wq.size() == 0 && aq.size() != 0)) begin
          r = $urandom_range(0, 3);
          if (r < 2)       addr = {last[7:4], last[3:0] + 4'd2};
          else if (r == 2) addr = {last[7:4], 4'($urandom)};
          else             addr = 8'($urandom);
          addr_valid = 1'b1;
          #1;
          if (addr_ready) begin
            mdl.encode(addr, row_mode == ROW_MTF, ts_en, rw, cw);
            wq.push_back(rw);
            wq.push_back(cw);
            aq.push_back(addr);
            last = addr;
            sent++;
          end
        end
      end
    end
    check(got == 5000, $sformatf("%0d addresses decoded", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
