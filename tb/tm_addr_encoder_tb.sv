// tm_addr_encoder_tb: self-checking testbench for the sender side.
//
// Addresses with sequential runs, same-row neighbours, reused rows and
// random jumps are offered with random gaps. Between transfers the row
// scheme (XOR or MTF) and transition signaling are changed at random. For
// every accepted address the reference model of tmab_ref_pkg gives the row
// and column bus words; the testbench checks that the row word appears with
// bus_row exactly two cycles after acceptance and the column word with
// bus_col three cycles after, and that the bus does not move between words.
module tm_addr_encoder_tb;
  import tmab_pkg::*;
  import tmab_ref_pkg::*;
  localparam int ADDR_W = 32, HW = ADDR_W / 2;

  typedef struct {
    logic [HW-1:0] word;
    bit            is_row;
    longint        cyc;
  } beat_t;

  logic              clk = 1'b0, rst_n = 1'b0;
  row_mode_e         row_mode = ROW_XOR;
  logic              ts_en = 1'b0;
  logic              addr_valid = 1'b0, addr_ready;
  logic [ADDR_W-1:0] addr = '0, last_addr;
  logic [HW-1:0]     bus, prev_bus;
  logic              bus_row, bus_col;

  int checks = 0, failures = 0;
  longint cyc = 0;
  beat_t  q[$];
  beat_t  b;
  link_ref #(.HW(HW)) mdl;
  logic [HW-1:0] rw, cw;
  int n_acc = 0, n_switch = 0, n_mtf = 0, n_ts = 0;

  tm_addr_encoder #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic logic [ADDR_W-1:0] next_addr(logic [ADDR_W-1:0] a);
    int r = $urandom_range(0, 99);
    if (r < 16)      return a + 1;                                   // sequential
    else if (r < 60) return {a[ADDR_W-1:HW], HW'($urandom_range(0, 255))};  // same row
    else if (r < 80) return {HW'($urandom_range(0, 3)), HW'($urandom)};     // reused rows
    else             return ADDR_W'($urandom);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mdl = new();
    last_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    prev_bus = bus;
    while (n_acc < 3000) begin
      @(negedge clk);
      // Observe this cycle's bus.
      if (bus_row || bus_col) begin
        check(q.size() > 0, "unexpected beat");
        if (q.size() > 0) begin
          b = q.pop_front();
          check(b.is_row == bus_row && b.is_row != bus_col, "beat kind");
          check(b.cyc == cyc, $sformatf("beat at cycle %0d expected %0d", cyc, b.cyc));
          check(bus == b.word, $sformatf("bus %h expected %h", bus, b.word));
        end
      end else begin
        check(bus == prev_bus, "bus moved while idle");
      end
      prev_bus = bus;
      // Configuration changes only with nothing in flight.
      if (q.size() == 0 && addr_ready && $urandom_range(0, 19) == 0) begin
        row_mode   = row_mode_e'($urandom_range(0, 1));
        ts_en      = $urandom_range(0, 1) == 1;
        addr_valid = 1'b0;
        n_switch++;
      end else begin
        addr_valid = ($urandom_range(0, 3) != 0);
        addr = next_addr(last_addr);
      end
      #1;
      if (addr_valid && addr_ready) begin
        mdl.encode(addr, row_mode == ROW_MTF, ts_en, rw, cw);
        q.push_back('{word: rw, is_row: 1'b1, cyc: cyc + 2});
        q.push_back('{word: cw, is_row: 1'b0, cyc: cyc + 3});
        last_addr = addr;
        n_acc++;
        if (row_mode == ROW_MTF) n_mtf++;
        if (ts_en) n_ts++;
      end
    end
    repeat (5) begin
      @(negedge clk);
      addr_valid = 1'b0;
      if (bus_row || bus_col) begin
        b = q.pop_front();
        check(b.cyc == cyc && bus == b.word, "final beats");
      end
    end
    check(q.size() == 0, $sformatf("all beats sent, %0d left, first at %0d", q.size(), q.size() ? q[0].cyc : 0));
    check(n_switch > 0 && n_mtf > 0 && n_mtf < n_acc && n_ts > 0 && n_ts < n_acc, "all modes used");
    $display("addresses %0d, MTF rows %0d, TS %0d, config changes %0d", n_acc, n_mtf, n_ts, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
