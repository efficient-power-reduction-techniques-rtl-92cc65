// tm_addr_bus_top_tb: end-to-end testbench of the whole link at its default
// size (32-bit addresses, 16-bit bus, 2-bit MTF slices, stride 1).
//
// A synthetic DRAM address stream is generated with the mix typical behind a
// second-level cache: 16 % sequential addresses (previous + 1), 40 % in the
// same row near the previous column, 15 % reusing one of the last eight rows,
// and the rest random. The same stream is sent four times, after a reset, in
// each configuration: XOR-INCXOR, XOR-INCXOR with transition signaling,
// MTF-INCXOR and MTF-INCXOR with transition signaling. A final run mixes
// random gaps with changes of configuration between addresses.
//
// Checked for every address: the row and column bus words against the
// reference model of tmab_ref_pkg, the decoded row one cycle after its row
// beat (three cycles after acceptance) and the decoded address four cycles
// after acceptance, in order. Back-to-back requests must be served at one
// address per two cycles. Bus transitions per address are counted for each
// configuration and for plain (uncoded) row/column multiplexing of the same
// stream; both transition-signaling variants must lower them. Each mechanism
// (same-row XOR word, sequential column, MTF front hit, signaling on and off,
// configuration change, stall of a waiting request, back-to-back transfer)
// is counted and must occur at least once.
module tm_addr_bus_top_tb;
  import tmab_pkg::*;
  import tmab_ref_pkg::*;
  localparam int ADDR_W = 32, HW = ADDR_W / 2;
  localparam int N = 4000;    // addresses per configuration

  typedef struct {
    logic [HW-1:0]     word;
    bit                is_row;
    longint            cyc;
  } beat_t;
  typedef struct {
    logic [ADDR_W-1:0] addr;
    longint            cyc;   // acceptance cycle
  } acc_t;

  logic              clk = 1'b0, rst_n = 1'b0;
  row_mode_e         row_mode = ROW_XOR;
  logic              ts_en = 1'b0;
  logic              addr_valid = 1'b0, addr_ready;
  logic [ADDR_W-1:0] addr = '0;
  logic [HW-1:0]     bus, dram_row;
  logic              bus_row, bus_col, dram_row_valid, dram_addr_valid;
  logic [ADDR_W-1:0] dram_addr;

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [ADDR_W-1:0] stream [N];
  beat_t  bq[$];
  acc_t   rq[$], aq[$];
  link_ref #(.HW(HW)) mdl;

  // Mechanism counters.
  int n_same_row = 0, n_seq_col = 0, n_mtf_front = 0, n_ts_on = 0, n_ts_off = 0;
  int n_switch = 0, n_stall = 0, n_b2b = 0;
  longint last_acc = -10;
  // Transition counts.
  longint tr_bus, tr_bin;
  logic [HW-1:0] prev_bus_word;
  real tpa [5];

  tm_addr_bus_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_stream();
    logic [ADDR_W-1:0] a;
    logic [HW-1:0]     rows [8];
    int r;
    a = ADDR_W'($urandom);
    for (int i = 0; i < 8; i++) rows[i] = HW'($urandom);
    for (int i = 0; i < N; i++) begin
      r = $urandom_range(0, 99);
      if (r < 16)      a = a + 1;
      else if (r < 56) a = {a[ADDR_W-1:HW], a[HW-1:0] + HW'($urandom_range(0, 64)) - HW'(32)};
      else if (r < 71) a = {rows[$urandom_range(0, 7)], HW'($urandom)};
      else             a = ADDR_W'($urandom);
      stream[i] = a;
      rows[$urandom_range(0, 7)] = a[ADDR_W-1:HW];
    end
  endfunction

  // Checks this cycle's outputs (called just after a falling edge).
  task automatic observe();
    beat_t b;
    acc_t  e;
    if (bus_row || bus_col) begin
      check(bq.size() > 0, "unexpected bus beat");
      if (bq.size() > 0) begin
        b = bq.pop_front();
        check(b.is_row == bus_row && b.cyc == cyc,
              $sformatf("beat kind/cycle: got row=%0b at %0d, expected row=%0b at %0d",
                        bus_row, cyc, b.is_row, b.cyc));
        check(bus == b.word, $sformatf("bus %h expected %h", bus, b.word));
      end
      tr_bus += longint'(popcount(64'(bus ^ prev_bus_word)));
      prev_bus_word = bus;
    end
    if (dram_row_valid) begin
      check(rq.size() > 0, "unexpected row");
      if (rq.size() > 0) begin
        e = rq.pop_front();
        check(dram_row == e.addr[ADDR_W-1:HW] && cyc == e.cyc + 3,
              $sformatf("row %h at %0d, expected %h at %0d", dram_row, cyc, e.addr[ADDR_W-1:HW], e.cyc + 3));
      end
    end
    if (dram_addr_valid) begin
      check(aq.size() > 0, "unexpected address");
      if (aq.size() > 0) begin
        e = aq.pop_front();
        check(dram_addr == e.addr && cyc == e.cyc + 4,
              $sformatf("address %h at %0d, expected %h at %0d", dram_addr, cyc, e.addr, e.cyc + 4));
      end
    end
  endtask

  // Record an accepted address in the model and the scoreboards.
  task automatic accept(input logic [ADDR_W-1:0] a);
    logic [HW-1:0] rc, cc, rb, cb;
    if (row_mode == ROW_MTF) begin
      rc = mdl.mtf_code(a[ADDR_W-1:HW]);
      if (rc == '0) n_mtf_front++;
    end else begin
      rc = mdl.xor_code(a[ADDR_W-1:HW]);
      if (rc == '0) n_same_row++;
    end
    cc = mdl.incxor_code(a[HW-1:0]);
    if (cc == '0) n_seq_col++;
    rb = mdl.ts_word(rc, ts_en);
    cb = mdl.ts_word(cc, ts_en);
    if (ts_en) n_ts_on++; else n_ts_off++;
    bq.push_back('{word: rb, is_row: 1'b1, cyc: cyc + 2});
    bq.push_back('{word: cb, is_row: 1'b0, cyc: cyc + 3});
    rq.push_back('{addr: a, cyc: cyc});
    aq.push_back('{addr: a, cyc: cyc});
    if (cyc == last_acc + 2) n_b2b++;
    last_acc = cyc;
  endtask

  task automatic drain();
    repeat (8) begin
      @(negedge clk);
      addr_valid = 1'b0;
      #1 observe();
    end
    check(bq.size() == 0 && rq.size() == 0 && aq.size() == 0, "all transfers completed");
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    addr_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mdl.reset();
    prev_bus_word = '0;
    tr_bus = 0;
  endtask

  // Sends the whole stream back to back in one configuration.
  task automatic run_config(input row_mode_e m, input bit ts, output real t);
    int i;
    longint c0;
    row_mode = m;
    ts_en    = ts;
    do_reset();
    i = 0;
    c0 = cyc;
    while (i < N) begin
      @(negedge clk);
      #1 observe();
      addr_valid = 1'b1;
      addr       = stream[i];
      #1;
      if (!addr_ready) n_stall++;
      if (addr_ready) begin
        accept(stream[i]);
        i++;
      end
    end
    // Back to back: one address per two cycles.
    check(cyc - c0 <= 2 * N + 2, $sformatf("throughput: %0d cycles for %0d addresses", cyc - c0, N));
    drain();
    t = real'(tr_bus) / real'(N);
  endtask

  initial begin
    logic [HW-1:0] pw;
    mdl = new();
    make_stream();
    repeat (3) @(posedge clk);

    // Plain time-multiplexed bus, computed from the stream.
    tr_bin = 0;
    pw = '0;
    for (int i = 0; i < N; i++) begin
      tr_bin += longint'(popcount(64'(pw ^ stream[i][ADDR_W-1:HW])));
      tr_bin += longint'(popcount(64'(stream[i][ADDR_W-1:HW] ^ stream[i][HW-1:0])));
      pw = stream[i][HW-1:0];
    end
    tpa[0] = real'(tr_bin) / real'(N);

    run_config(ROW_XOR, 1'b0, tpa[1]);
    run_config(ROW_XOR, 1'b1, tpa[2]);
    run_config(ROW_MTF, 1'b0, tpa[3]);
    run_config(ROW_MTF, 1'b1, tpa[4]);

    $display("transitions per address: plain %0.2f, XOR-INCXOR %0.2f, XOR-INCXOR+TS %0.2f, MTF-INCXOR %0.2f, MTF-INCXOR+TS %0.2f",
             tpa[0], tpa[1], tpa[2], tpa[3], tpa[4]);
    check(tpa[2] < tpa[0], "XOR-INCXOR+TS reduces transitions");
    check(tpa[4] < tpa[0], "MTF-INCXOR+TS reduces transitions");

    // Mixed run: gaps and configuration changes between addresses.
    do_reset();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      #1 observe();
      if (bq.size() == 0 && addr_ready && !bus_row && !bus_col && $urandom_range(0, 15) == 0) begin
        row_mode   = row_mode_e'(~row_mode);
        ts_en      = $urandom_range(0, 1) == 1;
        addr_valid = 1'b0;
        n_switch++;
      end else begin
        addr_valid = ($urandom_range(0, 2) != 0);
        addr       = stream[i];
        #1;
        if (addr_valid && !addr_ready) n_stall++;
        if (addr_valid && addr_ready) accept(stream[i]);
      end
    end
    drain();

    $display("same-row XOR %0d, sequential column %0d, MTF front hit %0d, TS on %0d, TS off %0d",
             n_same_row, n_seq_col, n_mtf_front, n_ts_on, n_ts_off);
    $display("configuration changes %0d, stalled requests %0d, back-to-back transfers %0d",
             n_switch, n_stall, n_b2b);
    check(n_same_row > 0,  "same-row XOR word seen");
    check(n_seq_col > 0,   "sequential column seen");
    check(n_mtf_front > 0, "MTF front hit seen");
    check(n_ts_on > 0 && n_ts_off > 0, "transition signaling on and off");
    check(n_switch > 0,    "configuration change seen");
    check(n_stall > 0,     "stall seen");
    check(n_b2b > 0,       "back-to-back transfer seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
