// tm_addr_bus_cache_tb: the link fed by the miss stream of a two-level cache
// hierarchy, for the two processor cache configurations the coding schemes
// were evaluated on.
//
// A synthetic program stands in for the real benchmarks. Instruction
// fetches walk a 256 KB code area with short loops, calls and returns. About
// 30 % of instructions access data: a 4 KB stack, strided array walks over
// 2 MB, and random heap accesses over 8 MB. The accesses go through
// behavioural split L1 caches and a unified, sectored L2
// (cache_model_pkg), sized as follows:
//
//   PowerPC 750: L1I 32 KB / 32 B / 8-way, L1D 32 KB / 32 B / 8-way,
//                L2 256 KB / 128 B in 2 sectors / 2-way
//   SparcIIi:    L1I 16 KB / 32 B / 2-way, L1D 16 KB / 16 B / direct,
//                L2 256 KB / 64 B in 2 sectors / direct
//
// Every L2 sector miss is one burst refill, so only its start address goes
// to DRAM. That address is sent in units of one L2 sector, so the next
// sector is "previous + 1" for INC-XOR with K = 1. The miss stream of each
// configuration is sent through the default-size link in all four schemes,
// after a reset each time. Every decoded address is checked. Bus transitions
// per address are compared with plain row/column multiplexing of the same
// stream, and both transition-signaling variants must reduce them.
module tm_addr_bus_cache_tb;
  import tmab_pkg::*;
  import tmab_ref_pkg::*;
  import cache_model_pkg::*;
  localparam int ADDR_W = 32, HW = 16;
  localparam int NINSTR = 150000;

  logic              clk = 1'b0, rst_n = 1'b0;
  row_mode_e         row_mode = ROW_XOR;
  logic              ts_en = 1'b0;
  logic              addr_valid = 1'b0, addr_ready;
  logic [ADDR_W-1:0] addr = '0;
  logic [HW-1:0]     bus, dram_row;
  logic              bus_row, bus_col, dram_row_valid, dram_addr_valid;
  logic [ADDR_W-1:0] dram_addr;

  int checks = 0, failures = 0;
  logic [ADDR_W-1:0] stream[$];
  logic [ADDR_W-1:0] aq[$];

  tm_addr_bus_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs the synthetic program through one cache hierarchy and fills
  // `stream` with DRAM burst addresses in sector units.
  task automatic make_stream(input cache_model l1i, input cache_model l1d, input cache_model l2);
    logic [31:0] pc, ret, sp, d, m1, m2, arr [4];
    int unsigned shift;
    int r;
    shift = $clog2(l2.sector_bytes);
    pc = 32'h0001_0000;
    ret = pc;
    sp = 32'h7fff_f000;
    for (int i = 0; i < 4; i++) arr[i] = 32'h1000_0000 + 32'(i) * 32'h0008_0000;
    stream.delete();
    for (int n = 0; n < NINSTR; n++) begin
      // Instruction fetch.
      if (!l1i.access(pc, m1) && !l2.access(m1, m2)) stream.push_back(m2 >> shift);
      // Data access.
      if ($urandom_range(0, 99) < 30) begin
        r = $urandom_range(0, 99);
        if (r < 40)      d = sp - 32'($urandom_range(0, 1023) * 4);
        else if (r < 75) begin
          int k = $urandom_range(0, 3);
          arr[k] += (k < 2) ? 32'd4 : 32'd8;
          if (arr[k] >= 32'h1020_0000) arr[k] = 32'h1000_0000 + 32'(k) * 32'h0008_0000;
          d = arr[k];
        end
        else             d = 32'h2000_0000 + 32'($urandom_range(0, (8 << 20) / 4 - 1) * 4);
        if (!l1d.access(d, m1) && !l2.access(m1, m2)) stream.push_back(m2 >> shift);
      end
      // Next instruction.
      r = $urandom_range(0, 99);
      if (r < 8)       pc = pc - 32'($urandom_range(1, 64) * 4);            // loop
      else if (r < 11) begin ret = pc + 4; pc = 32'h0001_0000 + 32'($urandom_range(0, 2047) * 128); end
      else if (r < 13) pc = ret;                                             // return
      else             pc = pc + 4;
    end
  endtask

  // Sends `stream` back to back; returns bus transitions per address.
  task automatic run_link(input row_mode_e m, input bit ts, output real tpa);
    int i;
    longint tr;
    logic [HW-1:0] pw;
    logic [ADDR_W-1:0] e;
    @(negedge clk);
    rst_n = 1'b0;
    addr_valid = 1'b0;
    row_mode = m;
    ts_en = ts;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    aq.delete();
    tr = 0;
    pw = '0;
    i = 0;
    while (i < stream.size() || aq.size() != 0) begin
      @(negedge clk);
      if (bus_row || bus_col) begin
        tr += longint'(popcount(64'(bus ^ pw)));
        pw = bus;
      end
      if (dram_addr_valid) begin
        check(aq.size() > 0, "unexpected address");
        if (aq.size() > 0) begin
          e = aq.pop_front();
          check(dram_addr == e, $sformatf("address %h expected %h", dram_addr, e));
        end
      end
      addr_valid = (i < stream.size());
      if (addr_valid) addr = stream[i];
      #1;
      if (addr_valid && addr_ready) begin
        aq.push_back(stream[i]);
        i++;
      end
    end
    tpa = real'(tr) / real'(stream.size());
  endtask

  task automatic evaluate(input string cfg);
    real tp [5];
    longint tr;
    logic [HW-1:0] pw;
    int nseq;
    tr = 0;
    pw = '0;
    nseq = 0;
    foreach (stream[i]) begin
      tr += longint'(popcount(64'(pw ^ stream[i][ADDR_W-1:HW])));
      tr += longint'(popcount(64'(stream[i][ADDR_W-1:HW] ^ stream[i][HW-1:0])));
      pw = stream[i][HW-1:0];
      if (i > 0 && stream[i] == stream[i-1] + 1) nseq++;
    end
    tp[0] = real'(tr) / real'(stream.size());
    run_link(ROW_XOR, 1'b0, tp[1]);
    run_link(ROW_XOR, 1'b1, tp[2]);
    run_link(ROW_MTF, 1'b0, tp[3]);
    run_link(ROW_MTF, 1'b1, tp[4]);
    $display("%s: %0d DRAM addresses, %0.1f %% sequential", cfg, stream.size(),
             100.0 * real'(nseq) / real'(stream.size()));
    $display("  transitions per address: plain %0.2f | XOR-INCXOR %0.2f (%0.0f %%) | XOR-INCXOR+TS %0.2f (%0.0f %%) | MTF-INCXOR %0.2f (%0.0f %%) | MTF-INCXOR+TS %0.2f (%0.0f %%)",
             tp[0], tp[1], 100.0 * (1.0 - tp[1] / tp[0]), tp[2], 100.0 * (1.0 - tp[2] / tp[0]),
             tp[3], 100.0 * (1.0 - tp[3] / tp[0]), tp[4], 100.0 * (1.0 - tp[4] / tp[0]));
    check(stream.size() > 100, "enough DRAM traffic");
    check(tp[2] < tp[0], "XOR-INCXOR+TS reduces transitions");
    check(tp[4] < tp[0], "MTF-INCXOR+TS reduces transitions");
  endtask

  initial begin
    cache_model i1, d1, l2;
    repeat (3) @(posedge clk);

    i1 = new("L1I", 32 * 1024, 32, 8);
    d1 = new("L1D", 32 * 1024, 32, 8);
    l2 = new("L2", 256 * 1024, 128, 2, 2);
    make_stream(i1, d1, l2);
    evaluate("PowerPC 750");

    i1 = new("L1I", 16 * 1024, 32, 2);
    d1 = new("L1D", 16 * 1024, 16, 1);
    l2 = new("L2", 256 * 1024, 64, 1, 2);
    make_stream(i1, d1, l2);
    evaluate("SparcIIi");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
