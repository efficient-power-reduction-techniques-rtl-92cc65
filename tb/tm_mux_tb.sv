// tm_mux_tb: self-checking testbench for the time multiplexer and its
// sequencer.
//
// Requests arrive at random, sometimes back to back. A reference sequencer in
// the testbench predicts, for every cycle, which beat is active and whether a
// request can be taken; the testbench checks row_beat, col_beat, req_ready,
// the selected word, that each accepted request gives a row beat one cycle
// later and a column beat two cycles later, and that a run of back-to-back
// requests is served at one address per two cycles.
module tm_mux_tb;
  localparam int W = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         req_valid = 1'b0, req_ready, load, row_beat, col_beat;
  logic [W-1:0] row_word = '0, col_word = '0, word;
  int checks = 0, failures = 0;
  int exp_state;     // 0 idle, 1 row, 2 column
  int accepted = 0, rows = 0, cols = 0;
  int burst_start, burst_acc;

  tm_mux #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
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
    exp_state = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      req_valid = (i >= 2000 && i < 2100) ? 1'b1 : ($urandom_range(0, 2) == 0);
      row_word  = W'($urandom);
      col_word  = W'($urandom);
      #1;
      check(req_ready == (exp_state != 1), "req_ready");
      check(row_beat == (exp_state == 1), "row_beat");
      check(col_beat == (exp_state == 2), "col_beat");
      check(load == (req_valid && exp_state != 1), "load");
      if (exp_state == 1) check(word == row_word, "row word selected");
      if (exp_state == 2) check(word == col_word, "column word selected");
      if (row_beat) rows++;
      if (col_beat) cols++;
      if (load) accepted++;
      if (i == 2000) begin burst_start = accepted; end
      if (i == 2099) begin burst_acc = accepted - burst_start; end
      // Reference next state.
      unique case (exp_state)
        0: exp_state = req_valid ? 1 : 0;
        1: exp_state = 2;
        default: exp_state = req_valid ? 1 : 0;
      endcase
      @(posedge clk);
    end
    // 100 cycles of back-to-back requests: 50 accepted (one per two cycles).
    check(burst_acc >= 49 && burst_acc <= 51, $sformatf("throughput %0d per 100 cycles", burst_acc));
    check(rows > 100 && cols > 100, "beats happened");
    $display("accepted %0d, row beats %0d, column beats %0d, back-to-back %0d per 100 cycles",
             accepted, rows, cols, burst_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
