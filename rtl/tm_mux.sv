// tm_mux: time multiplexer for a row/column address bus, with its sequencer.
//
// A DRAM address is sent in two bus cycles, the row word first and then the
// column word. This block accepts one address request (valid/ready), and in
// the following two cycles selects first `row_word` and then `col_word` onto
// `word`, raising `row_beat` or `col_beat` to say which one is current. A new
// request is accepted during the column beat, so back-to-back addresses keep
// the bus busy every cycle: one address per two cycles.
//
// The row-before-column order follows DRAM practice; the valid/ready
// handshake and the overlap of accept with the column beat are this design's
// choices.
//
// Timing: accept in cycle t (req_valid && req_ready, `load` high), row beat in
// t+1, column beat in t+2.
module tm_mux
  import tmab_pkg::*;
#(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  output logic         req_ready,
  output logic         load,
  input  logic [W-1:0] row_word,
  input  logic [W-1:0] col_word,
  output logic [W-1:0] word,
  output logic         row_beat,
  output logic         col_beat
);

  phase_e phase_q;

  assign req_ready = (phase_q != PH_ROW);
  assign load      = req_valid && req_ready;
  assign row_beat  = (phase_q == PH_ROW);
  assign col_beat  = (phase_q == PH_COL);
  assign word      = row_beat ? row_word : col_word;

  always_ff @(posedge clk) begin
    if (!rst_n) phase_q <= PH_IDLE;
    else begin
      unique case (phase_q)
        PH_IDLE: if (load) phase_q <= PH_ROW;
        PH_ROW:  phase_q <= PH_COL;
        PH_COL:  phase_q <= load ? PH_ROW : PH_IDLE;
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  // The beats are mutually exclusive.
  assert property (@(posedge clk) disable iff (!rst_n) !(row_beat && col_beat));
  // A row beat is always followed by its column beat.
  assert property (@(posedge clk) disable iff (!rst_n) row_beat |=> col_beat);

endmodule
