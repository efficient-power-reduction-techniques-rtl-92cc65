// mtf_enc: Move-To-Front coder for the row half of a time-multiplexed DRAM
// address.
//
// The row word is cut into W/SLICE slices of SLICE bits (2 bits by default).
// Each slice owns a self-organising list of its 2**SLICE possible values,
// held as one SLICE-bit code register per value: C_v is the position of value
// v in the list. The coded slice is the position of the current value,
// Y = C_x, picked by a 2**SLICE-to-1 multiplexer whose select is the input
// slice, so the coding delay is a mux from its select input. Recently used
// values sit near the front and get codes with few ones.
//
// After a word is coded (rising edge with `en` high) every code register
// takes N_v = 0 if C_v = Y, C_v + 1 if C_v < Y, else C_v: the coded value
// moves to the front and those that were ahead of it move back by one. The
// update uses the coded output Y of the same cycle. At reset value v sits at
// position v, so the first coded word equals the input. The reset order and
// the same-cycle update are this design's choices.
//
// Interface: `x` row address, `y` coded word (combinational), `en` advances
// the tables. W must be a multiple of SLICE.
module mtf_enc
  import tmab_pkg::*;
#(
  parameter int W     = 16,
  parameter int SLICE = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  localparam int NS = W / SLICE;       // number of slices
  localparam int NE = 1 << SLICE;      // list entries per slice

  logic [SLICE-1:0] code_q [NS][NE];

  for (genvar s = 0; s < NS; s++) begin : g_slice
    logic [SLICE-1:0] xs, ys;
    assign xs = x[s*SLICE +: SLICE];
    assign ys = code_q[s][xs];
    assign y[s*SLICE +: SLICE] = ys;

    for (genvar v = 0; v < NE; v++) begin : g_entry
      logic [SLICE-1:0] nxt;
      assign nxt = SLICE'(mtf_next(8'(code_q[s][v]), 8'(ys)));
      always_ff @(posedge clk) begin
        if (!rst_n)   code_q[s][v] <= SLICE'(v);
        else if (en)  code_q[s][v] <= nxt;
      end
    end
  end

  initial assert (W % SLICE == 0) else $error("mtf_enc: W must be a multiple of SLICE");

endmodule
