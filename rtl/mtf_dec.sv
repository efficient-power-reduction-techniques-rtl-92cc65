// mtf_dec: decoder for the Move-To-Front-coded row half.
//
// Keeps the same per-slice lists as mtf_enc (code register C_v = position of
// value v). A received slice Y is a position; the decoded value is the v
// whose C_v equals Y, found by comparing Y against all 2**SLICE code
// registers. The lists are then updated with exactly the encoder's rule
// (front for C_v = Y, back by one for C_v < Y), so both sides stay equal as
// long as they are enabled for the same words and reset together.
//
// Interface: `y` received coded word, `x` decoded row (combinational), `en`
// advances the tables on a rising edge. W must be a multiple of SLICE.
module mtf_dec
  import tmab_pkg::*;
#(
  parameter int W     = 16,
  parameter int SLICE = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] y,
  output logic [W-1:0] x
);

  localparam int NS = W / SLICE;
  localparam int NE = 1 << SLICE;

  logic [SLICE-1:0] code_q [NS][NE];

  for (genvar s = 0; s < NS; s++) begin : g_slice
    logic [SLICE-1:0] ys, xs;
    assign ys = y[s*SLICE +: SLICE];

    // Inverse lookup: the tables are permutations, so exactly one entry hits.
    always_comb begin
      xs = '0;
      for (int v = 0; v < NE; v++)
        if (code_q[s][v] == ys) xs = SLICE'(v);
    end
    assign x[s*SLICE +: SLICE] = xs;

    for (genvar v = 0; v < NE; v++) begin : g_entry
      logic [SLICE-1:0] nxt;
      assign nxt = SLICE'(mtf_next(8'(code_q[s][v]), 8'(ys)));
      always_ff @(posedge clk) begin
        if (!rst_n)   code_q[s][v] <= SLICE'(v);
        else if (en)  code_q[s][v] <= nxt;
      end
    end
  end

  initial assert (W % SLICE == 0) else $error("mtf_dec: W must be a multiple of SLICE");

endmodule
