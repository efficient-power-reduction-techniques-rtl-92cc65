// ts_enc: transition-signaling stage and bus driver register.
//
// With transition signaling on, the bus carries Y_i = Y_{i-1} xor X_i: a one
// in the coded word toggles the bus line and a zero leaves it, so the number
// of bus transitions equals the number of ones in the coded words. Because
// the row and column coders aim at words with few ones, this turns their
// output into few transitions. With it off, the bus simply carries X_i.
//
// Interface: `x` is the coded word from the time multiplexer, `bus` the
// registered bus value. On a rising edge with `en` high, `bus` takes
// `bus ^ x` (ts_on = 1) or `x` (ts_on = 0); otherwise it holds, so an idle bus
// does not toggle. Reset drives the bus to zero (this design's choice).
module ts_enc #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         ts_on,
  input  logic [W-1:0] x,
  output logic [W-1:0] bus
);

  always_ff @(posedge clk) begin
    if (!rst_n)   bus <= '0;
    else if (en)  bus <= ts_on ? (bus ^ x) : x;
  end

endmodule
