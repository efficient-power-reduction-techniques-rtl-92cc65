// incxor_enc: INC-XOR coder for the column half of a time-multiplexed DRAM
// address.
//
// Sends Y_i = X_i xor (X_{i-1} + K): the current column is XORed with the
// column predicted by adding the stride K to the previous one. A sequential
// column (X_i = X_{i-1} + K) is sent as all zeros, and a column close to the
// prediction has few ones. The increment sits behind the register, so the
// coding path from `x` to `y` is a single 2-input XOR per bit. The stride K
// defaults to 1 (one address unit), this design's choice.
//
// Interface: `x` is the column address, `y` the coded word (combinational).
// On a rising edge with `en` high the register takes `x`. Reset clears the
// register to zero (this design's choice).
module incxor_enc #(
  parameter int          W = 16,
  parameter logic [31:0] K = 32'd1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic [W-1:0] prev_q;
  logic [W-1:0] pred;

  always_ff @(posedge clk) begin
    if (!rst_n)   prev_q <= '0;
    else if (en)  prev_q <= x;
  end

  assign pred = prev_q + K[W-1:0];
  assign y    = x ^ pred;

endmodule
