// xor_enc: XOR coder for the row half of a time-multiplexed DRAM address.
//
// Sends Y_i = X_i xor X_{i-1}, where X_{i-1} is the previous row address that
// was coded. When consecutive addresses stay in the same DRAM row the coded
// word is all zeros, so the bus sees few ones. The coding path is one 2-input
// XOR per bit; the register is outside the critical path.
//
// Interface: `x` is the row address, `y` the coded word (combinational from
// `x`). On a rising clock edge with `en` high the register takes `x`; the
// caller raises `en` in the cycle the coded word is used. Reset clears the
// register to zero (this design's choice), so the first row is sent unchanged.
module xor_enc #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic [W-1:0] prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n)   prev_q <= '0;
    else if (en)  prev_q <= x;
  end

  assign y = x ^ prev_q;

endmodule
