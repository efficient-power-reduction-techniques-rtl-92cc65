// xor_dec: decoder for the XOR-coded row half.
//
// Recovers X_i = Y_i xor X_{i-1}, keeping the last decoded row X_{i-1} in a
// register. It stays in step with xor_enc as long as both are enabled for the
// same words and reset together (register cleared to zero, this design's
// choice).
//
// Interface: `y` is the received coded word, `x` the decoded row
// (combinational). On a rising edge with `en` high the register takes `x`.
module xor_dec #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] y,
  output logic [W-1:0] x
);

  logic [W-1:0] prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n)   prev_q <= '0;
    else if (en)  prev_q <= x;
  end

  assign x = y ^ prev_q;

endmodule
