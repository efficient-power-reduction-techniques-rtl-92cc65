// incxor_dec: decoder for the INC-XOR-coded column half.
//
// Recovers X_i = Y_i xor (X_{i-1} + K) from the received word, keeping the
// last decoded column in a register. K must equal the encoder's stride
// (default 1, this design's choice); reset clears the register to zero as in
// the encoder.
//
// Interface: `y` is the received coded word, `x` the decoded column
// (combinational). On a rising edge with `en` high the register takes `x`.
module incxor_dec #(
  parameter int          W = 16,
  parameter logic [31:0] K = 32'd1
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

  assign x = y ^ (prev_q + K[W-1:0]);

endmodule
