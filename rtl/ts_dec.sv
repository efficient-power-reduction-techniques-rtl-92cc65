// ts_dec: receiver side of transition signaling.
//
// Recovers X_i = Y_i xor Y_{i-1} from the bus, keeping the previous bus word
// Y_{i-1} in a register that follows every valid bus word whether signaling
// is on or not, so the two ends agree on Y_{i-1} even across a change of
// ts_on between words. With ts_on low the word passes unchanged.
//
// Interface: `bus` is the received word, `x` the coded word (combinational).
// On a rising edge with `en` high the register takes `bus`. Reset clears it to
// zero, matching the reset value of ts_enc's bus register.
module ts_dec #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         ts_on,
  input  logic [W-1:0] bus,
  output logic [W-1:0] x
);

  logic [W-1:0] prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n)   prev_q <= '0;
    else if (en)  prev_q <= bus;
  end

  assign x = ts_on ? (bus ^ prev_q) : bus;

endmodule
