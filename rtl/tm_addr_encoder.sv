// tm_addr_encoder: sender side of the low-power time-multiplexed address bus.
//
// An accepted ADDR_W-bit address is split into a row half (upper bits) and a
// column half (lower bits), each ADDR_W/2 bits wide. The row half is coded
// with XOR coding (row_mode = ROW_XOR, the XOR-INCXOR scheme) or with 2-bit
// Move-To-Front coding (ROW_MTF, the MTF-INCXOR scheme); the column half is
// always INC-XOR coded. The time multiplexer sends the coded row word and
// then the coded column word, and the transition-signaling register (ts_en)
// drives them onto the bus. No extra bus line or cycle is added.
//
// Only the row coder of the selected scheme advances its state, so a change of
// row_mode between addresses keeps encoder and decoder in step. row_mode and
// ts_en are sampled when an address is accepted and must be the same at the
// decoder for that address.
//
// Timing: address accepted in cycle t; the bus shows the row word with
// bus_row high in t+2 and the column word with bus_col high in t+3. Up to one
// address every two cycles. Between addresses the bus holds its value.
module tm_addr_encoder
  import tmab_pkg::*;
#(
  parameter int          ADDR_W    = 32,
  parameter logic [31:0] K         = 32'd1,
  parameter int          MTF_SLICE = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  row_mode_e             row_mode,
  input  logic                  ts_en,
  input  logic                  addr_valid,
  input  logic [ADDR_W-1:0]     addr,
  output logic                  addr_ready,
  output logic [ADDR_W/2-1:0]   bus,
  output logic                  bus_row,
  output logic                  bus_col
);

  localparam int HW = ADDR_W / 2;

  logic [ADDR_W-1:0] addr_q;
  row_mode_e         mode_q;
  logic              ts_q;
  logic              load, row_beat, col_beat;
  logic [HW-1:0]     xor_y, mtf_y, col_y, row_y, word;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_q <= '0;
      mode_q <= ROW_XOR;
      ts_q   <= 1'b0;
    end else if (load) begin
      addr_q <= addr;
      mode_q <= row_mode;
      ts_q   <= ts_en;
    end
  end

  xor_enc #(.W(HW)) u_xor (
    .clk, .rst_n, .en(row_beat && mode_q == ROW_XOR),
    .x(addr_q[ADDR_W-1:HW]), .y(xor_y));

  mtf_enc #(.W(HW), .SLICE(MTF_SLICE)) u_mtf (
    .clk, .rst_n, .en(row_beat && mode_q == ROW_MTF),
    .x(addr_q[ADDR_W-1:HW]), .y(mtf_y));

  incxor_enc #(.W(HW), .K(K)) u_incxor (
    .clk, .rst_n, .en(col_beat),
    .x(addr_q[HW-1:0]), .y(col_y));

  assign row_y = (mode_q == ROW_MTF) ? mtf_y : xor_y;

  tm_mux #(.W(HW)) u_mux (
    .clk, .rst_n,
    .req_valid(addr_valid), .req_ready(addr_ready), .load,
    .row_word(row_y), .col_word(col_y), .word,
    .row_beat, .col_beat);

  ts_enc #(.W(HW)) u_ts (
    .clk, .rst_n, .en(row_beat || col_beat), .ts_on(ts_q), .x(word), .bus);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_row <= 1'b0;
      bus_col <= 1'b0;
    end else begin
      bus_row <= row_beat;
      bus_col <= col_beat;
    end
  end

endmodule
