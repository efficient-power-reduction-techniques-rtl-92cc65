// tm_addr_decoder: receiver (DRAM) side of the low-power time-multiplexed
// address bus.
//
// Each bus word marked by bus_row or bus_col first has transition signaling
// removed (when ts_en is set). A row word is then decoded with the XOR or the
// Move-To-Front decoder chosen by row_mode and latched as the DRAM row; the
// following column word is decoded with the INC-XOR decoder and, together
// with the latched row, forms the full address. Only the row decoder of the
// selected scheme advances, mirroring the encoder, and both sides reset to
// the same state.
//
// row_mode, ts_en and K must match the encoder's for each address.
//
// Timing: dram_row/dram_row_valid are registered one cycle after the row
// beat; dram_addr/dram_addr_valid one cycle after the column beat. The
// valid outputs are one-cycle pulses.
module tm_addr_decoder
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
  input  logic [ADDR_W/2-1:0]   bus,
  input  logic                  bus_row,
  input  logic                  bus_col,
  output logic [ADDR_W/2-1:0]   dram_row,
  output logic                  dram_row_valid,
  output logic [ADDR_W-1:0]     dram_addr,
  output logic                  dram_addr_valid
);

  localparam int HW = ADDR_W / 2;

  logic [HW-1:0] coded, xor_x, mtf_x, col_x, row_x;

  ts_dec #(.W(HW)) u_ts (
    .clk, .rst_n, .en(bus_row || bus_col), .ts_on(ts_en), .bus, .x(coded));

  xor_dec #(.W(HW)) u_xor (
    .clk, .rst_n, .en(bus_row && row_mode == ROW_XOR), .y(coded), .x(xor_x));

  mtf_dec #(.W(HW), .SLICE(MTF_SLICE)) u_mtf (
    .clk, .rst_n, .en(bus_row && row_mode == ROW_MTF), .y(coded), .x(mtf_x));

  incxor_dec #(.W(HW), .K(K)) u_incxor (
    .clk, .rst_n, .en(bus_col), .y(coded), .x(col_x));

  assign row_x = (row_mode == ROW_MTF) ? mtf_x : xor_x;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dram_row        <= '0;
      dram_row_valid  <= 1'b0;
      dram_addr       <= '0;
      dram_addr_valid <= 1'b0;
    end else begin
      dram_row_valid  <= bus_row;
      dram_addr_valid <= bus_col;
      if (bus_row) dram_row  <= row_x;
      if (bus_col) dram_addr <= {dram_row, col_x};
    end
  end

  // The column word always follows its row word.
  assert property (@(posedge clk) disable iff (!rst_n) bus_row |=> bus_col);

endmodule
