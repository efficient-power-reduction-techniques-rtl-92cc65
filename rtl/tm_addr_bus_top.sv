// tm_addr_bus_top: low-power time-multiplexed DRAM address link, encoder and
// decoder joined by the off-chip bus.
//
// An address from the last cache level enters tm_addr_encoder, which codes
// the row half (XOR or Move-To-Front, chosen by row_mode) and the column half
// (INC-XOR), sends them row first over an ADDR_W/2-bit bus, optionally with
// transition signaling (ts_en), and adds no bus line or cycle. The bus is
// brought out so its transitions can be observed; on the far side
// tm_addr_decoder recovers the row (as a DRAM would latch it on the row
// strobe) and the full address. The DRAM itself is outside this design; its
// row and address inputs are the dram_* ports.
//
// row_mode and ts_en are static configuration shared by both ends: they may
// change only between addresses, which is asserted below.
//
// Timing: an address accepted in cycle t appears on the bus as a row word in
// t+2 and a column word in t+3; dram_row is valid in t+3 and dram_addr in t+4.
// Throughput is one address per two cycles.
module tm_addr_bus_top
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
  output logic                  bus_col,
  output logic [ADDR_W/2-1:0]   dram_row,
  output logic                  dram_row_valid,
  output logic [ADDR_W-1:0]     dram_addr,
  output logic                  dram_addr_valid
);

  tm_addr_encoder #(.ADDR_W(ADDR_W), .K(K), .MTF_SLICE(MTF_SLICE)) u_enc (
    .clk, .rst_n, .row_mode, .ts_en,
    .addr_valid, .addr, .addr_ready,
    .bus, .bus_row, .bus_col);

  tm_addr_decoder #(.ADDR_W(ADDR_W), .K(K), .MTF_SLICE(MTF_SLICE)) u_dec (
    .clk, .rst_n, .row_mode, .ts_en,
    .bus, .bus_row, .bus_col,
    .dram_row, .dram_row_valid, .dram_addr, .dram_addr_valid);

  // Configuration may change only while no address is in flight.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (!addr_ready || bus_row || bus_col) |-> $stable({row_mode, ts_en}));

endmodule
