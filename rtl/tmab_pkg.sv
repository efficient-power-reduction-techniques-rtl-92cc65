// tmab_pkg: types and shared functions of the time-multiplexed address bus
// encoder/decoder.
//
// The link sends a 32-bit DRAM address as two 16-bit words over one bus: the
// row half first, then the column half. The row half is coded with either XOR
// coding or Move-To-Front (MTF) coding, the column half always with INC-XOR
// coding, and the multiplexed word may additionally be sent with transition
// signaling. This package holds the row-coding selector, the multiplexer phase
// type and the MTF table-update rule used identically by encoder and decoder.
//
// The MTF rule follows the self-organising-list scheme: the value just coded
// moves to position 0 and every value that stood in front of it moves back by
// one. The reset contents of the tables (value v at position v) are this
// design's choice.
package tmab_pkg;

  // Row coding scheme; the column is always INC-XOR coded.
  typedef enum logic {
    ROW_XOR = 1'b0,   // XOR-INCXOR
    ROW_MTF = 1'b1    // MTF-INCXOR
  } row_mode_e;

  // Phase of the time multiplexer.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_ROW  = 2'd1,
    PH_COL  = 2'd2
  } phase_e;

  // Next position of a table entry now at position `pos` after the value at
  // position `hit` has been coded (moved to the front).
  function automatic logic [7:0] mtf_next(input logic [7:0] pos, input logic [7:0] hit);
    if (pos == hit)      return 8'd0;
    else if (pos < hit)  return pos + 8'd1;
    else                 return pos;
  endfunction

endpackage
