// tmab_ref_pkg: reference model of the time-multiplexed address link, used by
// the testbenches only.
//
// link_ref computes the bus words the encoder must produce, written in a
// different form from the RTL: the Move-To-Front state is kept as an ordered
// list of values (front first) rather than as one position register per
// value, and coding is a search-and-shift on that list. XOR, INC-XOR and
// transition signaling follow their defining equations
//   row XOR:     Y = X ^ X_prev_row
//   col INC-XOR: Y = X ^ (X_prev_col + K)
//   transition:  B = B_prev ^ Y   (or B = Y when signaling is off)
// Only the state of the row coder in use advances, as in the RTL.
package tmab_ref_pkg;

  function automatic int popcount(input logic [63:0] v);
    int n;
    n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

  class link_ref #(int HW = 16, int SLICE = 2, int K = 1);
    localparam int NS = HW / SLICE;
    localparam int NE = 1 << SLICE;

    int              lst [NS][NE];   // lst[s][p]: value at list position p
    logic [HW-1:0]   xor_prev, col_prev, bus_prev;

    function new();
      reset();
    endfunction

    function void reset();
      xor_prev = '0;
      col_prev = '0;
      bus_prev = '0;
      for (int s = 0; s < NS; s++)
        for (int p = 0; p < NE; p++) lst[s][p] = p;
    endfunction

    function logic [HW-1:0] mtf_code(logic [HW-1:0] x);
      logic [HW-1:0] code;
      code = '0;
      for (int s = 0; s < NS; s++) begin
        int v, p;
        v = 0;
        for (int b = 0; b < SLICE; b++) v += int'(x[s*SLICE + b]) << b;
        p = 0;
        for (int q = 0; q < NE; q++) if (lst[s][q] == v) p = q;
        for (int b = 0; b < SLICE; b++) code[s*SLICE + b] = p[b];
        v = lst[s][p];
        for (int q = p; q > 0; q--) lst[s][q] = lst[s][q-1];
        lst[s][0] = v;
      end
      mtf_code = code;
    endfunction

    function logic [HW-1:0] mtf_plain(logic [HW-1:0] y);
      logic [HW-1:0] plain;
      plain = '0;
      for (int s = 0; s < NS; s++) begin
        int v, p;
        p = 0;
        for (int b = 0; b < SLICE; b++) p += int'(y[s*SLICE + b]) << b;
        for (int b = 0; b < SLICE; b++) plain[s*SLICE + b] = lst[s][p][b];
        v = lst[s][p];
        for (int q = p; q > 0; q--) lst[s][q] = lst[s][q-1];
        lst[s][0] = v;
      end
      mtf_plain = plain;
    endfunction

    function logic [HW-1:0] xor_code(logic [HW-1:0] x);
      logic [HW-1:0] y;
      y = x ^ xor_prev;
      xor_prev = x;
      return y;
    endfunction

    function logic [HW-1:0] incxor_code(logic [HW-1:0] x);
      logic [HW-1:0] y;
      y = x ^ (col_prev + HW'(K));
      col_prev = x;
      return y;
    endfunction

    function logic [HW-1:0] ts_word(logic [HW-1:0] y, bit ts_on);
      bus_prev = ts_on ? (bus_prev ^ y) : y;
      return bus_prev;
    endfunction

    // Bus words for one address: row word then column word.
    function void encode(logic [2*HW-1:0] addr, bit mtf, bit ts_on,
                         output logic [HW-1:0] row_bus, output logic [HW-1:0] col_bus);
      logic [HW-1:0] row, col;
      row = addr[2*HW-1:HW];
      col = addr[HW-1:0];
      row_bus = ts_word(mtf ? mtf_code(row) : xor_code(row), ts_on);
      col_bus = ts_word(incxor_code(col), ts_on);
    endfunction
  endclass

endpackage
