// csm_pkg: types shared by the on-the-fly conversion blocks of the carry-save
// multipliers.
//
// A conversion decision D_k[i] tells whether the converted output digit m_k is
// the assimilated digit A_k itself or A_k + 1 (mod the radix). It is one of
// three states: u (undecided, the carry into digit k is still unknown), g (no
// change) and t (increment). It is carried on two wires, gamma (msb) and delta
// (lsb), with the encoding u = 00, g = 10, t = 01; 11 never occurs. At the end
// of a chain only delta is needed: delta = 1 means "add one".
package csm_pkg;

  typedef struct packed {
    logic gamma;  // decided: no change (g)
    logic delta;  // decided: increment (t)
  } dec_t;

  localparam dec_t DEC_U = '{gamma: 1'b0, delta: 1'b0};
  localparam dec_t DEC_G = '{gamma: 1'b1, delta: 1'b0};
  localparam dec_t DEC_T = '{gamma: 1'b0, delta: 1'b1};

endpackage
