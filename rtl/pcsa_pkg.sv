// pcsa_pkg: types and constants shared by the parallel circular-scan blocks.
//
// The multiple-hot decoder (MHD) takes its address as a vector of symbols in
// positional-cube notation. Each symbol is two bits: the upper bit says "this
// address bit may be 0", the lower bit says "it may be 1". So 0 is 2'b10, 1 is
// 2'b01, a don't-care d is 2'b11 (both values match) and the empty symbol is
// 2'b00 (nothing matches, the decoder selects no chain). This encoding is the
// one of the design; the bit order within a symbol is read directly from the
// encoding table (0 -> 10, 1 -> 01, d -> 11, empty -> 00).
//
// The package also holds the default feedback polynomials of the signature
// register (MISR). The MISR itself is only named by the design; the
// polynomials are this implementation's choice (well-known primitive
// trinomials/pentanomials for power-of-two widths).
package pcsa_pkg;

  // One positional-cube address symbol.
  typedef enum logic [1:0] {
    PC_NONE = 2'b00,  // empty: matches neither value
    PC_ONE  = 2'b01,  // matches an address bit of 1
    PC_ZERO = 2'b10,  // matches an address bit of 0
    PC_DC   = 2'b11   // don't care: matches both
  } pc_sym_e;

  // Largest MISR width the polynomial table is written for.
  localparam int unsigned MISR_MAX_W = 1024;

  // Feedback mask of a Galois-form MISR of width w: bit j set means the
  // polynomial has the term x^j (the x^w term is implicit). Power-of-two
  // widths from 4 to 256 use primitive polynomials; any other width falls back
  // to x^w + x^(w-1) + 1, which still compacts but is not guaranteed to be
  // maximal-length.
  function automatic logic [MISR_MAX_W-1:0] misr_poly(int unsigned w);
    logic [MISR_MAX_W-1:0] p;
    p = '0;
    p[0] = 1'b1;
    case (w)
      4:   begin p[3] = 1'b1; end
      8:   begin p[6] = 1'b1; p[5] = 1'b1; p[4] = 1'b1; end
      16:  begin p[15] = 1'b1; p[13] = 1'b1; p[4] = 1'b1; end
      32:  begin p[22] = 1'b1; p[2] = 1'b1; p[1] = 1'b1; end
      64:  begin p[63] = 1'b1; p[61] = 1'b1; p[60] = 1'b1; end
      128: begin p[126] = 1'b1; p[101] = 1'b1; p[99] = 1'b1; end
      256: begin p[254] = 1'b1; p[251] = 1'b1; p[246] = 1'b1; end
      default: begin
        if (w > 1 && w <= MISR_MAX_W) p[w-1] = 1'b1;
      end
    endcase
    return p;
  endfunction

endpackage
