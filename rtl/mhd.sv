// mhd: multiple-hot decoder.
//
// A regular n-to-2^n decoder raises exactly one output. This decoder takes an
// address of ADDR_W symbols in positional-cube notation (see pcsa_pkg), where a
// symbol may also be a don't-care d or the empty symbol. Output sel[i] is high
// when every address bit of i is matched by its symbol, so an address with m
// don't-care symbols raises 2^m outputs at once and an address holding an empty
// symbol raises none. Examples for 8 outputs (address written MSB first,
// output written sel[7]..sel[0]):
//   11d -> 11000000, dd0 -> 01010101, 101 -> 00100000, 0d1 -> 00001010.
//
// Interface: addr[k] is the symbol for address bit k (2 bits, 2*ADDR_W input
// pins in all). The decoder is purely combinational; sel follows addr in the
// same cycle.
//
// The symbol encoding, the matching rule and the pin count of two per address
// bit follow the design. NUM_OUT defaults to 256 outputs, one per scan chain.
module mhd #(
  parameter  int unsigned NUM_OUT = 256,
  localparam int unsigned ADDR_W  = (NUM_OUT > 1) ? $clog2(NUM_OUT) : 1
) (
  input  logic [ADDR_W-1:0][1:0] addr,
  output logic [NUM_OUT-1:0]     sel
);

  // A symbol matches address bit value b when its "may be b" field is set:
  // field [1] is "may be 0", field [0] is "may be 1".
  always_comb begin
    for (int unsigned i = 0; i < NUM_OUT; i++) begin
      logic hit;
      hit = 1'b1;
      for (int unsigned k = 0; k < ADDR_W; k++) begin
        hit &= ((i >> k) & 1) != 0 ? addr[k][0] : addr[k][1];
      end
      sel[i] = hit;
    end
  end

endmodule
