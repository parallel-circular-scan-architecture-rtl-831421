// misr: multiple-input signature register on the scan outputs.
//
// Every chain's scan output enters one bit of the register, so the responses
// that rotate out of the chains are compacted into a WIDTH-bit signature the
// tester reads once at the end. The register is in Galois form: on each enabled
// clock it shifts one place toward the MSB, the bit leaving the MSB is fed back
// into the positions given by the polynomial POLY, and the input word d is
// XORed in:
//   sig' = {sig[WIDTH-2:0], 0} ^ (sig[WIDTH-1] ? POLY : 0) ^ d
//
// Interface: rst_n (active low) and clear both load zero at the next rising
// edge and win over en; en compacts d. Everything is synchronous: d seen at one
// rising edge is in sig after that edge.
//
// The design places a MISR on the chain outputs but says nothing of its inside;
// the form, the polynomial (pcsa_pkg::misr_poly), the width and the controls are
// this implementation's choices.
module misr
  import pcsa_pkg::*;
#(
  parameter int unsigned          WIDTH = 256,
  parameter logic [WIDTH-1:0]     POLY  = WIDTH'(misr_poly(WIDTH))
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sig
);

  logic [WIDTH-1:0] sig_next;

  always_comb begin
    sig_next = sig << 1;
    if (sig[WIDTH-1]) sig_next ^= POLY;
    sig_next ^= d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      sig <= '0;
    end else if (en) begin
      sig <= sig_next;
    end
  end

endmodule
