// scan_sel_unit: modified scan input selection unit of one circular scan chain.
//
// The output of a circular chain is fed back to its own input. On the way back
// it passes two multiplexers:
//   MUX2 chooses between a buffered copy and an inverted copy of the scan
//        output. The decoder output of this chain selects the inverted copy, so
//        a selected chain flips the bit that is passing through: a conflicting
//        bit is corrected inside the chip and no data is loaded from the tester.
//   MUX1 chooses between the MUX2 result (circular mode) and the tester's data
//        input pin (broadcast mode). In broadcast mode the one data input drives
//        every chain, which is how the first test vector is loaded.
//
// Interface: scan_out is the chain's last cell, dec_sel its multiple-hot
// decoder output, data_in the shared data input pin, broadcast the MUX1
// select; scan_in goes to the chain's first cell. Purely combinational.
//
// The two paths, the two multiplexers and which signal drives each follow the
// design. The polarity of the selects (dec_sel = 1 picks the inverting path,
// broadcast = 1 picks the data input) is this implementation's choice.
module scan_sel_unit (
  input  logic scan_out,
  input  logic dec_sel,
  input  logic data_in,
  input  logic broadcast,
  output logic scan_in
);

  logic circ_bit;  // MUX2 output

  always_comb begin
    circ_bit = dec_sel ? ~scan_out : scan_out;
    scan_in  = broadcast ? data_in : circ_bit;
  end

endmodule
