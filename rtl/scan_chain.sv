// scan_chain: one scan chain of LEN scan cells.
//
// The cells are the flip-flops of the circuit under test, stitched into a
// chain. Cell 0 is the scan-input end (test slice 1), cell LEN-1 the
// scan-output end (test slice LEN). Per clock:
//   capture_en : every cell loads its functional input (the circuit response);
//   shift_en   : the chain shifts one place toward the scan output and cell 0
//                loads scan_in;
//   neither    : the cells hold.
// LEN shift cycles form one full rotation: with scan_in fed from scan_out the
// chain is back where it started, each bit having passed the scan output once.
//
// Interface: cells is the parallel view of the chain (it drives the circuit
// under test), scan_out equals cells[LEN-1]. Capture takes precedence over
// shift. The cells have no reset, as functional flip-flops used for scan
// usually do not; their contents are defined by loading a pattern.
//
// The chain itself (one column of the test matrix, output fed back to input)
// follows the design; the control signals and their priority are this
// implementation's choice.
module scan_chain #(
  parameter int unsigned LEN = 7
) (
  input  logic           clk,
  input  logic           shift_en,
  input  logic           capture_en,
  input  logic           scan_in,
  input  logic [LEN-1:0] capture_d,
  output logic [LEN-1:0] cells,
  output logic           scan_out
);

  always_ff @(posedge clk) begin
    if (capture_en) begin
      cells <= capture_d;
    end else if (shift_en) begin
      cells[0] <= scan_in;
      for (int unsigned i = 1; i < LEN; i++) cells[i] <= cells[i-1];
    end
  end

  assign scan_out = cells[LEN-1];

endmodule
