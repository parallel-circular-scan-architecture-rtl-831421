// pcsa_top: parallel circular-scan architecture.
//
// The scan flip-flops of the circuit under test form NUM_CHAINS parallel
// chains of CHAIN_LEN cells, seen as a CHAIN_LEN x NUM_CHAINS test matrix:
// row r is test slice r+1, column c is chain c. Each chain's output is fed
// back to its own input, so after a capture the response is itself the
// starting point for the next test vector. Only the specified bits of the next
// vector that disagree with the response (the conflict bits) must change.
//
// They are changed as the slice that holds them passes the chain outputs: the
// tester puts a multiple-hot decoder address on scan_sel, the decoder raises
// the select of every chain whose index matches the address, and each selected
// chain's selection unit feeds its output bit back inverted. Because the
// address may hold don't-care symbols, many chains (and so many conflict bits
// of one slice) are corrected in the same clock. A slice whose conflicts need
// several addresses gets one per full rotation; slices already correct get the
// empty address, which selects nothing.
//
// Operation, one clock per step:
//   broadcast=1, shift_en=1 : data_in is shifted into every chain (first vector,
//                             CHAIN_LEN bits for the whole matrix);
//   shift_en=1              : rotate one place; the slice at the chain outputs
//                             (row CHAIN_LEN-1-c in the c-th cycle of a
//                             rotation) is corrected under scan_sel;
//   capture_en=1            : all cells load the response resp_d;
//   misr_en=1 (with shift)  : the scan outputs are compacted into signature.
// scan_sel is a vector of 2-bit positional-cube symbols, symbol k for address
// bit k (0 = 2'b10, 1 = 2'b01, d = 2'b11, empty = 2'b00): 2*log2(NUM_CHAINS)
// pins. state_q is the current matrix, which drives the circuit under test;
// resp_d comes back from it. Neither circuit nor tester is part of this RTL.
//
// The chain organisation, the decoder, the per-chain selection unit with its
// inverting path and broadcast input, and the MISR on the outputs follow the
// design, as do the defaults (256 chains of 7 cells). Control signal names,
// polarities, priorities and the MISR's insides are this implementation's.
module pcsa_top #(
  parameter  int unsigned NUM_CHAINS = 256,
  parameter  int unsigned CHAIN_LEN  = 7,
  localparam int unsigned ADDR_W     = (NUM_CHAINS > 1) ? $clog2(NUM_CHAINS) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // tester control
  input  logic                                  shift_en,
  input  logic                                  capture_en,
  input  logic                                  broadcast,
  input  logic                                  data_in,
  input  logic [ADDR_W-1:0][1:0]                scan_sel,
  input  logic                                  misr_clear,
  input  logic                                  misr_en,
  // circuit under test
  input  logic [CHAIN_LEN-1:0][NUM_CHAINS-1:0]  resp_d,
  output logic [CHAIN_LEN-1:0][NUM_CHAINS-1:0]  state_q,
  // observation
  output logic [NUM_CHAINS-1:0]                 scan_out,
  output logic [NUM_CHAINS-1:0]                 signature
);

  logic [NUM_CHAINS-1:0] dec_sel;
  logic [NUM_CHAINS-1:0] scan_in;

  mhd #(.NUM_OUT(NUM_CHAINS)) u_mhd (
    .addr (scan_sel),
    .sel  (dec_sel)
  );

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    logic [CHAIN_LEN-1:0] col_d;
    logic [CHAIN_LEN-1:0] col_q;

    for (genvar r = 0; r < CHAIN_LEN; r++) begin : g_row
      assign col_d[r]      = resp_d[r][c];
      assign state_q[r][c] = col_q[r];
    end

    scan_sel_unit u_sel (
      .scan_out  (scan_out[c]),
      .dec_sel   (dec_sel[c]),
      .data_in   (data_in),
      .broadcast (broadcast),
      .scan_in   (scan_in[c])
    );

    scan_chain #(.LEN(CHAIN_LEN)) u_chain (
      .clk        (clk),
      .shift_en   (shift_en),
      .capture_en (capture_en),
      .scan_in    (scan_in[c]),
      .capture_d  (col_d),
      .cells      (col_q),
      .scan_out   (scan_out[c])
    );
  end

  misr #(.WIDTH(NUM_CHAINS)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (misr_clear),
    .en    (misr_en),
    .d     (scan_out),
    .sig   (signature)
  );

  // Capture and shift are separate test phases.
  a_capture_xor_shift: assert property (@(posedge clk) disable iff (!rst_n)
    !(capture_en && shift_en));
  // The signature only compacts bits that are moving past the outputs.
  a_misr_on_shift: assert property (@(posedge clk) disable iff (!rst_n)
    misr_en |-> shift_en);

endmodule
