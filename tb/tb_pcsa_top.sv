// tb_pcsa_top: end-to-end testbench of the parallel circular-scan architecture.
//
// Two reduced instances run side by side, each driven by the tester model
// (pcsa_ate_model):
//   * 8 chains of 5 cells: the worked example first (captured response, next
//     pattern, the five printed decoder addresses, one rotation), then random
//     vectors;
//   * 16 chains of 6 cells with dense specified bits, so that slices need
//     several addresses and several rotations, and some addresses spoil an
//     agreeing bit that a later rotation repairs.
// Every vector is checked bit by bit after its rotations, as are captures,
// broadcast loads, shift-cycle counts and the final signature. Each mechanism
// (broadcast load, capture, parallel update of several chains, empty address,
// multi-rotation vector, repair of a spoiled bit, signature compaction) must
// occur at least once or a failure is counted.
module tb_pcsa_top;
  localparam int unsigned NE = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bit          done     [NE];
  int unsigned checks_e [NE];
  int unsigned fails_e  [NE];
  int unsigned nb [NE], nc [NE], np [NE], nm [NE], nk [NE], ni [NE], ns [NE];
  longint unsigned rp [NE], ro [NE];

  // ---- instance 0: 8 x 5, worked example -------------------------------
  logic          rst_n0, shift0, cap0, bc0, din0, mclr0, men0;
  logic [2:0][1:0] sel0;
  logic [4:0][7:0] resp0, state0;
  logic [7:0]    sout0, sig0;

  pcsa_top #(.NUM_CHAINS(8), .CHAIN_LEN(5)) dut0 (
    .clk, .rst_n(rst_n0), .shift_en(shift0), .capture_en(cap0), .broadcast(bc0),
    .data_in(din0), .scan_sel(sel0), .misr_clear(mclr0), .misr_en(men0),
    .resp_d(resp0), .state_q(state0), .scan_out(sout0), .signature(sig0)
  );

  pcsa_ate_model #(.S(8), .N(5), .NUM_VECTORS(40), .P_PERMILLE(300),
                   .EXAMPLE(1), .NAME("8x5")) ate0 (
    .clk, .rst_n(rst_n0), .shift_en(shift0), .capture_en(cap0), .broadcast(bc0),
    .data_in(din0), .scan_sel(sel0), .misr_clear(mclr0), .misr_en(men0),
    .resp_d(resp0), .state_q(state0), .scan_out(sout0), .signature(sig0),
    .done(done[0]), .checks(checks_e[0]), .failures(fails_e[0]),
    .n_broadcast(nb[0]), .n_capture(nc[0]), .n_parallel(np[0]), .n_multi_rot(nm[0]),
    .n_compensate(nk[0]), .n_idle(ni[0]), .n_misr(ns[0]),
    .rot_proposed(rp[0]), .rot_original(ro[0])
  );

  // ---- instance 1: 16 x 6, dense -----------------------------------------
  logic          rst_n1, shift1, cap1, bc1, din1, mclr1, men1;
  logic [3:0][1:0] sel1;
  logic [5:0][15:0] resp1, state1;
  logic [15:0]   sout1, sig1;

  pcsa_top #(.NUM_CHAINS(16), .CHAIN_LEN(6)) dut1 (
    .clk, .rst_n(rst_n1), .shift_en(shift1), .capture_en(cap1), .broadcast(bc1),
    .data_in(din1), .scan_sel(sel1), .misr_clear(mclr1), .misr_en(men1),
    .resp_d(resp1), .state_q(state1), .scan_out(sout1), .signature(sig1)
  );

  pcsa_ate_model #(.S(16), .N(6), .FLOPS(90), .NUM_VECTORS(60), .P_PERMILLE(500),
                   .NAME("16x6")) ate1 (
    .clk, .rst_n(rst_n1), .shift_en(shift1), .capture_en(cap1), .broadcast(bc1),
    .data_in(din1), .scan_sel(sel1), .misr_clear(mclr1), .misr_en(men1),
    .resp_d(resp1), .state_q(state1), .scan_out(sout1), .signature(sig1),
    .done(done[1]), .checks(checks_e[1]), .failures(fails_e[1]),
    .n_broadcast(nb[1]), .n_capture(nc[1]), .n_parallel(np[1]), .n_multi_rot(nm[1]),
    .n_compensate(nk[1]), .n_idle(ni[1]), .n_misr(ns[1]),
    .rot_proposed(rp[1]), .rot_original(ro[1])
  );

  task automatic report(bit timed_out);
    int unsigned checks, failures;
    int unsigned t_nb, t_nc, t_np, t_nm, t_nk, t_ni, t_ns;
    checks = 0; failures = 0;
    t_nb = 0; t_nc = 0; t_np = 0; t_nm = 0; t_nk = 0; t_ni = 0; t_ns = 0;
    for (int e = 0; e < NE; e++) begin
      checks += checks_e[e];
      failures += fails_e[e];
      t_nb += nb[e]; t_nc += nc[e]; t_np += np[e]; t_nm += nm[e];
      t_nk += nk[e]; t_ni += ni[e]; t_ns += ns[e];
      $display("instance %0d: rotations %0d with the multiple-hot decoder, %0d with a one-hot decoder",
               e, rp[e], ro[e]);
    end
    $display("mechanisms: broadcast=%0d capture=%0d parallel=%0d multi_rotation=%0d repair=%0d empty_address=%0d misr=%0d",
             t_nb, t_nc, t_np, t_nm, t_nk, t_ni, t_ns);
    checks += 7;
    if (t_nb == 0) begin failures++; $display("FAIL no broadcast load"); end
    if (t_nc == 0) begin failures++; $display("FAIL no capture"); end
    if (t_np == 0) begin failures++; $display("FAIL no parallel update"); end
    if (t_nm == 0) begin failures++; $display("FAIL no multi-rotation vector"); end
    if (t_nk == 0) begin failures++; $display("FAIL no repaired spoiled bit"); end
    if (t_ni == 0) begin failures++; $display("FAIL no empty address"); end
    if (t_ns == 0) begin failures++; $display("FAIL no signature compaction"); end
    if (timed_out) begin failures++; $display("FAIL watchdog expired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    report(1'b1);
  end

  initial begin
    wait (done[0] && done[1]);
    report(1'b0);
  end
endmodule
