// tb_pcsa_full: the architecture at its full default size (256 chains of 7
// cells) running test sets shaped like the five benchmark circuits the design
// is evaluated on. Each circuit gets its own instance, side by side:
//
//   circuit  flip-flops  vectors  specified bits
//   s13207      700        291        5.1 %
//   s15850      611        190       10.8 %
//   s35932     1763         39       10.4 %
//   s38417     1664        294       13.7 %
//   s38584     1464        267        8.3 %
//
// The flip-flops fill the 256 x 7 matrix from slice 1 on; cells past the
// circuit's flip-flop count are never specified. A sixth instance first
// replays the 256-chain worked example bit by bit, then runs random vectors. Vector contents and responses
// are random with the given density of specified bits (the real test sets and
// circuits are not part of this RTL), so the rotation counts printed at the end
// show the trend, not the published figures. Every vector is checked bit by bit
// after its rotations, and every mechanism must occur at least once.
module tb_pcsa_full;
  localparam int unsigned NE = 6;
  localparam int unsigned S  = 256;
  localparam int unsigned N  = 7;
  localparam int unsigned L  = 8;

  // Instance 5 replays the 256-chain worked example (a slice with 9 conflict
  // bits repaired by two printed addresses), then runs further random vectors
  // over the whole matrix.
  localparam int unsigned FLOPS   [NE] = '{700, 611, 1763, 1664, 1464, 1792};
  localparam int unsigned VECTORS [NE] = '{291, 190, 39, 294, 267, 20};
  localparam int unsigned DENSITY [NE] = '{51, 108, 104, 137, 83, 137};   // per mille

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bit          done     [NE];
  int unsigned checks_e [NE];
  int unsigned fails_e  [NE];
  int unsigned nb [NE], nc [NE], np [NE], nm [NE], nk [NE], ni [NE], ns [NE];
  longint unsigned rp [NE], ro [NE];

  for (genvar e = 0; e < NE; e++) begin : g_circuit
    logic                  rst_n, shift_en, capture_en, broadcast, data_in;
    logic                  misr_clear, misr_en;
    logic [L-1:0][1:0]     scan_sel;
    logic [N-1:0][S-1:0]   resp_d, state_q;
    logic [S-1:0]          scan_out, signature;

    pcsa_top dut (
      .clk, .rst_n, .shift_en, .capture_en, .broadcast, .data_in, .scan_sel,
      .misr_clear, .misr_en, .resp_d, .state_q, .scan_out, .signature
    );

    pcsa_ate_model #(.S(S), .N(N), .FLOPS(FLOPS[e]), .NUM_VECTORS(VECTORS[e]),
                     .P_PERMILLE(DENSITY[e]), .EXAMPLE((e == 5) ? 2 : 0),
                     .NAME($sformatf("instance %0d", e))) ate (
      .clk, .rst_n, .shift_en, .capture_en, .broadcast, .data_in, .scan_sel,
      .misr_clear, .misr_en, .resp_d, .state_q, .scan_out, .signature,
      .done(done[e]), .checks(checks_e[e]), .failures(fails_e[e]),
      .n_broadcast(nb[e]), .n_capture(nc[e]), .n_parallel(np[e]), .n_multi_rot(nm[e]),
      .n_compensate(nk[e]), .n_idle(ni[e]), .n_misr(ns[e]),
      .rot_proposed(rp[e]), .rot_original(ro[e])
    );
  end

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
      $display("instance %0d (%0d flip-flops, %0d vectors): %0d rotations with the multiple-hot decoder, %0d with a one-hot decoder",
               e, FLOPS[e], VECTORS[e], rp[e], ro[e]);
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
    repeat (2000000) @(posedge clk);
    report(1'b1);
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    report(1'b0);
  end
endmodule
