// tb_pcsa_nsc: the benchmark-shaped test sets of tb_pcsa_full at the two
// smaller chain counts the design is also evaluated with, 64 and 128 chains.
// Each circuit's flip-flops are cut into NUM_CHAINS chains of
// ceil(flip-flops / NUM_CHAINS) cells, so there are ten instances: five
// circuits at 64 chains (chains of 11 to 28 cells) and five at 128 chains (5 to
// 14 cells). Vectors and responses are random with each circuit's density of
// specified bits. Every vector is checked bit by bit after its rotations, the
// signature is checked at the end, and every mechanism must occur.
module tb_pcsa_nsc;
  localparam int unsigned NC = 5;           // circuits
  localparam int unsigned NE = 2 * NC;      // instances

  localparam int unsigned FLOPS   [NC] = '{700, 611, 1763, 1664, 1464};
  localparam int unsigned VECTORS [NC] = '{291, 190, 39, 294, 267};
  localparam int unsigned DENSITY [NC] = '{51, 108, 104, 137, 83};   // per mille

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bit          done     [NE];
  int unsigned checks_e [NE];
  int unsigned fails_e  [NE];
  int unsigned nb [NE], nc [NE], np [NE], nm [NE], nk [NE], ni [NE], ns [NE];
  longint unsigned rp [NE], ro [NE];

  for (genvar e = 0; e < NE; e++) begin : g_inst
    localparam int unsigned CIRC = e % NC;
    localparam int unsigned S    = (e < NC) ? 64 : 128;
    localparam int unsigned L    = $clog2(S);
    localparam int unsigned N    = (FLOPS[CIRC] + S - 1) / S;

    logic                  rst_n, shift_en, capture_en, broadcast, data_in;
    logic                  misr_clear, misr_en;
    logic [L-1:0][1:0]     scan_sel;
    logic [N-1:0][S-1:0]   resp_d, state_q;
    logic [S-1:0]          scan_out, signature;

    pcsa_top #(.NUM_CHAINS(S), .CHAIN_LEN(N)) dut (
      .clk, .rst_n, .shift_en, .capture_en, .broadcast, .data_in, .scan_sel,
      .misr_clear, .misr_en, .resp_d, .state_q, .scan_out, .signature
    );

    pcsa_ate_model #(.S(S), .N(N), .FLOPS(FLOPS[CIRC]), .NUM_VECTORS(VECTORS[CIRC]),
                     .P_PERMILLE(DENSITY[CIRC]), .NAME($sformatf("instance %0d", e))) ate (
      .clk, .rst_n, .shift_en, .capture_en, .broadcast, .data_in, .scan_sel,
      .misr_clear, .misr_en, .resp_d, .state_q, .scan_out, .signature,
      .done(done[e]), .checks(checks_e[e]), .failures(fails_e[e]),
      .n_broadcast(nb[e]), .n_capture(nc[e]), .n_parallel(np[e]), .n_multi_rot(nm[e]),
      .n_compensate(nk[e]), .n_idle(ni[e]), .n_misr(ns[e]),
      .rot_proposed(rp[e]), .rot_original(ro[e])
    );
  end

  function automatic bit all_done();
    foreach (done[e]) if (!done[e]) return 1'b0;
    return 1'b1;
  endfunction

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
      $display("%0d chains, circuit %0d (%0d flip-flops, %0d vectors): %0d rotations with the multiple-hot decoder, %0d with a one-hot decoder",
               (e < NC) ? 64 : 128, e % NC, FLOPS[e % NC], VECTORS[e % NC], rp[e], ro[e]);
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
    repeat (5000000) @(posedge clk);
    report(1'b1);
  end

  initial begin
    do @(posedge clk); while (!all_done());
    report(1'b0);
  end
endmodule
