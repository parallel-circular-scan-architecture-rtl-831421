// pcsa_ate_model: behavioural model of the tester, and of the circuit under
// test's response, for the parallel circular-scan architecture. Testbench use
// only; not synthesizable.
//
// For each test vector the model
//   1. compares the vector's specified bits with the chain contents (the
//      previous response) to get, per slice, the conflict bits (must flip) and
//      the agreeing specified bits (must not flip);
//   2. plans decoder addresses per slice with a greedy search: among all 3^L
//      addresses over {0, 1, d} it takes the one whose selected chains cover the
//      most conflict bits minus the agreeing bits they would spoil, applies it
//      to its copy of the slice and repeats until no conflict is left. A spoiled
//      bit becomes a conflict that a later address repairs;
//   3. rotates the chains once per planned address depth, driving in each cycle
//      the address planned for the slice at the chain outputs, or the empty
//      address when that slice has nothing left to do; the first rotation after
//      a capture also feeds the outgoing response into the signature register;
//   4. checks that every specified bit now holds its value and that the number
//      of shift cycles is the number of rotations times the chain length;
//   5. captures a response (random bits standing in for the circuit).
// The very first vector is loaded in broadcast mode, one bit per slice.
// EXAMPLE selects a worked example for the first vector:
//   1 (8 chains of 5 cells): the example response and next pattern, driven with
//     the printed addresses 11d, dd0, 101, ddd, 0d1: one rotation where a
//     one-hot decoder needs three;
//   2 (256 chains): a slice with 9 conflict bits and 8 agreeing bits (chain
//     lists below), placed in slice 1, repaired by the printed addresses
//     dddd0ddd, which fixes 7 conflicts and spoils the agreeing bit of chain
//     135, and then d0ddd11d, which fixes the rest: two rotations and 16 x 2 =
//     32 address bits, where a one-hot decoder needs nine rotations and
//     8 x 9 = 72 address bits. The slice is checked after each rotation.
// The model also keeps a reference signature and counts how often each
// mechanism happened. For the cost comparison it counts the rotations a
// one-hot decoder would need (the most conflicts in any slice per vector) and
// the tester bits spent on repairs either way: 2*L address bits per shift cycle
// here, L address bits plus one data bit per shift cycle with a one-hot
// decoder. It checks that no vector needs more rotations than the one-hot case.
module pcsa_ate_model
  import pcsa_pkg::*;
#(
  parameter  int unsigned S           = 8,
  parameter  int unsigned N           = 5,
  parameter  int unsigned FLOPS       = S * N,
  parameter  int unsigned NUM_VECTORS = 20,
  parameter  int unsigned P_PERMILLE  = 100,
  parameter  int unsigned EXAMPLE     = 0,
  parameter  string       NAME        = "pcsa",
  localparam int unsigned L           = (S > 1) ? $clog2(S) : 1
) (
  input  logic                  clk,
  output logic                  rst_n,
  output logic                  shift_en,
  output logic                  capture_en,
  output logic                  broadcast,
  output logic                  data_in,
  output logic [L-1:0][1:0]     scan_sel,
  output logic                  misr_clear,
  output logic                  misr_en,
  output logic [N-1:0][S-1:0]   resp_d,
  input  logic [N-1:0][S-1:0]   state_q,
  input  logic [S-1:0]          scan_out,
  input  logic [S-1:0]          signature,
  output bit                    done,
  output int unsigned           checks,
  output int unsigned           failures,
  output int unsigned           n_broadcast,
  output int unsigned           n_capture,
  output int unsigned           n_parallel,
  output int unsigned           n_multi_rot,
  output int unsigned           n_compensate,
  output int unsigned           n_idle,
  output int unsigned           n_misr,
  output longint unsigned       rot_proposed,
  output longint unsigned       rot_original
);

  typedef logic [S-1:0]      row_t;
  typedef logic [L-1:0][1:0] addr_t;

  localparam addr_t EMPTY = '0;

  int unsigned ncfg;
  row_t        cfg_sel  [];
  addr_t       cfg_addr [];
  row_t        t_care [N];
  row_t        t_val  [N];
  addr_t       plan   [N][$];
  row_t        misr_ref;
  longint unsigned shift_seen;

  // 256-chain example slice: chains holding a conflict bit and chains holding
  // an agreeing specified bit.
  localparam int EX2_CONFLICT [9] = '{130, 129, 128, 86, 71, 69, 67, 63, 62};
  localparam int EX2_AGREE    [8] = '{135, 127, 125, 78, 77, 75, 74, 72};
  // Tester bits spent on repairing conflicts. This architecture: 2*L address
  // pins in every shift cycle. One-hot decoder with the data pin: L address
  // pins plus the data pin in every shift cycle, for as many rotations as the
  // worst slice has conflicts.
  longint unsigned vol_proposed;
  longint unsigned vol_original;

  initial begin
    rst_n = 1'b0; shift_en = 1'b0; capture_en = 1'b0; broadcast = 1'b0;
    data_in = 1'b0; scan_sel = EMPTY; misr_clear = 1'b1; misr_en = 1'b0;
    resp_d = '0; done = 1'b0; checks = 0; failures = 0;
    n_broadcast = 0; n_capture = 0; n_parallel = 0; n_multi_rot = 0;
    n_compensate = 0; n_idle = 0; n_misr = 0; rot_proposed = 0; rot_original = 0;
    shift_seen = 0; vol_proposed = 0; vol_original = 0;
  end

  always @(posedge clk) if (shift_en) shift_seen++;

  function automatic void fail(string msg);
    failures++;
    $display("FAIL [%s] %s", NAME, msg);
  endfunction

  task automatic cycle();
    @(posedge clk);
    #1;
  endtask

  // Reference signature: Galois form, feedback exponents listed per width.
  task automatic misr_ref_step(row_t d);
    bit top;
    int taps [$];
    case (S)
      8:       taps = '{6, 5, 4, 0};
      16:      taps = '{15, 13, 4, 0};
      64:      taps = '{63, 61, 60, 0};
      128:     taps = '{126, 101, 99, 0};
      256:     taps = '{254, 251, 246, 0};
      default: taps = '{};
    endcase
    top = misr_ref[S-1];
    misr_ref = misr_ref << 1;
    if (top) foreach (taps[i]) misr_ref[taps[i]] ^= 1'b1;
    misr_ref ^= d;
  endtask

  // All decoder addresses over {0, 1, d} with the chains each one selects.
  task automatic build_table();
    ncfg = 1;
    for (int k = 0; k < L; k++) ncfg *= 3;
    cfg_sel  = new[ncfg];
    cfg_addr = new[ncfg];
    for (int unsigned i = 0; i < ncfg; i++) begin
      int unsigned x;
      row_t sel;
      addr_t a;
      x = i;
      sel = '1;
      for (int k = 0; k < L; k++) begin
        case (x % 3)
          0: begin
            a[k] = PC_ZERO;
            for (int c = 0; c < S; c++) if (((c >> k) & 1) != 0) sel[c] = 1'b0;
          end
          1: begin
            a[k] = PC_ONE;
            for (int c = 0; c < S; c++) if (((c >> k) & 1) == 0) sel[c] = 1'b0;
          end
          default: a[k] = PC_DC;
        endcase
        x /= 3;
      end
      cfg_sel[i]  = sel;
      cfg_addr[i] = a;
    end
  endtask

  function automatic row_t addr_sel(addr_t a);
    row_t sel;
    for (int c = 0; c < S; c++) begin
      bit ok;
      ok = 1'b1;
      for (int k = 0; k < L; k++) begin
        if (((c >> k) & 1) != 0) ok &= (pc_sym_e'(a[k]) == PC_ONE  || pc_sym_e'(a[k]) == PC_DC);
        else                     ok &= (pc_sym_e'(a[k]) == PC_ZERO || pc_sym_e'(a[k]) == PC_DC);
      end
      sel[c] = ok;
    end
    return sel;
  endfunction

  // Greedy address plan for one slice; returns the number of addresses.
  function automatic int plan_slice(int r, row_t c_one, row_t c_zero);
    plan[r].delete();
    while (c_one != '0) begin
      int   best;
      int   best_score;
      row_t sel;
      best = -1;
      best_score = -(S + 1);
      for (int unsigned i = 0; i < ncfg; i++) begin
        int score;
        if ((cfg_sel[i] & c_one) == '0) continue;
        score = $countones(cfg_sel[i] & c_one) - $countones(cfg_sel[i] & c_zero);
        if (score > best_score) begin
          best_score = score;
          best = int'(i);
        end
      end
      sel = cfg_sel[best];
      if ((sel & c_zero) != '0) n_compensate++;
      plan[r].push_back(cfg_addr[best]);
      {c_one, c_zero} = {(c_one & ~sel) | (c_zero & sel), (c_zero & ~sel) | (c_one & sel)};
      if (plan[r].size() > S) begin
        fail($sformatf("slice %0d: plan does not converge", r));
        break;
      end
    end
    return plan[r].size();
  endfunction

  function automatic addr_t parse_addr(string s);
    addr_t a;
    for (int k = 0; k < L; k++) begin
      case (s[L-1-k])
        "0":     a[k] = PC_ZERO;
        "1":     a[k] = PC_ONE;
        default: a[k] = PC_DC;
      endcase
    end
    return a;
  endfunction

  // Text row, chain S-1 first, of '0', '1' and 'x'.
  task automatic parse_row(string s, output row_t care, output row_t val);
    for (int c = 0; c < S; c++) begin
      care[c] = (s[S-1-c] != "x");
      val[c]  = (s[S-1-c] == "1");
    end
  endtask

  task automatic random_vector();
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < S; c++) begin
        t_care[r][c] = (r * S + c < FLOPS) && ($urandom_range(0, 999) < P_PERMILLE);
        t_val[r][c]  = bit'($urandom_range(0, 1));
      end
    end
  endtask

  task automatic capture(logic [N-1:0][S-1:0] resp);
    resp_d = resp;
    capture_en = 1'b1;
    cycle();
    capture_en = 1'b0;
    n_capture++;
    checks++;
    if (state_q !== resp) fail("capture did not load the response");
  endtask

  task automatic random_capture();
    logic [N-1:0][S-1:0] resp;
    for (int r = 0; r < N; r++) for (int c = 0; c < S; c++) resp[r][c] = bit'($urandom_range(0, 1));
    capture(resp);
  endtask

  // Rotate the chains `rotations` times applying the plans. The first rotation
  // feeds the signature register.
  task automatic rotate(int rotations);
    longint unsigned start;
    start = shift_seen;
    for (int q = 0; q < rotations; q++) begin
      for (int c = 0; c < N; c++) begin
        int   row;
        row_t sel;
        row = N - 1 - c;
        if (q < plan[row].size()) begin
          scan_sel = plan[row][q];
          sel = addr_sel(scan_sel);
          if ($countones(sel) > 1) n_parallel++;
        end else begin
          scan_sel = EMPTY;
          n_idle++;
        end
        shift_en = 1'b1;
        misr_en  = (q == 0);
        if (misr_en) begin
          misr_ref_step(scan_out);
          n_misr++;
        end
        cycle();
      end
    end
    shift_en = 1'b0;
    misr_en  = 1'b0;
    scan_sel = EMPTY;
    checks++;
    if (shift_seen - start != longint'(rotations) * N)
      fail($sformatf("%0d shift cycles for %0d rotations", shift_seen - start, rotations));
  endtask

  task automatic check_pattern(int v);
    for (int r = 0; r < N; r++) begin
      checks++;
      if (((state_q[r] ^ t_val[r]) & t_care[r]) != '0)
        fail($sformatf("vector %0d slice %0d: %b, wanted %b where %b", v, r + 1,
                       state_q[r], t_val[r], t_care[r]));
    end
  endtask

  initial begin
    logic [N-1:0] col;
    int           rotations;
    int           kmax;

    build_table();
    misr_ref = '0;
    cycle();
    cycle();
    rst_n      = 1'b1;
    misr_clear = 1'b0;
    checks++;
    if (signature !== '0) fail("signature not cleared");

    // First vector: one bit per slice, broadcast to every chain.
    for (int r = 0; r < N; r++) col[r] = bit'($urandom_range(0, 1));
    broadcast = 1'b1;
    shift_en  = 1'b1;
    for (int i = 0; i < N; i++) begin
      data_in = col[N-1-i];
      cycle();
    end
    broadcast = 1'b0;
    shift_en  = 1'b0;
    n_broadcast++;
    for (int r = 0; r < N; r++) begin
      checks++;
      if (state_q[r] !== {S{col[r]}}) fail($sformatf("broadcast slice %0d: %b", r + 1, state_q[r]));
    end

    // Response of the first vector.
    if (EXAMPLE == 1) begin
      logic [N-1:0][S-1:0] resp;
      row_t dummy;
      parse_row("10111000", dummy, resp[0]);
      parse_row("10001110", dummy, resp[1]);
      parse_row("01001100", dummy, resp[2]);
      parse_row("01111010", dummy, resp[3]);
      parse_row("01110011", dummy, resp[4]);
      capture(resp);
    end else begin
      random_capture();
    end

    for (int v = 0; v < NUM_VECTORS; v++) begin
      if (EXAMPLE == 2 && v == 0) begin
        // Specified bits of slice 1 only; a conflict bit is the inverse of the
        // captured bit, an agreeing bit equals it.
        foreach (t_care[r]) begin t_care[r] = '0; t_val[r] = '0; end
        foreach (EX2_CONFLICT[i]) begin
          t_care[0][EX2_CONFLICT[i]] = 1'b1;
          t_val[0][EX2_CONFLICT[i]]  = ~state_q[0][EX2_CONFLICT[i]];
        end
        foreach (EX2_AGREE[i]) begin
          t_care[0][EX2_AGREE[i]] = 1'b1;
          t_val[0][EX2_AGREE[i]]  = state_q[0][EX2_AGREE[i]];
        end
      end else if (EXAMPLE == 1 && v == 0) begin
        parse_row("01xx1xxx", t_care[0], t_val[0]);
        parse_row("x1xxxxx1", t_care[1], t_val[1]);
        parse_row("xx1xxx0x", t_care[2], t_val[2]);
        parse_row("xx0xx10x", t_care[3], t_val[3]);
        parse_row("0xxx1x01", t_care[4], t_val[4]);
      end else begin
        random_vector();
      end

      rotations = 0;
      kmax = 0;
      for (int r = 0; r < N; r++) begin
        row_t c_one, c_zero;
        int   depth;
        c_one  = (state_q[r] ^ t_val[r]) & t_care[r];
        c_zero = ~(state_q[r] ^ t_val[r]) & t_care[r];
        if ($countones(c_one) > kmax) kmax = $countones(c_one);
        depth = plan_slice(r, c_one, c_zero);
        if (depth > rotations) rotations = depth;
      end

      if (EXAMPLE == 1 && v == 0) begin
        // The greedy plan needs one address per slice, as in the example, and
        // a one-hot decoder would need three rotations (slice 4).
        checks += 2;
        if (rotations != 1) fail($sformatf("example planned %0d rotations, expected 1", rotations));
        if (kmax != 3) fail($sformatf("example has %0d conflicts in its worst slice, expected 3", kmax));
        // Drive the printed addresses rather than the planned ones.
        plan[0].delete(); plan[0].push_back(parse_addr("11d"));
        plan[1].delete(); plan[1].push_back(parse_addr("dd0"));
        plan[2].delete(); plan[2].push_back(parse_addr("101"));
        plan[3].delete(); plan[3].push_back(parse_addr("ddd"));
        plan[4].delete(); plan[4].push_back(parse_addr("0d1"));
      end

      // Each greedy address removes at least one conflict, so no slice needs
      // more addresses than it has conflicts.
      checks++;
      if (rotations > kmax) fail($sformatf("vector %0d: %0d rotations for at most %0d conflicts per slice",
                                           v, rotations, kmax));
      vol_proposed += longint'(rotations) * N * 2 * L;
      vol_original += longint'(kmax) * N * (L + 1);
      if (rotations > 1) n_multi_rot++;
      // At least one rotation, so that the response is observed.
      if (rotations == 0) rotations = 1;
      rot_proposed += longint'(rotations);
      rot_original += longint'((kmax > 0) ? kmax : 1);
      if (EXAMPLE == 2 && v == 0) begin
        row_t left;
        checks += 4;
        if (rotations != 2) fail($sformatf("example planned %0d rotations, expected 2", rotations));
        if (kmax != 9) fail($sformatf("example has %0d conflicts, expected 9", kmax));
        if (2 * L * rotations != 32) fail("example address bits differ from 32");
        if (L * kmax != 72) fail("one-hot address bits differ from 72");
        // First printed address: after it only chains 135 (spoiled), 63, 62
        // conflict.
        foreach (plan[r]) plan[r].delete();
        plan[0].push_back(parse_addr("dddd0ddd"));
        rotate(1);
        left = (state_q[0] ^ t_val[0]) & t_care[0];
        checks++;
        if (left != ((row_t'(1) << 135) | (row_t'(1) << 63) | (row_t'(1) << 62)))
          fail($sformatf("example: conflicts after the first address %h", left));
        plan[0].delete();
        plan[0].push_back(parse_addr("d0ddd11d"));
        rotate(1);
      end else begin
        rotate(rotations);
      end
      check_pattern(v);
      random_capture();
    end

    // Observe the last response.
    for (int r = 0; r < N; r++) plan[r].delete();
    rotate(1);
    checks++;
    if (S == 8 || S == 16 || S == 64 || S == 128 || S == 256) begin
      if (signature !== misr_ref) fail($sformatf("signature %h, expected %h", signature, misr_ref));
    end
    $display("[%s] %0d chains x %0d cells, %0d vectors: repair rotations %0d (one-hot decoder %0d), repair data %0d bits (one-hot decoder with data pin %0d), first vector %0d bits",
             NAME, S, N, NUM_VECTORS, rot_proposed, rot_original, vol_proposed, vol_original, N);
    done = 1'b1;
  end

endmodule
