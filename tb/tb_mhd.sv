// tb_mhd: self-checking testbench of the multiple-hot decoder.
//
// Checks, on an 8-output decoder, the five addresses of the worked example
// (11d, dd0, 101, ddd, 0d1) against their printed outputs, then every one of
// the 4^3 symbol combinations; on the default 256-output decoder, random
// addresses, the all-don't-care address, fully specified addresses and
// addresses holding an empty symbol. The reference decides each output by
// comparing the symbol with the named enum values, not by the bit fields.
module tb_mhd;
  import pcsa_pkg::*;

  localparam int unsigned SMALL_N = 8;
  localparam int unsigned SMALL_W = 3;
  localparam int unsigned BIG_N   = 256;
  localparam int unsigned BIG_W   = 8;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [SMALL_W-1:0][1:0] addr_s;
  logic [SMALL_N-1:0]      sel_s;
  logic [BIG_W-1:0][1:0]   addr_b;
  logic [BIG_N-1:0]        sel_b;

  mhd #(.NUM_OUT(SMALL_N)) u_small (.addr(addr_s), .sel(sel_s));
  mhd                      u_big   (.addr(addr_b), .sel(sel_b));

  // Does symbol s accept address bit value b?
  function automatic bit sym_accepts(logic [1:0] s, bit b);
    case (pc_sym_e'(s))
      PC_DC:   return 1'b1;
      PC_ONE:  return b;
      PC_ZERO: return !b;
      default: return 1'b0;
    endcase
  endfunction

  // Text address, MSB first, of '0', '1', 'd' and 'e' (empty) characters.
  function automatic logic [SMALL_W-1:0][1:0] parse_small(string s);
    logic [SMALL_W-1:0][1:0] a;
    for (int k = 0; k < SMALL_W; k++) begin
      case (s[SMALL_W-1-k])
        "0":     a[k] = PC_ZERO;
        "1":     a[k] = PC_ONE;
        "d":     a[k] = PC_DC;
        default: a[k] = PC_NONE;
      endcase
    end
    return a;
  endfunction

  task automatic check_small(string what, logic [SMALL_N-1:0] expect_sel);
    #1;
    checks++;
    if (sel_s !== expect_sel) begin
      failures++;
      $display("FAIL %s: sel=%b expected %b", what, sel_s, expect_sel);
    end
  endtask

  task automatic check_big(string what);
    logic [BIG_N-1:0] ref_sel;
    #1;
    for (int i = 0; i < BIG_N; i++) begin
      bit ok;
      ok = 1'b1;
      for (int k = 0; k < BIG_W; k++) ok &= sym_accepts(addr_b[k], bit'((i >> k) & 1));
      ref_sel[i] = ok;
    end
    checks++;
    if (sel_b !== ref_sel) begin
      failures++;
      $display("FAIL %s: sel=%h expected %h", what, sel_b, ref_sel);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_b = '0;
    // Worked example: addresses and printed decoder outputs (sel[7] first).
    addr_s = parse_small("11d"); check_small("11d", 8'b11000000);
    addr_s = parse_small("dd0"); check_small("dd0", 8'b01010101);
    addr_s = parse_small("101"); check_small("101", 8'b00100000);
    addr_s = parse_small("ddd"); check_small("ddd", 8'b11111111);
    addr_s = parse_small("0d1"); check_small("0d1", 8'b00001010);
    addr_s = parse_small("1e0"); check_small("1e0", 8'b00000000);

    // Every symbol combination on the small decoder.
    for (int combo = 0; combo < (1 << (2 * SMALL_W)); combo++) begin
      logic [SMALL_N-1:0] ref_sel;
      addr_s = (2 * SMALL_W)'(combo);
      for (int i = 0; i < SMALL_N; i++) begin
        bit ok;
        ok = 1'b1;
        for (int k = 0; k < SMALL_W; k++) ok &= sym_accepts(addr_s[k], bit'((i >> k) & 1));
        ref_sel[i] = ok;
      end
      check_small($sformatf("combo %0d", combo), ref_sel);
    end

    // Default-size decoder.
    for (int k = 0; k < BIG_W; k++) addr_b[k] = PC_DC;
    check_big("all d");
    checks++;
    if (sel_b !== '1) begin failures++; $display("FAIL all-d does not select all"); end
    for (int a = 0; a < BIG_N; a++) begin
      for (int k = 0; k < BIG_W; k++) addr_b[k] = ((a >> k) & 1) != 0 ? PC_ONE : PC_ZERO;
      #1;
      checks++;
      if (sel_b !== (BIG_N'(1) << a)) begin
        failures++;
        $display("FAIL specified address %0d: sel=%h", a, sel_b);
      end
    end
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < BIG_W; k++) begin
        // mostly real symbols, sometimes the empty one
        addr_b[k] = ($urandom_range(0, 15) == 0) ? PC_NONE : 2'($urandom_range(1, 3));
      end
      check_big($sformatf("random %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
