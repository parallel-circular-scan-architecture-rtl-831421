// tb_misr: self-checking testbench of the signature register.
//
// The reference treats the signature as a polynomial over GF(2): each enabled
// clock multiplies it by x, reduces it modulo the feedback polynomial and adds
// the input word. It is evaluated bit by bit from the list of polynomial
// exponents, independently of the register's shift-and-mask form. The test
// checks reset, clear, hold, random compaction at the default width of 256 and
// at width 8, and that a single flipped input bit changes the signature.
module tb_misr;
  localparam int unsigned W     = 256;
  localparam int unsigned W8    = 8;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n = 1'b0;
  logic          clear = 1'b0;
  logic          en    = 1'b0;
  logic [W-1:0]  d     = '0;
  logic [W-1:0]  sig;
  logic [W8-1:0] d8    = '0;
  logic [W8-1:0] sig8;

  misr                u_misr  (.clk, .rst_n, .clear, .en, .d(d), .sig(sig));
  misr #(.WIDTH(W8))  u_misr8 (.clk, .rst_n, .clear, .en, .d(d8), .sig(sig8));

  // Exponents (other than the leading one) of the feedback polynomials:
  // x^256 + x^254 + x^251 + x^246 + 1 and x^8 + x^6 + x^5 + x^4 + 1.
  int exps256 [4] = '{254, 251, 246, 0};
  int exps8   [4] = '{6, 5, 4, 0};

  bit ref256 [W];
  bit ref8   [W8];

  task automatic ref_step();
    bit top;
    bit nxt [W];
    bit nxt8 [W8];
    top = ref256[W-1];
    nxt[0] = 1'b0;
    for (int i = 1; i < W; i++) nxt[i] = ref256[i-1];
    foreach (exps256[e]) if (top) nxt[exps256[e]] ^= 1'b1;
    for (int i = 0; i < W; i++) ref256[i] = nxt[i] ^ d[i];
    top = ref8[W8-1];
    nxt8[0] = 1'b0;
    for (int i = 1; i < W8; i++) nxt8[i] = ref8[i-1];
    foreach (exps8[e]) if (top) nxt8[exps8[e]] ^= 1'b1;
    for (int i = 0; i < W8; i++) ref8[i] = nxt8[i] ^ d8[i];
  endtask

  task automatic compare(string what);
    bit bad;
    bad = 1'b0;
    for (int i = 0; i < W; i++) if (sig[i] !== ref256[i]) bad = 1'b1;
    for (int i = 0; i < W8; i++) if (sig8[i] !== ref8[i]) bad = 1'b1;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s: sig=%h sig8=%h", what, sig, sig8);
    end
  endtask

  task automatic clock(bit do_clear, bit do_en);
    clear = do_clear;
    en    = do_en;
    for (int i = 0; i < W; i++) d[i] = bit'($urandom_range(0, 1));
    d8 = W8'($urandom);
    @(posedge clk);
    if (!rst_n || do_clear) begin
      foreach (ref256[i]) ref256[i] = 1'b0;
      foreach (ref8[i]) ref8[i] = 1'b0;
    end else if (do_en) begin
      ref_step();
    end
    #1;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] sig_a;
    clock(1'b0, 1'b1);              // in reset
    compare("reset");
    checks++;
    if (sig !== '0) begin failures++; $display("FAIL reset not zero"); end
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int r;
      r = $urandom_range(0, 19);
      clock(r == 0, r > 3);
      compare($sformatf("cycle %0d", t));
    end
    // Long run of feedback-only steps: exercises the polynomial on its own.
    for (int t = 0; t < 600; t++) begin
      clear = 1'b0;
      en    = 1'b1;
      d     = '0;
      d8    = '0;
      @(posedge clk);
      ref_step();
      #1;
      compare($sformatf("feedback %0d", t));
    end
    // A single input bit on an otherwise zero word reaches the signature.
    sig_a = sig;
    d = '0;
    d[17] = 1'b1;
    d8 = '0;
    en = 1'b1;
    @(posedge clk);
    ref_step();
    #1;
    compare("single bit");
    checks++;
    if (sig[17] === sig_a[16]) begin
      failures++;
      $display("FAIL input bit 17 did not reach the signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
