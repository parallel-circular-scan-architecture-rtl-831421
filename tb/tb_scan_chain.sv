// tb_scan_chain: self-checking testbench of one scan chain (default length 7).
//
// A queue model of the chain is kept alongside it. The test loads a pattern by
// shifting, checks that LEN shifts with the output fed back (one full rotation)
// restore the chain, captures a parallel word, holds with both controls low,
// and then runs random mixed shift/capture/hold cycles. Every cycle the
// parallel view and the scan output are compared with the model.
module tb_scan_chain;
  localparam int unsigned LEN = 7;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           shift_en = 1'b0;
  logic           capture_en = 1'b0;
  logic           scan_in = 1'b0;
  logic [LEN-1:0] capture_d = '0;
  logic [LEN-1:0] cells;
  logic           scan_out;
  logic           loop_back = 1'b0;   // feed scan_out back to scan_in

  bit model [LEN];  // model[0] is the scan-input end

  scan_chain dut (
    .clk        (clk),
    .shift_en   (shift_en),
    .capture_en (capture_en),
    .scan_in    (loop_back ? scan_out : scan_in),
    .capture_d  (capture_d),
    .cells      (cells),
    .scan_out   (scan_out)
  );

  task automatic step();
    bit in_bit;
    in_bit = loop_back ? model[LEN-1] : scan_in;
    @(posedge clk);
    if (capture_en) begin
      for (int i = 0; i < LEN; i++) model[i] = capture_d[i];
    end else if (shift_en) begin
      for (int i = LEN - 1; i > 0; i--) model[i] = model[i-1];
      model[0] = in_bit;
    end
    #1;
  endtask

  task automatic compare(string what);
    checks++;
    for (int i = 0; i < LEN; i++) begin
      if (cells[i] !== model[i]) begin
        failures++;
        $display("FAIL %s: cell %0d = %b, expected %b", what, i, cells[i], model[i]);
        return;
      end
    end
    checks++;
    if (scan_out !== model[LEN-1]) begin
      failures++;
      $display("FAIL %s: scan_out = %b, expected %b", what, scan_out, model[LEN-1]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pattern [LEN];
    // Load a known pattern by shifting.
    shift_en = 1'b1;
    foreach (pattern[i]) pattern[i] = bit'($urandom_range(0, 1));
    for (int i = 0; i < LEN; i++) begin
      scan_in = pattern[LEN-1-i];   // last slice enters first
      step();
    end
    compare("load");
    for (int i = 0; i < LEN; i++) begin
      checks++;
      if (cells[i] !== pattern[i]) begin
        failures++;
        $display("FAIL load: cell %0d = %b, expected %b", i, cells[i], pattern[i]);
      end
    end
    // One full rotation restores the chain.
    loop_back = 1'b1;
    for (int i = 0; i < LEN; i++) begin
      step();
      compare("rotate");
    end
    for (int i = 0; i < LEN; i++) begin
      checks++;
      if (cells[i] !== pattern[i]) begin
        failures++;
        $display("FAIL rotation: cell %0d = %b, expected %b", i, cells[i], pattern[i]);
      end
    end
    loop_back = 1'b0;
    shift_en  = 1'b0;
    // Capture, then hold.
    capture_d  = LEN'($urandom);
    capture_en = 1'b1;
    step();
    compare("capture");
    capture_en = 1'b0;
    capture_d  = ~capture_d;
    repeat (3) begin step(); compare("hold"); end
    // Random traffic, capture and shift together included.
    for (int t = 0; t < 2000; t++) begin
      shift_en   = bit'($urandom_range(0, 1));
      capture_en = ($urandom_range(0, 4) == 0);
      scan_in    = bit'($urandom_range(0, 1));
      loop_back  = bit'($urandom_range(0, 1));
      capture_d  = LEN'($urandom);
      step();
      compare($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
