// tb_scan_sel_unit: self-checking testbench of the modified scan input
// selection unit. All 16 input combinations are applied, several times each in
// random order, and scan_in is compared with a table of the expected bit:
// the data input in broadcast mode, otherwise the scan output, inverted when the
// chain is selected by the decoder.
module tb_scan_sel_unit;
  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic scan_out, dec_sel, data_in, broadcast, scan_in;

  scan_sel_unit dut (
    .scan_out  (scan_out),
    .dec_sel   (dec_sel),
    .data_in   (data_in),
    .broadcast (broadcast),
    .scan_in   (scan_in)
  );

  // Expected scan_in, indexed by {broadcast, data_in, dec_sel, scan_out}.
  localparam logic [15:0] EXPECTED = {
    4'b1111,  // broadcast, data 1
    4'b0000,  // broadcast, data 0
    4'b0110,  // circular, data 1: dec_sel=1 -> ~scan_out, dec_sel=0 -> scan_out
    4'b0110   // circular, data 0
  };

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 8; pass++) begin
      for (int n = 0; n < 16; n++) begin
        int v;
        v = (pass == 0) ? n : $urandom_range(0, 15);
        {broadcast, data_in, dec_sel, scan_out} = 4'(v);
        @(posedge clk);
        checks++;
        if (scan_in !== EXPECTED[v]) begin
          failures++;
          $display("FAIL bcast=%b data=%b sel=%b out=%b: scan_in=%b expected %b",
                   broadcast, data_in, dec_sel, scan_out, scan_in, EXPECTED[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
