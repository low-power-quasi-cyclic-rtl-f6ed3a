// tb_analysis_circuit: feeds matching and differing response pairs and checks
// the comparison and mismatch counts and the sticky fail flag.
module tb_analysis_circuit;
  localparam int W = 11;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] resp = '0, ref_resp = '0;
  logic fail;
  logic [15:0] mismatch_count, compare_count;
  int checks = 0, failures = 0;

  analysis_circuit #(.W(W)) dut (.clk, .rst_n, .en, .resp, .ref_resp, .fail, .mismatch_count, .compare_count);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nc, nm;
    logic ef;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    nc = 0; nm = 0; ef = 0;
    for (int c = 0; c < 300; c++) begin
      en = $urandom_range(0, 3) != 0;
      ref_resp = W'($urandom);
      // no mismatch at all in the first 100 cycles
      resp = (c >= 100 && $urandom_range(0, 4) == 0) ? ref_resp ^ W'(1 << $urandom_range(0, W - 1)) : ref_resp;
      @(posedge clk); #1;
      if (en) begin
        nc++;
        if (resp != ref_resp) begin nm++; ef = 1; end
      end
      checks++;
      if (compare_count != 16'(nc) || mismatch_count != 16'(nm) || fail != ef) begin
        failures++;
        $display("cycle %0d: compares=%0d mismatches=%0d fail=%0b expected %0d %0d %0b",
                 c, compare_count, mismatch_count, fail, nc, nm, ef);
      end
    end
    checks++;
    if (nm == 0) begin failures++; $display("no mismatch exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
