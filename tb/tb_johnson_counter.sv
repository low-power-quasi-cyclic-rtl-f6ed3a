// tb_johnson_counter: checks the Johnson counter against the closed form of
// its sequence (k ones filling from bit 0 for k <= N, then zeros filling from
// bit 0), its period of 2N steps, the one-bit change per step and the hold
// when `en` is low.
module tb_johnson_counter;
  localparam int N = 9;
  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] q, prev;
  int checks = 0, failures = 0;

  johnson_counter #(.N(N)) dut (.clk, .rst_n, .en, .q);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] expected(int k);
    logic [N-1:0] ones;
    k = k % (2 * N);
    if (k <= N) return N'((64'd1 << k) - 1);
    ones = '1;
    return ones ^ N'((64'd1 << (k - N)) - 1);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (q != '0) begin failures++; $display("reset value %b", q); end
    k = 0;
    for (int c = 0; c < 200; c++) begin
      en = ($urandom_range(0, 3) != 0);
      prev = q;
      @(posedge clk); #1;
      if (en) k++;
      checks++;
      if (q != expected(k)) begin
        failures++;
        $display("step %0d: q=%b expected %b", k, q, expected(k));
      end
      checks++;
      if ($countones(q ^ prev) != (en ? 1 : 0)) begin
        failures++;
        $display("step %0d: %0d bits changed", k, $countones(q ^ prev));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
