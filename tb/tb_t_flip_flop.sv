// tb_t_flip_flop: random toggle requests against a one-bit model.
module tb_t_flip_flop;
  logic clk = 0, reset = 1, data_in = 0, data_out;
  int checks = 0, failures = 0;

  t_flip_flop dut (.clk, .reset, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m;
    int toggles;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    m = 0;
    toggles = 0;
    for (int c = 0; c < 200; c++) begin
      data_in = $urandom_range(0, 1);
      @(posedge clk); #1;
      if (data_in) begin m = ~m; toggles++; end
      checks++;
      if (data_out != m) begin failures++; $display("cycle %0d: %b expected %b", c, data_out, m); end
    end
    checks++;
    if (toggles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
