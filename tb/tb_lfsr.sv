// tb_lfsr: checks the 8-bit LFSR against a polynomial model
// (x^8 + x^6 + x^5 + x^4 + 1, shifting left), its period of 255 with no
// repeated state inside a period, the one-clock lag of `dout`, and that the
// pair dout = 11010000 / lfsr_reg = 10100000 occurs.
module tb_lfsr;
  localparam int W = 8;
  logic clk = 0, reset = 1;
  logic [W-1:0] dout, lfsr_reg;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .reset, .dout, .lfsr_reg);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ms, prev;
    bit visited [256];
    int pair_seen, period;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    ms = 8'h01;
    pair_seen = 0;
    period = 0;
    checks++;
    if (lfsr_reg != ms || dout != '0) begin failures++; $display("reset state %h %h", lfsr_reg, dout); end
    for (int c = 0; c < 600; c++) begin
      prev = ms;
      ms = {ms[6:0], ms[7] ^ ms[5] ^ ms[4] ^ ms[3]};
      @(posedge clk); #1;
      checks++;
      if (lfsr_reg != ms || dout != prev) begin
        failures++;
        $display("cycle %0d: lfsr_reg=%b dout=%b expected %b %b", c, lfsr_reg, dout, ms, prev);
      end
      if (dout == 8'b11010000 && lfsr_reg == 8'b10100000) pair_seen++;
      if (c < 255) begin
        checks++;
        if (visited[lfsr_reg] || lfsr_reg == 0) begin failures++; $display("state %h repeated", lfsr_reg); end
        visited[lfsr_reg] = 1;
      end
      if (period == 0 && lfsr_reg == 8'h01) period = c + 1;
    end
    checks++;
    if (period != 255) begin failures++; $display("period %0d", period); end
    checks++;
    if (pair_seen == 0) begin failures++; $display("sample pair not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
