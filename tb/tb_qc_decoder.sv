// tb_qc_decoder: sends quarter-cycle pulses in random slots, and some full
// level signals, and checks that the decoder holds, for the whole of the next
// test cycle, every bit that was high in any slot of the previous one.
module tb_qc_decoder;
  localparam int W = 11, P = 4;
  logic clk = 0, rst_n = 0, frame_end;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  int ph;

  qc_decoder #(.W(W)) dut (.clk, .rst_n, .frame_end, .din, .dout);

  always #5 clk = ~clk;
  assign frame_end = (ph == P - 1);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] value, acc, exp_out;
    int slot, ones;
    ph = 0;
    din = '0;
    acc = '0;
    exp_out = '0;
    ones = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 100; f++) begin
      value = W'($urandom);
      slot  = $urandom_range(0, P - 1);
      for (int s = 0; s < P; s++) begin
        if (f % 5 == 4) din = value;                 // full-length level
        else            din = (s == slot) ? value : '0; // quarter pulse
        acc |= din;
        @(posedge clk);
        if (frame_end) begin exp_out = acc; acc = '0; end
        #1;
        ph = (ph + 1) % P;
        checks++;
        if (dout != exp_out) begin
          failures++;
          $display("frame %0d slot %0d: dout=%b expected %b", f, s, dout, exp_out);
        end
      end
      ones += $countones(exp_out);
    end
    checks++;
    if (ones == 0) begin failures++; $display("no 1 decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
