// tb_qc_phase: checks the slot counter against a reference count: the phase
// sequence 0,1,..,PHASES-1,0,.. and the slot0 / frame_end strobes, for the
// default of four slots.
module tb_qc_phase;
  localparam int P = 4;
  logic clk = 0, rst_n = 0;
  logic [1:0] phase;
  logic slot0, frame_end;
  int checks = 0, failures = 0;

  qc_phase #(.PHASES(P)) dut (.clk, .rst_n, .phase, .slot0, .frame_end);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_ph;
    int n_frames;
    n_frames = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp_ph = 0;
    for (int c = 0; c < 40; c++) begin
      checks++;
      if (phase != exp_ph[1:0] || slot0 != (exp_ph == 0) || frame_end != (exp_ph == P-1)) begin
        failures++;
        $display("cycle %0d: phase=%0d slot0=%0b frame_end=%0b, expected phase %0d", c, phase, slot0, frame_end, exp_ph);
      end
      if (frame_end) n_frames++;
      @(posedge clk); #1;
      exp_ph = (exp_ph + 1) % P;
    end
    checks++;
    if (n_frames != 10) begin failures++; $display("frames=%0d, expected 10", n_frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
