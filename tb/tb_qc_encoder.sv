// tb_qc_encoder: drives random test values and checks that every logic 1
// leaves the encoder as a pulse exactly one slot long, in the first slot of
// the next test cycle, and that the output is zero in the other slots.
module tb_qc_encoder;
  localparam int W = 9, P = 4;
  logic clk = 0, rst_n = 0, frame_end;
  logic [W-1:0] din, enc_out;
  int checks = 0, failures = 0;
  int ph;

  qc_encoder #(.W(W)) dut (.clk, .rst_n, .frame_end, .din, .enc_out);

  always #5 clk = ~clk;
  assign frame_end = (ph == P - 1);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] captured;
    ph = 0;
    din = '0;
    captured = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      din = W'($urandom);
      @(posedge clk);
      if (frame_end) captured = din;
      #1;
      ph = (ph + 1) % P;
      checks++;
      if (enc_out != ((ph == 0) ? captured : '0)) begin
        failures++;
        $display("cycle %0d slot %0d: enc_out=%b expected %b", c, ph, enc_out, (ph == 0) ? captured : '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
