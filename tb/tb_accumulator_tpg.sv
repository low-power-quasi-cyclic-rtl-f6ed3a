// tb_accumulator_tpg: runs the 9-bit 3-weight generator (4 sessions of 8
// cycles) with random B loads and carry inputs, and checks register A and B
// against an integer model: A <- (A + B + cin) mod 2^N, then the session's
// forced bits applied (set: A=1, B=0; reset: A=0, B=1). A bit forced at a
// clock edge ignores that edge's update. Also checks that the
// forced bits stay fixed for a whole session and that the free bits vary.
module tb_accumulator_tpg;
  localparam int N = 9, S = 4, L = 8;
  localparam logic [N-1:0] EVEN = 9'b101010101, ODD = 9'b010101010;
  logic clk = 0, rst_n = 0, load_b = 0, step = 0, cin = 0;
  logic [N-1:0] b_in = '0, pattern, reg_b;
  logic [1:0] session;
  logic done;
  int checks = 0, failures = 0;

  accumulator_tpg #(.N(N), .NUM_SESSIONS(S), .SESSION_LEN(L)) dut (
    .clk, .rst_n, .load_b, .b_in, .step, .cin, .pattern, .reg_b, .session, .done);

  always #5 clk = ~clk;

  function automatic void masks(int k, output logic [N-1:0] sm, output logic [N-1:0] rm);
    int s;
    sm = '0; rm = '0;
    if (k >= S * L) return;
    s = k / L;
    case (s)
      1: sm = EVEN;
      2: rm = EVEN;
      3: begin sm = ODD; rm = EVEN; end
      default: ;
    endcase
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ma, mb, sm, rm, seen1, seen0;
    int k;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ma = '0; mb = '0; k = 0;
    seen1 = '0; seen0 = '0;
    for (int c = 0; c < 120; c++) begin
      load_b = $urandom_range(0, 1);
      step   = $urandom_range(0, 1);
      cin    = $urandom_range(0, 1);
      b_in   = N'($urandom);
      @(posedge clk);
      // Bits forced at the clock edge keep their forced value.
      masks(k, sm, rm);
      if (step) ma = ((ma + mb + N'(cin)) & ~(sm | rm)) | (ma & (sm | rm));
      if (load_b) mb = (b_in & ~(sm | rm)) | (mb & (sm | rm));
      if (step && k < S * L) k++;
      masks(k, sm, rm);
      ma = (ma & ~rm) | sm;
      mb = (mb & ~sm) | rm;
      #1;
      checks++;
      if (pattern != ma || reg_b != mb) begin
        failures++;
        $display("cycle %0d k=%0d: A=%b B=%b expected A=%b B=%b", c, k, pattern, reg_b, ma, mb);
      end
      if (k < L) begin seen1 |= pattern; seen0 |= ~pattern; end
    end
    checks++;
    if (seen1 != '1 || seen0 != '1) begin failures++; $display("free bits did not all toggle in session 0"); end
    checks++;
    if (!done) begin failures++; $display("not done after all sessions"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
