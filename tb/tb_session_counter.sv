// tb_session_counter: steps a small session counter (6 bits, 4 sessions of 3
// test cycles) with random gaps and checks the session number, the Set/Reset
// masks of every session against a hand-written table, the release of all
// masks and `done` after the last session, and that nothing moves afterwards.
module tb_session_counter;
  localparam int N = 6, S = 4, L = 3;
  logic clk = 0, rst_n = 0, step = 0;
  logic [N-1:0] set_o, reset_o;
  logic [1:0] session;
  logic done;
  int checks = 0, failures = 0;

  session_counter #(.N(N), .NUM_SESSIONS(S), .SESSION_LEN(L)) dut (
    .clk, .rst_n, .step, .set_o, .reset_o, .session, .done);

  always #5 clk = ~clk;

  // Expected masks: even bits 0,2,4 = 6'b010101, odd bits = 6'b101010.
  localparam logic [N-1:0] EXP_SET [S] = '{6'b000000, 6'b010101, 6'b000000, 6'b101010};
  localparam logic [N-1:0] EXP_RST [S] = '{6'b000000, 6'b000000, 6'b010101, 6'b010101};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, es, switches;
    logic ed;
    logic [1:0] last;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    k = 0;
    switches = 0;
    last = 0;
    for (int c = 0; c < 80; c++) begin
      step = ($urandom_range(0, 1) == 1);
      @(posedge clk); #1;
      if (step && k < S * L) k++;
      ed = (k >= S * L);
      es = ed ? S - 1 : k / L;
      checks++;
      if (done != ed || session != es[1:0]) begin
        failures++;
        $display("k=%0d: session=%0d done=%0b expected %0d %0b", k, session, done, es, ed);
      end
      checks++;
      if (set_o != (ed ? '0 : EXP_SET[es]) || reset_o != (ed ? '0 : EXP_RST[es])) begin
        failures++;
        $display("k=%0d: set=%b reset=%b", k, set_o, reset_o);
      end
      if (session != last) switches++;
      last = session;
    end
    checks++;
    if (switches != S - 1 || !done) begin failures++; $display("switches=%0d done=%0b", switches, done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
