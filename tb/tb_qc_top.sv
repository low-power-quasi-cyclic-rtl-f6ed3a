// tb_qc_top: end-to-end test of the quasi-cyclic BIST generator at its
// default sizes (9 pattern bits, 11 response bits, 4 slots per test cycle,
// 4 sessions of 32 test cycles).
//
// The testbench closes the loop with a stand-in circuit under test: a
// combinational function of the pattern, used twice, once as the fault-free
// reference and once with a stuck-at-1 fault on one output bit that is
// switched on for part of the run. Every clock it updates a cycle-level model
// of the whole chain (slot counter, Johnson counter, encoder, accumulator
// with session forcing, both decoders, analysis counts) and compares all
// observable outputs with it. It also counts how often each mechanism
// happens: quarter-cycle encoder pulses, B loads, set and reset forcing,
// session switches, test completion, mismatches found while the fault is on,
// none while it is off, LFSR steps and T flip-flop toggles, and fails if any
// never happened.
module tb_qc_top;
  import qc_pkg::*;
  localparam int N = TPG_WIDTH, M = RESP_WIDTH, P = QC_PHASES, S = 4, L = 32;

  logic clk = 0, rst_n = 0, test_en = 0, cin = 1, tff_in = 0;
  logic [N-1:0] cut_pattern, jc_value, enc_value, reg_b;
  logic [M-1:0] cut_resp, ref_resp, resp_dec, ref_dec;
  logic [1:0] session;
  logic fail, test_done, tff_out;
  logic [15:0] mismatch_count, compare_count;
  logic [7:0] lt_dout, lt_state;
  logic fault_on = 0;
  int checks = 0, failures = 0;

  qc_top dut (
    .clk, .rst_n, .test_en, .cin, .cut_pattern, .cut_resp, .ref_resp,
    .jc_value, .enc_value, .reg_b, .session, .resp_dec, .ref_dec, .fail,
    .mismatch_count, .compare_count, .test_done, .lt_dout, .lt_state,
    .tff_in, .tff_out);

  always #5 clk = ~clk;

  // Stand-in circuit under test (not the benchmark netlist).
  function automatic logic [M-1:0] cut_fn(logic [N-1:0] x);
    logic [M-1:0] y;
    y[7:0]  = x[7:0] + {x[8], x[8:2]};
    y[8]    = ^x;
    y[9]    = &x[3:0];
    y[10]   = x[8] | x[0];
    return y;
  endfunction

  assign ref_resp = cut_fn(cut_pattern);
  assign cut_resp = fault_on ? (cut_fn(cut_pattern) | M'(1 << 9)) : cut_fn(cut_pattern);

  function automatic logic [N-1:0] jstep(logic [N-1:0] q);
    return {q[N-2:0], ~q[N-1]};
  endfunction

  function automatic void masks(int k, output logic [N-1:0] sm, output logic [N-1:0] rm);
    logic [N-1:0] even, odd;
    even = '0;
    for (int i = 0; i < N; i += 2) even[i] = 1'b1;
    odd = ~even;
    sm = '0; rm = '0;
    if (k >= S * L) return;
    case (k / L)
      1: sm = even;
      2: rm = even;
      3: begin sm = odd; rm = even; end
      default: ;
    endcase
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // model state
    int ph, k, nc, nm;
    logic done, mfail, tq;
    logic [N-1:0] jc, enc, ma, mb, sm, rm, sum;
    logic [M-1:0] seen_c, seen_r, dec_c, dec_r;
    logic [7:0] ls, ld;
    logic run, fe, s0;
    // mechanism counters
    int n_pulse, n_bload, n_set, n_reset, n_switch, n_done, n_mm_fault, n_mm_clean, n_lfsr, n_tff;
    int pulse_len, cycles, done_cycle;
    logic [1:0] last_session;

    ph = 0; k = 0; nc = 0; nm = 0; done = 0; mfail = 0; tq = 0;
    jc = '0; enc = '0; ma = '0; mb = '0; seen_c = '0; seen_r = '0; dec_c = '0; dec_r = '0;
    ls = 8'h01; ld = '0;
    n_pulse = 0; n_bload = 0; n_set = 0; n_reset = 0; n_switch = 0; n_done = 0;
    n_mm_fault = 0; n_mm_clean = 0; n_lfsr = 0; n_tff = 0; pulse_len = 0; cycles = 0;
    done_cycle = -1; last_session = 0;

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    test_en = 1;

    for (int c = 0; c < 4 * (S * L + 8); c++) begin
      cin = (c % 7) != 3;
      tff_in = $urandom_range(0, 1);
      // Stuck-at fault during session 2 only.
      fault_on = (c >= 4 * (2 * L + 4)) && (c < 4 * (3 * L));
      #1;
      // ---- model of the clock edge ----
      fe  = (ph == P - 1);
      s0  = (ph == 0);
      run = test_en && !done;
      masks(k, sm, rm);
      sum = ma + mb + N'(cin);
      if (fe && run) ma = (sum & ~(sm | rm)) | (ma & (sm | rm));
      if (s0 && run) begin mb = (enc & ~(sm | rm)) | (mb & (sm | rm)); n_bload++; end
      enc = fe ? jc : '0;
      if (fe && run) jc = jstep(jc);
      if (fe && test_en) begin
        nc++;
        if (dec_c != dec_r) begin
          nm++; mfail = 1;
          if (fault_on || c < 4 * (3 * L) + 16) n_mm_fault++;
        end
      end
      if (fe) begin
        dec_c = seen_c | cut_resp; seen_c = '0;
        dec_r = seen_r | ref_resp; seen_r = '0;
      end else begin
        seen_c |= cut_resp; seen_r |= ref_resp;
      end
      if (fe && run) begin
        k++;
        if (k == S * L) done = 1;
      end
      masks(k, sm, rm);
      ma = (ma & ~rm) | sm;
      mb = (mb & ~sm) | rm;
      ld = ls; ls = {ls[6:0], ls[7] ^ ls[5] ^ ls[4] ^ ls[3]};
      if (tff_in) begin tq = ~tq; n_tff++; end
      ph = (ph + 1) % P;
      // ---- the DUT's edge ----
      @(posedge clk); #1;
      cycles++;
      check("jc_value", 32'(jc_value), 32'(jc));
      check("enc_value", 32'(enc_value), 32'(enc));
      check("reg_b", 32'(reg_b), 32'(mb));
      check("cut_pattern", 32'(cut_pattern), 32'(ma));
      check("resp_dec", 32'(resp_dec), 32'(dec_c));
      check("ref_dec", 32'(ref_dec), 32'(dec_r));
      check("compare_count", 32'(compare_count), 32'(nc));
      check("mismatch_count", 32'(mismatch_count), 32'(nm));
      check("fail", 32'(fail), 32'(mfail));
      check("test_done", 32'(test_done), 32'(done));
      check("lt_state", 32'(lt_state), 32'(ls));
      check("lt_dout", 32'(lt_dout), 32'(ld));
      check("tff_out", 32'(tff_out), 32'(tq));
      n_lfsr++;
      // mechanism observations on the DUT itself
      if (enc_value != '0) pulse_len++;
      else if (pulse_len != 0) begin
        check("pulse length", 32'(pulse_len), 32'(1));
        n_pulse++;
        pulse_len = 0;
      end
      if ((cut_pattern & sm) == sm && sm != '0) n_set++;
      if ((cut_pattern & rm) == '0 && rm != '0) n_reset++;
      if (session != last_session) n_switch++;
      last_session = session;
      if (test_done && done_cycle < 0) begin done_cycle = cycles; n_done++; end
      if (!fault_on && c < 4 * (2 * L + 4) && mismatch_count != 0) n_mm_clean++;
    end

    // Test length: S*L test cycles of P clocks each.
    check("done cycle", 32'(done_cycle), 32'(S * L * P));
    check("mismatches only under fault", 32'(n_mm_clean), 32'(0));
    $display("mechanisms: qc_pulses=%0d b_loads=%0d set_forced=%0d reset_forced=%0d session_switches=%0d done=%0d fault_detects=%0d lfsr_steps=%0d tff_toggles=%0d",
             n_pulse, n_bload, n_set, n_reset, n_switch, n_done, n_mm_fault, n_lfsr, n_tff);
    if (n_pulse == 0)    begin failures++; $display("no quasi-cyclic pulse"); end
    if (n_bload == 0)    begin failures++; $display("no B load"); end
    if (n_set == 0)      begin failures++; $display("no set forcing"); end
    if (n_reset == 0)    begin failures++; $display("no reset forcing"); end
    if (n_switch != S - 1) begin failures++; $display("session switches %0d", n_switch); end
    if (n_done == 0)     begin failures++; $display("test never done"); end
    if (n_mm_fault == 0) begin failures++; $display("fault never detected"); end
    if (n_lfsr == 0)     begin failures++; $display("lfsr never stepped"); end
    if (n_tff == 0)      begin failures++; $display("t flip-flop never toggled"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
