// tb_acc_cell: checks one accumulator cell against the full-adder truth table
// (all 8 rows), the asynchronous set (A=1, B=0) and reset (A=0, B=1) taking
// effect between clock edges, a direct switch from set to reset, carry out =
// carry in while forced, and the B load path.
module tb_acc_cell;
  logic clk = 0, rst_n = 0;
  logic set_i = 0, reset_i = 0, load_b = 0, b_in = 0, step = 0, cin = 0;
  logic cout, a, b;
  int checks = 0, failures = 0;

  acc_cell dut (.clk, .rst_n, .set_i, .reset_i, .load_b, .b_in, .step, .cin, .cout, .a, .b);

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b expected %b", what, got, exp); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ea, eb;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset a", a, 0);
    check("reset b", b, 0);
    // Full adder rows: set A and B through the ports, then add.
    for (int row = 0; row < 8; row++) begin
      ea = row[1]; eb = row[0];
      // A <- ea using the adder with B=0, cin=ea after clearing via reset pulse
      reset_i = 1; #1 reset_i = 0;          // A=0, B=1
      load_b = 1; b_in = 0; @(posedge clk); #1 load_b = 0;   // B=0
      cin = ea; step = 1; @(posedge clk); #1 step = 0;      // A = 0+0+ea
      load_b = 1; b_in = eb; @(posedge clk); #1 load_b = 0; // B = eb
      cin = row[2];
      #1;
      check("a load", a, ea);
      check("b load", b, eb);
      check("cout", cout, (ea & eb) | (ea & cin) | (eb & cin));
      step = 1; @(posedge clk); #1 step = 0;
      check("sum", a, ea ^ eb ^ row[2]);
    end
    // Asynchronous set in mid-cycle.
    @(negedge clk);
    set_i = 1; #1;
    check("set a", a, 1);
    check("set b", b, 0);
    cin = 0; #1 check("set cout=cin 0", cout, 0);
    cin = 1; #1 check("set cout=cin 1", cout, 1);
    step = 1; load_b = 1; b_in = 1;
    @(posedge clk); #1;
    check("set holds a", a, 1);
    check("set holds b", b, 0);
    step = 0; load_b = 0;
    set_i = 0;
    @(negedge clk);
    reset_i = 1; #1;
    check("reset a", a, 0);
    check("reset b", b, 1);
    cin = 0; #1 check("reset cout=cin 0", cout, 0);
    cin = 1; #1 check("reset cout=cin 1", cout, 1);
    step = 1;
    @(posedge clk); #1;
    check("reset holds a", a, 0);
    step = 0; reset_i = 0;
    // Released: ordinary accumulation again (A=0,B=1,cin=1 -> sum 0, then A=0).
    cin = 0; step = 1; @(posedge clk); #1 step = 0;
    check("free sum", a, 1);
    // Direct switch from set to reset (weight 1 to weight 0) with no release.
    @(negedge clk);
    set_i = 1; #1;
    check("switch set a", a, 1);
    set_i = 0; reset_i = 1; #1;
    check("switch reset a", a, 0);
    check("switch reset b", b, 1);
    reset_i = 0; set_i = 1; #1;
    check("switch back a", a, 1);
    check("switch back b", b, 0);
    set_i = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
