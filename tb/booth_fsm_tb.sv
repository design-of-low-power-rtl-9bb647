// booth_fsm_tb - checks the four-state controller (DIGITS = 6).
// After go: one INIT cycle (load), DIGITS ADD_SHIFT cycles with step
// counting 0..DIGITS-1, one DONE cycle, then idle. busy must cover INIT to
// DONE, and a go raised while busy must not restart the sequence.
module booth_fsm_tb;
  localparam int D = 6;
  logic clk = 0, rst_n = 0, go = 0;
  logic load, add_shift, done, busy;
  logic [2:0] step;
  int checks = 0, failures = 0;

  booth_fsm #(.DIGITS(D)) dut (.clk, .rst_n, .go, .load, .add_shift, .step, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(string what, logic l, logic a, logic d, logic b, int s);
    checks++;
    if (load !== l || add_shift !== a || done !== d || busy !== b || (a && int'(step) != s)) begin
      failures++;
      $display("FAIL %s: load=%b add_shift=%b done=%b busy=%b step=%0d", what, load, add_shift, done, busy, step);
    end
  endtask

  task automatic run_op(bit go_while_busy);
    @(negedge clk); go = 1;
    @(negedge clk); go = go_while_busy;
    expect_out("init", 1, 0, 0, 1, 0);
    for (int s = 0; s < D; s++) begin
      @(negedge clk);
      expect_out("add_shift", 0, 1, 0, 1, s);
    end
    @(negedge clk); go = 0;
    expect_out("done", 0, 0, 1, 1, 0);
    @(negedge clk);
    expect_out("idle", 0, 0, 0, 0, 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_out("reset", 0, 0, 0, 0, 0);
    rst_n = 1;
    repeat (3) @(negedge clk);
    expect_out("idle without go", 0, 0, 0, 0, 0);
    run_op(0);
    run_op(1);
    run_op(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
