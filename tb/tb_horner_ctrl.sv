// tb_horner_ctrl: self-checking test of the Horner-loop sequencer.
// Two instances (PRE=1/ITERS=5 and PRE=0/ITERS=3) are started repeatedly,
// also with start held high during an operation (it must be ignored) and
// back-to-back from the done cycle.  Checked per operation: load is seen
// once, exactly PRE preprocessing and ITERS step cycles occur with idx
// counting 0..ITERS-1, done is a single pulse PRE+ITERS edges after start,
// and busy is high exactly between them.
module tb_horner_ctrl;
  logic clk = 0, rst_n = 0;
  logic [1:0] start = '0, load, pre, step, busy, done;
  logic [2:0] idx0;
  logic [1:0] idx1;
  int checks = 0, failures = 0;

  horner_ctrl #(.ITERS(5), .PRE(1)) dut0 (.clk, .rst_n, .start(start[0]), .load(load[0]),
      .pre(pre[0]), .step(step[0]), .idx(idx0), .busy(busy[0]), .done(done[0]));
  horner_ctrl #(.ITERS(3), .PRE(0)) dut1 (.clk, .rst_n, .start(start[1]), .load(load[1]),
      .pre(pre[1]), .step(step[1]), .idx(idx1), .busy(busy[1]), .done(done[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic op(input int d, input int npre, input int nit, input bit hold);
    int cycles = 0, n_pre = 0, n_step = 0, n_load = 0;
    @(negedge clk) start[d] = 1'b1;
    #1;
    check(load[d] == 1'b1, "load with start");
    @(negedge clk);
    if (!hold) start[d] = 1'b0;
    while (!done[d]) begin
      int ix;
      ix = d ? int'(idx1) : int'(idx0);
      cycles++;
      check(busy[d] == 1'b1, "busy while running");
      if (load[d]) n_load++;
      if (pre[d]) n_pre++;
      if (step[d]) begin
        check(ix == n_step, "idx counts steps");
        n_step++;
      end
      @(negedge clk);
    end
    start[d] = 1'b0;
    check(n_load == 0, "no load while busy");
    check(n_pre == npre, "preprocessing cycles");
    check(n_step == nit, "iteration cycles");
    check(cycles == npre + nit, "latency");
    check(!busy[d] && !step[d] && !pre[d], "done cycle is idle");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    for (int k = 0; k < 4; k++) begin
      op(0, 1, 5, k[0]);
      op(1, 0, 3, k[1]);
    end
    // restart from the done cycle
    op(1, 0, 3, 1'b0);
    op(1, 0, 3, 1'b0);
    @(negedge clk);
    check(!done[1], "done is one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
