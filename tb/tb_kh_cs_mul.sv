// tb_kh_cs_mul: self-checking test of the sign-estimation carry-save
// multiplier.  Random moduli over the whole range 2^(N-1) < F < 2^N, random
// and extreme operands below F; each result is compared with a*b mod f
// computed on 64-bit integers, and the start-to-done latency must be N+3
// cycles (N iterations plus three with a_i = 0).  It also counts how often
// the estimator answered (+), (-) and (+-).
module tb_kh_cs_mul;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] f, a, b, c, result;
  int n_plus = 0, n_minus = 0, n_pm = 0;
  logic busy, done;
  logic [1:0] est;
  int checks = 0, failures = 0;

  kh_cs_mul #(.N(N)) dut (.clk, .rst_n, .start, .f, .a, .b, .result, .busy, .done, .est);

  always @(posedge clk) if (busy) begin
    if (est == 2'b10) n_plus++;
    else if (est == 2'b01) n_minus++;
    else n_pm++;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] ff, aa, bb, cc);
    longint unsigned expect_v;
    int cycles;
    f = ff; a = aa; b = bb; c = cc;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    expect_v = (64'(aa) * 64'(bb)) % 64'(ff);
    checks++;
    if (64'(result) != expect_v) begin
      failures++;
      $display("FAIL f=%h a=%h b=%h c=%h got %h expect %h", ff, aa, bb, cc, result, expect_v);
    end
    checks++;
    if (cycles != N + 3) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, N + 3);
    end
  endtask

  function automatic logic [N-1:0] rnd_f(input bit high);
    logic [N-1:0] v;
    v = N'({$urandom, $urandom});
    v[N-1] = 1'b1;
    v[N-2] = high;
    if (v == {1'b1, {(N-1){1'b0}}}) v[0] = 1'b1;
    return v;
  endfunction

  initial begin
    logic [N-1:0] ff;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // extremes
    ff = {N{1'b1}};
    run(ff, ff - 1, ff - 1, 0);
    ff = {1'b1, {(N-2){1'b0}}, 1'b1};
    run(ff, ff - 1, ff - 1, 0);
    run(ff, '0, ff - 1, '0);
    run(ff, 1, ff - 1, 1);
    for (int k = 0; k < 300; k++) begin
      ff = rnd_f(k[0]);
      run(ff, $urandom % ff, $urandom % ff, 0);
    end
    checks++;
    if (n_plus == 0 || n_minus == 0 || n_pm == 0) failures++;
    $display("estimates: (+) %0d  (-) %0d  (+-) %0d", n_plus, n_minus, n_pm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
