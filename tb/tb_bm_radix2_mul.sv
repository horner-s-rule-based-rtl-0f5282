// tb_bm_radix2_mul: self-checking test of the radix-2 multiplier-adder.
// Random moduli from both ranges (below and above 2^(N-1)+2^(N-2)), random
// and extreme operands; each result is compared with (a*b+c) mod f computed
// on 64-bit integers, and the start-to-done latency must be N+1 cycles
// (one table-preprocessing cycle plus N iterations).
module tb_bm_radix2_mul;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] f, a, b, c, result;
  logic busy, done;
  int checks = 0, failures = 0;

  bm_radix2_mul #(.N(N)) dut (.*);

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
    expect_v = ((64'(aa) * 64'(bb)) + 64'(cc)) % 64'(ff);
    checks++;
    if (64'(result) != expect_v) begin
      failures++;
      $display("FAIL f=%h a=%h b=%h c=%h got %h expect %h", ff, aa, bb, cc, result, expect_v);
    end
    checks++;
    if (cycles != N + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, N + 1);
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
    run(ff, {N{1'b1}}, ff - 1, {N{1'b1}});
    ff = {1'b1, {(N-2){1'b0}}, 1'b1};
    run(ff, {N{1'b1}}, ff - 1, {N{1'b1}});
    run(ff, '0, ff - 1, '0);
    run(ff, 1, ff - 1, 1);
    for (int k = 0; k < 300; k++) begin
      ff = rnd_f(k[0]);
      run(ff, $urandom, $urandom % ff, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
