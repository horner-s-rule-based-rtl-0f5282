// tb_ty_bs_mul: self-checking test of the borrow-save multiplier.
// Random moduli, random signed operands in (-F, F) given in random
// borrow-save encodings (the same value has many (p, n) pairs); each result
// is compared with A*B mod F in [0, F) computed on 64-bit integers, and the
// start-to-done latency must be N+1 cycles (one per digit of A).
module tb_ty_bs_mul;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] f, result;
  logic [N:0] ap, an, bp, bn;
  logic busy, done;
  int checks = 0, failures = 0;

  ty_bs_mul #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a random (p, n) pair of N+1-bit words with p - n = x, |x| < 2^N
  task automatic encode(input longint x, output logic [N:0] p, output logic [N:0] n);
    longint lim, r;
    lim = (longint'(1) << (N + 1)) - 1;
    r = longint'({$urandom, $urandom} & 64'h7FFF_FFFF_FFFF_FFFF);
    if (x >= 0) begin
      r = r % (lim - x + 1);
      n = (N+1)'(r); p = (N+1)'(r + x);
    end else begin
      r = r % (lim + x + 1);
      p = (N+1)'(r); n = (N+1)'(r - x);
    end
  endtask

  task automatic run(input logic [N-1:0] ff, input longint xa, input longint xb);
    logic [63:0] am, bm, expect_v;
    int cycles;
    f = ff;
    encode(xa, ap, an);
    encode(xb, bp, bn);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    am = (xa < 0) ? 64'(xa + longint'(ff)) : 64'(xa);
    bm = (xb < 0) ? 64'(xb + longint'(ff)) : 64'(xb);
    expect_v = (am * bm) % 64'(ff);
    checks++;
    if (64'(result) != expect_v) begin
      failures++;
      $display("FAIL f=%h a=%0d b=%0d got %h expect %h", ff, xa, xb, result, expect_v);
    end
    checks++;
    if (cycles != N + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, N + 1);
    end
  endtask

  function automatic longint rnd_op(input logic [N-1:0] ff);
    longint m;
    m = longint'(ff) - 1;
    return longint'({$urandom, $urandom} & 64'h7FFF_FFFF_FFFF_FFFF) % (2 * m + 1) - m;
  endfunction

  initial begin
    logic [N-1:0] ff;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ff = {N{1'b1}};
    run(ff, longint'(ff) - 1, longint'(ff) - 1);
    run(ff, -(longint'(ff) - 1), longint'(ff) - 1);
    run(ff, -(longint'(ff) - 1), -(longint'(ff) - 1));
    ff = {1'b1, {(N-2){1'b0}}, 1'b1};
    run(ff, longint'(ff) - 1, -(longint'(ff) - 1));
    run(ff, 0, -5);
    for (int k = 0; k < 300; k++) begin
      ff = N'({$urandom, $urandom});
      ff[N-1] = 1'b1;
      if (ff == {1'b1, {(N-1){1'b0}}}) ff[0] = 1'b1;
      run(ff, rnd_op(ff), rnd_op(ff));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
