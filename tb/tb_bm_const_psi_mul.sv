// tb_bm_const_psi_mul: self-checking test of the radix-2 multiplier-adder
// with a constant psi table.  Two instances, one modulus below and one above
// 2^(N-1)+2^(N-2); random and extreme operands are compared with
// (a*b+c) mod f on 64-bit integers, and the latency must be N cycles.
module tb_bm_const_psi_mul;
  localparam int N = 32;
  localparam logic [N-1:0] F0 = 32'hC0000001, F1 = 32'h80000011;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] a, b, c, res0, res1;
  logic busy0, done0, busy1, done1;
  int checks = 0, failures = 0;

  bm_const_psi_mul #(.N(N), .F(F0)) dut0 (
    .clk, .rst_n, .start, .a, .b, .c, .result(res0), .busy(busy0), .done(done0));
  bm_const_psi_mul #(.N(N), .F(F1)) dut1 (
    .clk, .rst_n, .start, .a, .b, .c, .result(res1), .busy(busy1), .done(done1));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input logic [N-1:0] got, input logic [N-1:0] ff,
                       input logic [N-1:0] aa, bb, cc);
    longint unsigned e;
    e = ((64'(aa) * 64'(bb)) + 64'(cc)) % 64'(ff);
    checks++;
    if (64'(got) != e) begin
      failures++;
      $display("FAIL %s f=%h a=%h b=%h c=%h got %h expect %h", name, ff, aa, bb, cc, got, e);
    end
  endtask

  task automatic run(input logic [N-1:0] aa, bb, cc);
    int cycles;
    logic [N-1:0] b0;
    b0 = bb % F1;                     // below both moduli
    a = aa; b = b0; c = cc;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done0) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != N || !done1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, N);
    end
    check("dut0", res0, F0, aa, b0, cc);
    check("dut1", res1, F1, aa, b0, cc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run({N{1'b1}}, {N{1'b1}}, {N{1'b1}});
    run('0, '0, '0);
    run(1, 1, 0);
    run({N{1'b1}}, F1 - 1, {N{1'b1}});
    for (int k = 0; k < 400; k++) run($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
