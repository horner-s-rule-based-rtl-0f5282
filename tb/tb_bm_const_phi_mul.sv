// tb_bm_const_phi_mul: self-checking test of the two-modulus radix-2
// multiplier-adder with constant phi tables.  Two instances with different
// modulus pairs (each pair has one modulus below and one above
// 2^(N-1)+2^(N-2), so both final reductions are used); every operation picks
// a random modulus with `sel`.  Results are compared with (a*b+c) mod f on
// 64-bit integers and the start-to-done latency must be N cycles.
module tb_bm_const_phi_mul;
  localparam int N = 32;
  localparam logic [N-1:0] F1A = 32'hC0000001, F2A = 32'h80000011;
  localparam logic [N-1:0] F1B = 32'hA0000007, F2B = 32'hFFFFFFFB;

  logic clk = 0, rst_n = 0, start = 0, sel;
  logic [N-1:0] a, b, c, res0, res1;
  logic busy0, done0, busy1, done1;
  int checks = 0, failures = 0;

  bm_const_phi_mul #(.N(N), .F1(F1A), .F2(F2A)) dut0 (
    .clk, .rst_n, .start, .sel, .a, .b, .c, .result(res0), .busy(busy0), .done(done0));
  bm_const_phi_mul #(.N(N), .F1(F1B), .F2(F2B)) dut1 (
    .clk, .rst_n, .start, .sel, .a, .b, .c, .result(res1), .busy(busy1), .done(done1));

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

  task automatic run(input logic s, input logic [N-1:0] aa, bb, cc);
    int cycles;
    logic [N-1:0] fa, fb, b0, b1;
    fa = s ? F2A : F1A;
    fb = s ? F2B : F1B;
    // B must be below the selected modulus of both instances
    b0 = bb % (fa < fb ? fa : fb);
    sel = s; a = aa; b = b0; c = cc;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done0) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != N || !done1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, N);
    end
    check("dut0", res0, fa, aa, b0, cc);
    check("dut1", res1, fb, aa, b0, cc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 2; s++) begin
      run(s[0], {N{1'b1}}, {N{1'b1}}, {N{1'b1}});
      run(s[0], '0, '0, '0);
      run(s[0], 1, 1, 0);
      run(s[0], {N{1'b1}}, 32'h7FFFFFFF, 0);
    end
    for (int k = 0; k < 400; k++) run(1'($urandom_range(0, 1)), $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
