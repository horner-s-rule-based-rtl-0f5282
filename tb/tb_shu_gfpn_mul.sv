// tb_shu_gfpn_mul: self-checking test of shu_gfpn_mul over GF(3^97) with
// F = x^97 + x^12 + 2, at the default digit size D = 2 and at D = 3.
// Operands are random (plus 0, 1 and the all-(P-1) polynomial); the product
// is compared with a schoolbook multiplication followed by reduction modulo
// F, and the start-to-done latency must be ceil(M/D) cycles.
module tb_shu_gfpn_mul;
  localparam int P = 3, M = 97, CW = 2;
  localparam logic [CW*M-1:0] FC = (CW*M)'(1) << (CW*12) | (CW*M)'(2);
  logic clk = 0, rst_n = 0;
  logic [1:0] start = '0, busy, done;
  logic [CW*M-1:0] a, b;
  logic [CW*M-1:0] result [2];
  int checks = 0, failures = 0;

  shu_gfpn_mul #(.P(P), .M(M), .D(2), .FCOEF(FC)) dut0 (.clk, .rst_n, .start(start[0]), .a, .b,
      .result(result[0]), .busy(busy[0]), .done(done[0]));
  shu_gfpn_mul #(.P(P), .M(M), .D(3), .FCOEF(FC)) dut1 (.clk, .rst_n, .start(start[1]), .a, .b,
      .result(result[1]), .busy(busy[1]), .done(done[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: a*b mod F over GF(P)
  function automatic logic [CW*M-1:0] ref_mul(input logic [CW*M-1:0] x, y);
    int prod [2*M-1];
    logic [CW*M-1:0] o;
    foreach (prod[i]) prod[i] = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        prod[i+j] = (prod[i+j] + int'(x[CW*i +: CW]) * int'(y[CW*j +: CW])) % P;
    for (int k = 2*M-2; k >= M; k--) begin
      int t;
      t = prod[k];
      prod[k] = 0;
      for (int j = 0; j < M; j++)
        prod[k-M+j] = (prod[k-M+j] + (P - t) * int'(FC[CW*j +: CW])) % P;
    end
    for (int i = 0; i < M; i++) o[CW*i +: CW] = CW'(prod[i]);
    return o;
  endfunction

  function automatic logic [CW*M-1:0] rnd_poly();
    logic [CW*M-1:0] o;
    for (int i = 0; i < M; i++) o[CW*i +: CW] = CW'($urandom % P);
    return o;
  endfunction

  task automatic run(input int d, input logic [CW*M-1:0] x, y);
    logic [CW*M-1:0] want;
    int cycles, lat;
    a = x; b = y;
    lat = d ? (M + 2) / 3 : (M + 1) / 2;
    @(negedge clk) start[d] = 1'b1;
    @(negedge clk) start[d] = 1'b0;
    cycles = 0;
    while (!done[d]) begin @(negedge clk); cycles++; end
    want = ref_mul(x, y);
    checks++;
    if (result[d] != want) begin
      failures++;
      $display("FAIL dut%0d: got %h want %h", d, result[d], want);
    end
    checks++;
    if (cycles != lat) begin
      failures++;
      $display("FAIL dut%0d latency %0d expected %0d", d, cycles, lat);
    end
  endtask

  initial begin
    logic [CW*M-1:0] all2;
    for (int i = 0; i < M; i++) all2[CW*i +: CW] = CW'(P - 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      run(d, all2, all2);
      run(d, '0, all2);
      run(d, (CW*M)'(1), all2);
      run(d, all2, (CW*M)'(1) << (CW*(M-1)));
      for (int k = 0; k < 60; k++) run(d, rnd_poly(), rnd_poly());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
