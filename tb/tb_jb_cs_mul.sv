// tb_jb_cs_mul: self-checking test of jb_cs_mul.
// Two instances with different constant moduli (the default one and one
// just above 2^(N-1), the smallest allowed) multiply random and extreme
// operands; each result is compared with a*b mod F computed on 64-bit
// integers, and the start-to-done latency must be N cycles (one per bit of A).
module tb_jb_cs_mul;
  localparam int N = 32;
  localparam logic [N-1:0] F0 = 32'hC0000001;
  localparam logic [N-1:0] F1 = 32'h80000011;
  localparam logic [N-1:0] B0 = 32'h12345678;
  localparam logic [N-1:0] B1 = 32'h7FFFFFF3;
  logic clk = 0, rst_n = 0;
  logic [1:0] start = '0;
  logic [N-1:0] a, b;
  logic [N-1:0] result [2];
  logic [1:0] busy, done;
  int checks = 0, failures = 0;

  jb_cs_mul #(.N(N), .F(F0)) dut0 (.clk, .rst_n, .start(start[0]), .a, .b(b),
      .result(result[0]), .busy(busy[0]), .done(done[0]));
  jb_cs_mul #(.N(N), .F(F1)) dut1 (.clk, .rst_n, .start(start[1]), .a, .b(b),
      .result(result[1]), .busy(busy[1]), .done(done[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int d, input logic [N-1:0] ff, aa, bb);
    logic [63:0] expect_v;
    int cycles;
    a = aa; b = bb;
    @(negedge clk) start[d] = 1'b1;
    @(negedge clk) start[d] = 1'b0;
    cycles = 0;
    while (!done[d]) begin @(negedge clk); cycles++; end
    expect_v = (64'(aa) * 64'(bb)) % 64'(ff);
    checks++;
    if (64'(result[d]) != expect_v) begin
      failures++;
      $display("FAIL dut%0d a=%h b=%h got %h expect %h", d, aa, bb, result[d], expect_v);
    end
    checks++;
    if (cycles != N) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, N);
    end
  endtask

  initial begin
    logic [N-1:0] bb;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      automatic logic [N-1:0] ff = d ? F1 : F0;
      bb = d ? B1 : B0;
      run(d, ff, '1, bb);
      run(d, ff, '0, bb);
      run(d, ff, 1, bb);
      bb = ff - 1;
      run(d, ff, ff - 1, bb);
      run(d, ff, '1, bb);
      for (int k = 0; k < 200; k++) begin
        bb = d ? (($urandom % 2) ? B1 : $urandom % ff) : $urandom % ff;
        bb = ("jb_cs_mul" == "amanor_cs_mul") ? (d ? B1 : B0) : bb;
        run(d, ff, $urandom, bb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
