// tb_bs_reduce: exhaustive test of the borrow-save modular correction for
// N = 6.  For every modulus 32 < F < 64 and every (N+2)-digit encoding with
// -2F < A < 2F, the output must be congruent to A modulo F and lie in
// (-F, F).
module tb_bs_reduce;
  localparam int N = 6;
  logic clk = 0;
  logic [N-1:0] f;
  logic [N+1:0] ap, an;
  logic [N:0] rp, rn;
  int checks = 0, failures = 0;
  longint cyc = 0;

  bs_reduce #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 2000000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int ff = 33; ff < 64; ff++) begin
      for (int p = 0; p < (1 << (N + 2)); p++) begin
        for (int n = 0; n < (1 << (N + 2)); n++) begin
          int a, r;
          a = p - n;
          if (a <= -2 * ff || a >= 2 * ff) continue;
          f = N'(ff); ap = (N+2)'(p); an = (N+2)'(n);
          @(negedge clk);
          r = int'(rp) - int'(rn);
          checks++;
          if (r <= -ff || r >= ff || ((a - r) % ff) != 0) begin
            failures++;
            if (failures < 10) $display("FAIL f=%0d a=%0d (p=%h n=%h) got %0d", ff, a, p, n, r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
