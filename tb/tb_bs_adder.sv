// tb_bs_adder: self-checking test of the borrow-save adder.
// Random digit vectors, including all-ones and all-zeros corners; the
// value ZP - ZN must equal (XP - XN) + (YP - YN).
module tb_bs_adder;
  localparam int D = 12;
  logic clk = 0;
  logic [D-1:0] xp, xn, yp, yn;
  logic [D:0] zp, zn;
  int checks = 0, failures = 0, cyc = 0;

  bs_adder #(.D(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input logic [D-1:0] a, b, c, d);
    int want, got;
    xp = a; xn = b; yp = c; yn = d;
    @(negedge clk);
    want = int'(a) - int'(b) + int'(c) - int'(d);
    got  = int'(zp) - int'(zn);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %h %h %h %h: got %0d want %0d", a, b, c, d, got, want);
    end
  endtask

  initial begin
    check('1, '0, '1, '0);
    check('0, '1, '0, '1);
    check('1, '1, '1, '1);
    check('0, '0, '0, '0);
    for (int k = 0; k < 20000; k++) check(D'($urandom), D'($urandom), D'($urandom), D'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
