// tb_ks_modred: self-checking test of the carry-save final reduction.
// Any pair of N-bit words rs, rc is a legal input; the output must equal
// (rs + 2*rc) mod F.  Two constant moduli are tried with random words and
// with the corner cases that drive V close to 3F.
module tb_ks_modred;
  localparam int N = 32;
  localparam logic [N-1:0] F0 = 32'hC0000001;
  localparam logic [N-1:0] F1 = 32'h80000011;
  logic clk = 0;
  logic [N-1:0] rs, rc, r0, r1;
  int checks = 0, failures = 0, cyc = 0;

  ks_modred #(.N(N), .F(F0)) dut0 (.rs, .rc, .result(r0));
  ks_modred #(.N(N), .F(F1)) dut1 (.rs, .rc, .result(r1));

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

  task automatic check(input logic [N-1:0] s, c);
    logic [63:0] v;
    rs = s; rc = c;
    @(negedge clk);
    v = 64'(s) + 2 * 64'(c);
    checks += 2;
    if (64'(r0) != v % 64'(F0)) begin
      failures++; $display("FAIL F0 rs=%h rc=%h got %h", s, c, r0);
    end
    if (64'(r1) != v % 64'(F1)) begin
      failures++; $display("FAIL F1 rs=%h rc=%h got %h", s, c, r1);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check('0, '1);
    check(F0, '0);
    check(F1, '0);
    check('0, {1'b1, {(N-1){1'b0}}});
    for (int k = 0; k < 5000; k++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
