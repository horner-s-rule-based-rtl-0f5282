// sp_gfpn_mul: digit-serial multiplier over GF(P^M) in polynomial basis,
// D coefficients of A per clock, with reduction before the shift and one
// extra iteration instead of a final correction (Song-Parhi).
//
// Same encoding and parameters as shu_gfpn_mul.  The accumulator S has M+D
// coefficients (degree M+D-1) and is reduced only down to degree M-1 before
// being shifted, so the partial products are never reduced:
//   T = sum_j a(D*i+j) * x^j * B                 (degree M+D-2, not reduced)
//   S = T + x^D * (S mod F)                      Modshift = mod F, then x^D
// "S mod F" removes the D top coefficients one by one (top*x^k*F for k =
// D-1..0).  After ceil(M/D) iterations S is congruent to A*B; one more
// iteration with zero digits gives S = x^D * (A*B mod F), and the Modred
// block is only a division by x^D (dropping D coefficients).
//
// Interface: pulse `start` while idle with a and b stable; `done` pulses
// ceil(M/D)+1 clock edges later; `result` stays valid until the next start.
// Defaults: P = 3, M = 97, F = x^97 + x^12 + 2, D = 2.
// The iteration and the extra iteration follow the document; coefficient
// encoding and handshake are this design's choices.
module sp_gfpn_mul #(
  parameter int unsigned P = 3,
  parameter int unsigned M = 97,
  parameter int unsigned D = 2,
  parameter logic [$clog2(P)*M-1:0] FCOEF = ($clog2(P)*M)'(1) << ($clog2(P)*12) | ($clog2(P)*M)'(2)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [$clog2(P)*M-1:0] a,
  input  logic [$clog2(P)*M-1:0] b,
  output logic [$clog2(P)*M-1:0] result,
  output logic                   busy,
  output logic                   done
);
  localparam int unsigned CW  = $clog2(P);
  localparam int unsigned NIT = (M + D - 1) / D;
  localparam int unsigned MA  = NIT * D;          // A padded to whole digit groups

  typedef logic [CW-1:0] coef_t;
  typedef coef_t poly_t [M];

  function automatic coef_t addp(input coef_t x, input coef_t y);
    logic [CW:0] s;
    s = (CW+1)'(x) + (CW+1)'(y);
    if (s >= (CW+1)'(P)) s = s - (CW+1)'(P);
    return s[CW-1:0];
  endfunction

  function automatic coef_t mulp(input coef_t x, input coef_t y);
    logic [2*CW-1:0] pr;
    pr = (2*CW)'(x) * (2*CW)'(y);
    return CW'(pr % (2*CW)'(P));
  endfunction

  function automatic coef_t negp(input coef_t x);
    return (x == '0) ? '0 : CW'(P) - x;
  endfunction

  localparam int unsigned MS = M + D;             // coefficients of S

  typedef coef_t spoly_t [MS];

  // S mod F: fold the top D coefficients back, highest first
  function automatic spoly_t reduce_top(input spoly_t s);
    spoly_t o;
    o = s;
    for (int k = MS - 1; k >= M; k--) begin
      coef_t t;
      t = negp(o[k]);
      o[k] = '0;
      for (int j = 0; j < M; j++)
        o[k-M+j] = addp(o[k-M+j], mulp(t, FCOEF[CW*j +: CW]));
    end
    return o;
  endfunction

  logic load, pre, step;
  logic [$clog2(NIT+2)-1:0] idx;
  horner_ctrl #(.ITERS(NIT + 1), .PRE(0)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  coef_t  a_q [MA];
  poly_t  b_q;
  spoly_t s_q, s_red, s_d;

  always_comb begin
    s_red = reduce_top(s_q);
    // x^D * (S mod F): degree M-1 shifted up by D
    for (int c = 0; c < MS; c++) s_d[c] = (c >= D) ? s_red[c-D] : '0;
    // + T = sum_j a(D*i+j) x^j B
    for (int j = 0; j < D; j++)
      for (int c = 0; c < M; c++)
        s_d[c+j] = addp(s_d[c+j], mulp(a_q[MA-D+j], b_q[c]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < MA; c++) a_q[c] <= '0;
      for (int c = 0; c < M; c++) b_q[c] <= '0;
      for (int c = 0; c < MS; c++) s_q[c] <= '0;
    end else if (load) begin
      for (int c = 0; c < MA; c++) a_q[c] <= (c < M) ? a[CW*c +: CW] : '0;
      for (int c = 0; c < M; c++) b_q[c] <= b[CW*c +: CW];
      for (int c = 0; c < MS; c++) s_q[c] <= '0;
    end else if (step) begin
      for (int c = MA - 1; c >= D; c--) a_q[c] <= a_q[c-D];
      for (int c = 0; c < D; c++) a_q[c] <= '0;
      s_q <= s_d;
    end
  end

  // Modred: divide by x^D
  always_comb
    for (int c = 0; c < M; c++) result[CW*c +: CW] = s_q[c+D];

  a_low_zero: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (s_q[0] == '0) && (s_q[D-1] == '0));
endmodule
