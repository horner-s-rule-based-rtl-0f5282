// shu_gfpn_mul: digit-serial multiplier over GF(P^M) in polynomial basis,
// D coefficients of A per clock, partial result kept reduced (Shu et al.).
//
// Elements are polynomials of degree < M with coefficients mod P, packed
// CW = ceil(log2 P) bits per coefficient, coefficient j at [CW*j +: CW].
// F(x) = x^M + sum f_j x^j is a monic irreducible polynomial fixed at design
// time (FCOEF holds f_0..f_(M-1)).  Each iteration, highest digit group of A
// first:
//   S = x^D * R mod F                          Modshift
//   R = S + sum_j (x^j * a(D*i+j) * B) mod F   Modsum, j = 0..D-1
// Multiplying by x mod F is a shift plus subtracting top*f_j from each
// coefficient; D of them are chained.  After ceil(M/D) iterations R = A*B mod
// F, no final reduction needed.
//
// Interface: pulse `start` while idle with a and b stable; `done` pulses
// ceil(M/D) clock edges later; `result` stays valid until the next start.
// Defaults: P = 3, M = 97, F = x^97 + x^12 + 2 (the field used as example in
// the document) and D = 2 (the digit size of its drawing).
// The iteration follows the document; coefficient encoding (binary value
// 0..P-1) and the handshake are this design's choices.
module shu_gfpn_mul #(
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

  // x * r mod F
  function automatic poly_t xtimes(input poly_t r);
    poly_t o;
    coef_t t;
    t = negp(r[M-1]);
    for (int j = 0; j < M; j++) begin
      o[j] = addp((j == 0) ? '0 : r[j-1], mulp(t, FCOEF[CW*j +: CW]));
    end
    return o;
  endfunction

  logic load, pre, step;
  logic [$clog2(NIT+1)-1:0] idx;
  horner_ctrl #(.ITERS(NIT), .PRE(0)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  coef_t a_q [MA];
  poly_t b_q, r_q, r_d;

  // Modshift: x^D * R mod F
  poly_t shift_c [D+1];
  // Modsum: the D reduced partial products x^j * a * B mod F
  poly_t pp_c [D];

  always_comb begin
    poly_t acc;
    shift_c[0] = r_q;
    for (int s = 0; s < D; s++) shift_c[s+1] = xtimes(shift_c[s]);
    for (int j = 0; j < D; j++) begin
      poly_t pp;
      for (int c = 0; c < M; c++) pp[c] = mulp(a_q[MA-D+j], b_q[c]);
      for (int s = 0; s < j; s++) pp = xtimes(pp);
      pp_c[j] = pp;
    end
    acc = shift_c[D];
    for (int j = 0; j < D; j++)
      for (int c = 0; c < M; c++) acc[c] = addp(acc[c], pp_c[j][c]);
    r_d = acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < MA; c++) a_q[c] <= '0;
      for (int c = 0; c < M; c++) begin b_q[c] <= '0; r_q[c] <= '0; end
    end else if (load) begin
      for (int c = 0; c < MA; c++) a_q[c] <= (c < M) ? a[CW*c +: CW] : '0;
      for (int c = 0; c < M; c++) begin b_q[c] <= b[CW*c +: CW]; r_q[c] <= '0; end
    end else if (step) begin
      for (int c = MA - 1; c >= D; c--) a_q[c] <= a_q[c-D];
      for (int c = 0; c < D; c++) a_q[c] <= '0;
      r_q <= r_d;
    end
  end

  always_comb
    for (int c = 0; c < M; c++) result[CW*c +: CW] = r_q[c];
endmodule
