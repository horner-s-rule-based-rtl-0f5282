// horner_top: the family of Horner's-rule modular multipliers, side by side.
//
// Every multiplier here computes A*B mod F with the same loop: a register R,
// a partial-product generator (a_i * B), a Modshift block producing
// S = R << 1 modulo F, a Modsum block producing R = S + a_i*B modulo F, and a
// final Modred block that reduces and converts the redundant result.  They
// differ in the number system of R and in where the reduction sits:
//   bm1_*  radix-2, run-time modulus, phi table built on the fly  (A*B+C)
//   bm2_*  radix-2, run-time modulus, psi table, R[0] < 2F        (A*B+C)
//   bc1_*  radix-2, constant phi tables for F and F2, bc1_sel picks (A*B+C)
//   bc2_*  radix-2, constant psi table for F                      (A*B+C)
//   kh_*   carry-save with sign estimation, run-time modulus
//   ty_*   borrow-save (signed digits), run-time modulus
//   ks_*   carry-save, constant modulus F, 6-entry ROM
//   jb_*   carry-save, constant modulus F, shift-then-reduce, 2 ROMs
//   am_*   carry-save, constant modulus F and constant multiplicand AM_B
//   pe_*   carry-save, constant F, reduce-then-shift, extra iteration
//   shu_*  GF(P^M), D coefficients per cycle, R kept reduced
//   sp_*   GF(P^M), D coefficients per cycle, reduce-then-shift
// The designs are independent: each has its own start/busy/done handshake
// (pulse start while idle; done pulses when result is valid; result holds
// until the next start) and its own operand ports.  Latencies in clock
// edges from start to done: bm1/bm2 N+1, bc1/bc2 N, kh N+3, ty N+1, ks/jb/am N,
// pe N+1, shu ceil(M/D), sp ceil(M/D)+1.
// Defaults: N = 32, F = 3*2^30 + 1 (a prime), GF(3^97) with F(x) = x^97 + x^12 + 2,
// D = 2.  The modulus sizes and the GF(3^97) field come from the document's
// evaluation and examples; the particular moduli F, F2 and AM_B are this
// design's.
module horner_top #(
  parameter int unsigned N    = 32,
  parameter logic [N-1:0] F   = 32'hC0000001,
  parameter logic [N-1:0] F2  = 32'h80000011,
  parameter logic [N-1:0] AM_B = 32'h12345678,
  parameter int unsigned P    = 3,
  parameter int unsigned M    = 97,
  parameter int unsigned D    = 2,
  parameter logic [$clog2(P)*M-1:0] FCOEF = ($clog2(P)*M)'(1) << ($clog2(P)*12) | ($clog2(P)*M)'(2)
) (
  input  logic clk,
  input  logic rst_n,
  // radix-2, phi table
  input  logic         bm1_start,
  input  logic [N-1:0] bm1_f, bm1_a, bm1_b, bm1_c,
  output logic [N-1:0] bm1_result,
  output logic         bm1_busy, bm1_done,
  // radix-2, psi table
  input  logic         bm2_start,
  input  logic [N-1:0] bm2_f, bm2_a, bm2_b, bm2_c,
  output logic [N-1:0] bm2_result,
  output logic         bm2_busy, bm2_done,
  // carry-save with sign estimation
  input  logic         kh_start,
  input  logic [N-1:0] kh_f, kh_a, kh_b,
  output logic [N-1:0] kh_result,
  output logic         kh_busy, kh_done,
  output logic [1:0]   kh_est,
  // borrow-save
  input  logic         ty_start,
  input  logic [N-1:0] ty_f,
  input  logic [N:0]   ty_ap, ty_an, ty_bp, ty_bn,
  output logic [N-1:0] ty_result,
  output logic         ty_busy, ty_done,
  // carry-save, constant modulus
  input  logic         ks_start,
  input  logic [N-1:0] ks_a, ks_b,
  output logic [N-1:0] ks_result,
  output logic         ks_busy, ks_done,
  input  logic         jb_start,
  input  logic [N-1:0] jb_a, jb_b,
  output logic [N-1:0] jb_result,
  output logic         jb_busy, jb_done,
  input  logic         am_start,
  input  logic [N-1:0] am_a,
  output logic [N-1:0] am_result,
  output logic         am_busy, am_done,
  input  logic         pe_start,
  input  logic [N-1:0] pe_a, pe_b,
  output logic [N-1:0] pe_result,
  output logic         pe_busy, pe_done,
  // GF(P^M)
  input  logic                   shu_start,
  input  logic [$clog2(P)*M-1:0] shu_a, shu_b,
  output logic [$clog2(P)*M-1:0] shu_result,
  output logic                   shu_busy, shu_done,
  input  logic                   sp_start,
  input  logic [$clog2(P)*M-1:0] sp_a, sp_b,
  output logic [$clog2(P)*M-1:0] sp_result,
  output logic                   sp_busy, sp_done,
  // radix-2, constant phi tables, two moduli
  input  logic         bc1_start, bc1_sel,
  input  logic [N-1:0] bc1_a, bc1_b, bc1_c,
  output logic [N-1:0] bc1_result,
  output logic         bc1_busy, bc1_done,
  // radix-2, constant psi table
  input  logic         bc2_start,
  input  logic [N-1:0] bc2_a, bc2_b, bc2_c,
  output logic [N-1:0] bc2_result,
  output logic         bc2_busy, bc2_done
);
  bm_radix2_mul #(.N(N)) u_bm1 (
    .clk, .rst_n, .start(bm1_start), .f(bm1_f), .a(bm1_a), .b(bm1_b), .c(bm1_c),
    .result(bm1_result), .busy(bm1_busy), .done(bm1_done)
  );
  bm_radix2_psi_mul #(.N(N)) u_bm2 (
    .clk, .rst_n, .start(bm2_start), .f(bm2_f), .a(bm2_a), .b(bm2_b), .c(bm2_c),
    .result(bm2_result), .busy(bm2_busy), .done(bm2_done)
  );
  bm_const_phi_mul #(.N(N), .F1(F), .F2(F2)) u_bc1 (
    .clk, .rst_n, .start(bc1_start), .sel(bc1_sel), .a(bc1_a), .b(bc1_b), .c(bc1_c),
    .result(bc1_result), .busy(bc1_busy), .done(bc1_done)
  );
  bm_const_psi_mul #(.N(N), .F(F)) u_bc2 (
    .clk, .rst_n, .start(bc2_start), .a(bc2_a), .b(bc2_b), .c(bc2_c),
    .result(bc2_result), .busy(bc2_busy), .done(bc2_done)
  );
  kh_cs_mul #(.N(N)) u_kh (
    .clk, .rst_n, .start(kh_start), .f(kh_f), .a(kh_a), .b(kh_b),
    .result(kh_result), .busy(kh_busy), .done(kh_done), .est(kh_est)
  );
  ty_bs_mul #(.N(N)) u_ty (
    .clk, .rst_n, .start(ty_start), .f(ty_f), .ap(ty_ap), .an(ty_an), .bp(ty_bp), .bn(ty_bn),
    .result(ty_result), .busy(ty_busy), .done(ty_done)
  );
  ks_cs_mul #(.N(N), .F(F)) u_ks (
    .clk, .rst_n, .start(ks_start), .a(ks_a), .b(ks_b),
    .result(ks_result), .busy(ks_busy), .done(ks_done)
  );
  jb_cs_mul #(.N(N), .F(F)) u_jb (
    .clk, .rst_n, .start(jb_start), .a(jb_a), .b(jb_b),
    .result(jb_result), .busy(jb_busy), .done(jb_done)
  );
  amanor_cs_mul #(.N(N), .F(F), .B(AM_B)) u_am (
    .clk, .rst_n, .start(am_start), .a(am_a),
    .result(am_result), .busy(am_busy), .done(am_done)
  );
  peeters_cs_mul #(.N(N), .F(F)) u_pe (
    .clk, .rst_n, .start(pe_start), .a(pe_a), .b(pe_b),
    .result(pe_result), .busy(pe_busy), .done(pe_done)
  );
  shu_gfpn_mul #(.P(P), .M(M), .D(D), .FCOEF(FCOEF)) u_shu (
    .clk, .rst_n, .start(shu_start), .a(shu_a), .b(shu_b),
    .result(shu_result), .busy(shu_busy), .done(shu_done)
  );
  sp_gfpn_mul #(.P(P), .M(M), .D(D), .FCOEF(FCOEF)) u_sp (
    .clk, .rst_n, .start(sp_start), .a(sp_a), .b(sp_b),
    .result(sp_result), .busy(sp_busy), .done(sp_done)
  );
endmodule
