// kh_cs_mul: carry-save modular multiplier A*B mod F with the modulus given
// at run time, using sign estimation (Koc-Hung).
//
// R is a signed carry-save number R = rs + 2*rc, rs on N+4 and rc on N+3
// bits, two's complement, and stays within [-6F, 7F].  Each iteration:
//   k   = rs[N+3:N-1] + rc[N+2:N-2]          5-bit CRA (top bits of 2R)
//   low = rs[N-2:0] + 2*rc[N-3:0] + a_i*B[N-1:1]  CSA; bit 0 is a_i*b_0
//   es+ = ~k4 & (k3 | k2 | k1)                R clearly positive
//   es- = k4 & (~k3 | ~k2 | ~k1 & ~k0)        R clearly negative
//   R   <- 2R + a_i*B - 8F (es+),  + 8F (es-),  unchanged otherwise
// The correction is a multiple of 8F, so after N iterations R = AB + 8aF.
// Three more iterations with a_i = 0 give R = 8AB + 8bF in [-6F, 7F]; it is a
// multiple of 8 and R/8 lies in (-F, F).  The final step converts R to two's
// complement, divides by 8 and adds F if the quotient is negative.
//
// Interface: pulse `start` while idle with f, a, b stable (A, B < F);
// `done` pulses N+3 clock edges later; `result` stays valid until the next
// start.  `est` shows the estimator's answer ({es+, es-}) while an
// iteration runs.  Requirement: 2^(N-1) < F < 2^N.
// The estimate k, the logic equations for es+/es- and the iteration follow
// the document.  The correction +-8F is added here by a second full CSA row
// (modulo 2^(N+4)) instead of the hand-optimised top bits of the document's
// improved stage; both give the same sum.  The closing conversion is this
// design's choice.
module kh_cs_mul #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] f,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] result,
  output logic         busy,
  output logic         done,
  output logic [1:0]   est          // {es+, es-} of the current iteration (status)
);
  localparam int unsigned W = N + 4;

  logic load, pre, step;
  logic [$clog2(N+4)-1:0] idx;
  horner_ctrl #(.ITERS(N + 3), .PRE(0)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  logic [N-1:0] f_q, a_q, b_q;
  logic [W-1:0] rs_q;
  logic [W-2:0] rc_q;

  // ---- sign estimate ----
  logic [4:0] k;
  logic       es_p, es_m;
  assign k    = rs_q[N+3:N-1] + rc_q[N+2:N-2];
  assign es_p = ~k[4] & (k[3] | k[2] | k[1]);
  assign es_m =  k[4] & (~k[3] | ~k[2] | (~k[1] & ~k[0]));
  assign est  = {es_p, es_m};

  // ---- T = 2R + a_i*B : low part in carry-save, top five bits are k ----
  logic [N-1:0] pp;
  logic [N-2:0] ls, lc;
  assign pp = a_q[N-1] ? b_q : '0;
  csa_row #(.W(N-1)) u_csa_low (
    .x(rs_q[N-2:0]), .y({rc_q[N-3:0], 1'b0}), .z(pp[N-1:1]), .s(ls), .c(lc)
  );

  logic [W-1:0] ts, tc2, corr;
  assign ts   = {k[3:0], ls, pp[0]};            // weights 2^0 .. 2^(N+3)
  assign tc2  = W'({lc, 2'b00});                // 2*Tc, lc[j] has weight 2^(j+2)

  // +-8F modulo 2^(N+4)
  logic [W-1:0] f8;
  assign f8   = {1'b0, f_q, 3'b000};
  assign corr = es_p ? (~f8 + 1'b1) : (es_m ? f8 : '0);

  logic [W-1:0] rs_d, rc_d;
  csa_row #(.W(W)) u_csa_corr (.x(ts), .y(tc2), .z(corr), .s(rs_d), .c(rc_d));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_q <= '0; a_q <= '0; b_q <= '0; rs_q <= '0; rc_q <= '0;
    end else if (load) begin
      f_q <= f; a_q <= a; b_q <= b; rs_q <= '0; rc_q <= '0;
    end else if (step) begin
      a_q  <= {a_q[N-2:0], 1'b0};
      rs_q <= rs_d;
      rc_q <= rc_d[W-2:0];
    end
  end

  // ---- Modred: to two's complement, divide by 8, correct the sign ----
  logic [W-1:0] v;
  logic [N:0]   q, qf;
  assign v      = rs_q + {rc_q, 1'b0};
  assign q      = v[W-1:3];
  assign qf     = q + (N+1)'(f_q);
  assign result = q[N] ? qf[N-1:0] : q[N-1:0];

  a_mult8: assert property (@(posedge clk) disable iff (!rst_n) done |-> v[2:0] == 3'b000);
  a_est:   assert property (@(posedge clk) disable iff (!rst_n) !(es_p && es_m));
endmodule
