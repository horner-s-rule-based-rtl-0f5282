// bm_const_phi_mul: radix-2 modular multiplication-addition (A*B + C) mod F
// for two moduli F1, F2 fixed at design time, chosen per operation by `sel`.
//
// This is the iteration of bm_radix2_mul with its phi table turned into
// constants, so no preprocessing cycle is spent.  Each iteration, MSB of A
// and C first:
//   T = 2*R + c_i + a_i*B                        (N+2 bits)
//   R = phi(T div 2^N) + T mod 2^N               phi(k) = (k*2^N) mod F
// Bit j of phi depends only on T[N+1], T[N] and sel, i.e. it is a 3-input
// function; on an FPGA it shares one LUT with the sum bit of the adder that
// forms R.  Here the two 4-entry tables are computed at elaboration and the
// selected entry is added with a plain adder, which is the same logic.
// After N iterations R[0] < 3F (< 2F when F >= 2^(N-1)+2^(N-2)); the final
// reduction compares with F and 2F, or adds 2^N - F once, depending on the
// range of the selected modulus.
//
// Interface: pulse `start` while idle with sel, a, b, c stable; `done`
// pulses N clock edges later; `result` stays valid until the next start.
// Requirements: 2^(N-1) < F1, F2 < 2^N, B < F of the selected modulus.
// The per-bit table addressed by T[N+1], T[N] and sel follows the document;
// the moduli are parameters of this design (the document gives none), and
// the handshake and final reduction are as in bm_radix2_mul.
module bm_const_phi_mul #(
  parameter int unsigned N = 32,
  parameter logic [N-1:0] F1 = 32'hC0000001,
  parameter logic [N-1:0] F2 = 32'h80000011
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         sel,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] result,
  output logic         busy,
  output logic         done
);
  // (k * 2^sh) mod f by repeated modular doubling
  function automatic logic [N-1:0] pow2mod(input int unsigned k, input int unsigned sh,
                                           input logic [N-1:0] f);
    logic [N+3:0] r;
    r = (N+4)'(k) % (N+4)'(f);
    for (int unsigned j = 0; j < sh; j++) begin
      r = r << 1;
      if (r >= (N+4)'(f)) r = r - (N+4)'(f);
    end
    return r[N-1:0];
  endfunction

  logic load, pre, step;
  logic [$clog2(N+1)-1:0] idx;
  horner_ctrl #(.ITERS(N), .PRE(0)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  logic [N-1:0] phi1 [4], phi2 [4];
  for (genvar g = 0; g < 4; g++) begin : g_phi
    localparam logic [N-1:0] V1 = pow2mod(g, N, F1);
    localparam logic [N-1:0] V2 = pow2mod(g, N, F2);
    assign phi1[g] = V1;
    assign phi2[g] = V2;
  end

  logic         sel_q;
  logic [N-1:0] a_q, b_q, c_q;
  logic [N:0]   r_q;

  logic [N+2:0] t;                   // one guard bit above the N+2 needed
  logic [N-1:0] phi_sel;
  assign t       = {1'b0, r_q, 1'b0} + (N+3)'(c_q[N-1]) + (N+3)'(a_q[N-1] ? b_q : '0);
  assign phi_sel = sel_q ? phi2[t[N+1:N]] : phi1[t[N+1:N]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_q <= 1'b0; a_q <= '0; b_q <= '0; c_q <= '0; r_q <= '0;
    end else if (load) begin
      sel_q <= sel; a_q <= a; b_q <= b; c_q <= c; r_q <= '0;
    end else if (step) begin
      r_q <= (N+1)'(phi_sel) + (N+1)'(t[N-1:0]);
      a_q <= {a_q[N-2:0], 1'b0};
      c_q <= {c_q[N-2:0], 1'b0};
    end
  end

  // ---- Modred for the selected modulus -----------------------------------
  logic [N-1:0] f_s, f_neg;
  assign f_s   = sel_q ? F2 : F1;
  assign f_neg = ~f_s + 1'b1;        // 2^N - F

  // F >= 2^(N-1)+2^(N-2): R[0] < 2F, one addition of 2^N - F
  logic [N:0]   sum_hi;
  logic [N-1:0] red_hi;
  assign sum_hi = (N+1)'(r_q[N-1:0]) + (N+1)'(f_neg);
  assign red_hi = (sum_hi[N] | r_q[N]) ? sum_hi[N-1:0] : r_q[N-1:0];

  // smaller F: R[0] < 3F, compare with F and 2F
  logic [N+1:0] f1, f2, sub_lo, red_lo;
  assign f1     = (N+2)'(f_s);
  assign f2     = (N+2)'({f_s, 1'b0});
  assign sub_lo = ((N+2)'(r_q) >= f2) ? f2 : (((N+2)'(r_q) >= f1) ? f1 : '0);
  assign red_lo = (N+2)'(r_q) - sub_lo;
  assign result = f_s[N-2] ? red_hi : red_lo[N-1:0];

  a_t_width: assert property (@(posedge clk) disable iff (!rst_n) step |-> !t[N+2]);
endmodule
