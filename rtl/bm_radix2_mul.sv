// bm_radix2_mul: radix-2 modular multiplication-addition (A*B + C) mod F
// with the modulus given at run time (first Beuchat-Muller scheme).
//
// Operands are plain binary numbers, so every adder is a carry-ripple adder
// that maps onto an FPGA carry chain.  Each iteration, MSB of A and C first:
//   S = 2*R                          (Modshift: a wire shift)
//   T = S + c_i + a_i*B              (N+2 bits)
//   R = phi(T div 2^N) + T mod 2^N   with phi(k) = (k * 2^N) mod F
// phi is a 4-entry table (phi(0) = 0) held in three registers.  They are
// filled on the fly by the recurrence
//   phi(k) = phi(k-1) - 2F + 2^N   if that is >= 0, else phi(k-1) - F + 2^N
// one value per clock: Register 1 keeps phi(1), Register 2 phi(2) and
// Register 3 runs on to phi(3).  Only one preprocessing cycle is spent before
// the first iteration, because the early iterations cannot yet address the
// later entries.  After N iterations R[0] is congruent to AB+C and is below
// 3F (below 2F when F >= 2^(N-1)+2^(N-2)); the final reduction implements
// both variants and picks one with bit N-2 of F.
//
// Interface: pulse `start` while idle with a, b, c and f stable for that
// cycle; `done` pulses N+1 clock edges later and `result` stays valid until
// the next start.  Requirements: 2^(N-1) < F < 2^N, B < F.
// The iteration, the table recurrence, its register/load schedule and both
// reductions follow the document.  The comparisons of the 3F-variant use
// ">=" where the figure prints ">", since R[0] = F must reduce to 0; the
// start/done handshake is this design's choice.
module bm_radix2_mul #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] f,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] result,
  output logic         busy,
  output logic         done
);
  logic load, pre, step;
  logic [$clog2(N+2)-1:0] idx;

  horner_ctrl #(.ITERS(N), .PRE(1)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  logic [N-1:0] f_q, a_q, b_q, c_q;
  logic [N:0]   r_q;                 // R[i+1], N+1 bits

  // ---- phi table, built on the fly -------------------------------------
  logic [N-1:0] phi1_q, phi2_q, phi3_q;
  logic [1:0]   phase_q;             // cycles since start, saturating at 3
  logic         ld1, ld2, ld3;
  logic [N:0]   two_f_m;             // 2F - 2^N
  logic [N+1:0] d;                   // phi(k-1) - 2F + 2^N, signed
  logic [N-1:0] phi_next;

  assign ld1 = busy && (phase_q == 2'd0);
  assign ld2 = busy && (phase_q <= 2'd1);
  assign ld3 = busy && (phase_q <= 2'd2);

  assign two_f_m  = {f_q, 1'b0} - {1'b1, {N{1'b0}}};
  assign d        = {2'b00, phi3_q} - {1'b0, two_f_m};
  assign phi_next = d[N-1:0] + (f_q & {N{d[N+1]}});

  // ---- iteration stage ---------------------------------------------------
  logic [N+2:0] t;                   // one guard bit above the N+2 of the text
  logic [N-1:0] phi_sel;

  assign t = {1'b0, r_q, 1'b0} + (N+3)'(c_q[N-1]) + (N+3)'(a_q[N-1] ? b_q : '0);

  always_comb begin
    unique case (t[N+1:N])
      2'b00:   phi_sel = '0;
      2'b01:   phi_sel = phi1_q;
      2'b10:   phi_sel = phi2_q;
      default: phi_sel = phi3_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_q <= '0; a_q <= '0; b_q <= '0; c_q <= '0; r_q <= '0;
      phi1_q <= '0; phi2_q <= '0; phi3_q <= '0; phase_q <= '0;
    end else if (load) begin
      f_q <= f; a_q <= a; b_q <= b; c_q <= c; r_q <= '0;
      phi1_q <= '0; phi2_q <= '0; phi3_q <= '0; phase_q <= '0;   // Clr
    end else begin
      if (busy && phase_q != 2'd3) phase_q <= phase_q + 2'd1;
      if (ld1) phi1_q <= phi_next;
      if (ld2) phi2_q <= phi_next;
      if (ld3) phi3_q <= phi_next;
      if (step) begin
        r_q <= (N+1)'(phi_sel) + (N+1)'(t[N-1:0]);
        a_q <= {a_q[N-2:0], 1'b0};
        c_q <= {c_q[N-2:0], 1'b0};
      end
    end
  end

  // ---- Modred ------------------------------------------------------------
  // F >= 2^(N-1)+2^(N-2): R[0] < 2F, one addition of 2^N - F.
  logic [N:0]   sum_hi;
  logic [N-1:0] red_hi, f_neg;
  assign f_neg  = ~f_q + 1'b1;       // 2^N - F
  assign sum_hi = (N+1)'(r_q[N-1:0]) + (N+1)'(f_neg);
  assign red_hi = (sum_hi[N] | r_q[N]) ? sum_hi[N-1:0] : r_q[N-1:0];

  // F < 2^(N-1)+2^(N-2): R[0] < 3F, compare with F and 2F and subtract.
  logic [N+1:0] f1, f2, sub_lo;
  assign f1     = (N+2)'(f_q);
  assign f2     = (N+2)'({f_q, 1'b0});
  assign sub_lo = ((N+2)'(r_q) >= f2) ? f2 : (((N+2)'(r_q) >= f1) ? f1 : '0);

  logic [N+1:0] red_lo;
  assign red_lo = (N+2)'(r_q) - sub_lo;
  assign result = f_q[N-2] ? red_hi : red_lo[N-1:0];

  a_t_width: assert property (@(posedge clk) disable iff (!rst_n) step |-> !t[N+2]);
endmodule
