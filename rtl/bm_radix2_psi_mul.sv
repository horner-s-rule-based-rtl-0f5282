// bm_radix2_psi_mul: radix-2 modular multiplication-addition (A*B + C) mod F
// with the modulus given at run time (second Beuchat-Muller scheme).
//
// Same loop as bm_radix2_mul, but the top three bits of T are folded back:
//   T = 2*R + c_i + a_i*B                          (N+2 bits)
//   R = psi(T div 2^(N-1)) + T mod 2^(N-1)        psi(k) = (k*2^(N-1)) mod F
// which keeps R[0] below 2F, so the final reduction is one conditional
// subtraction.  psi(0) = 0 and psi(1) = 2^(N-1) are constants; psi(2..7) sit
// in six registers filled on the fly by two copies of the recurrence
//   psi(k+2) = psi(k) + 2^N - 2F  if that is >= 0, else psi(k) + 2^N - F
// one starting from psi(0) (even entries, Registers 2, 4, 6) and one from
// psi(1) (odd entries, Registers 1, 3, 5).  Registers 5 and 6 run through
// the whole chain; Registers 1/2 load in the first cycle and 3/4 in the first
// two.  As in bm_radix2_mul, one preprocessing cycle is enough because the
// first iterations never address the late entries.
//
// Interface: pulse `start` while idle with a, b, c, f stable; `done` pulses
// N+1 clock edges later; `result` stays valid until the next start.
// Requirements: 2^(N-1) < F < 2^N, B < F.
// The recurrence, the register/mux assignment and the load schedule follow
// the document.  Register 5 is preset to psi(1) = 2^(N-1) when a
// multiplication starts (the odd chain must start there; the document does
// not show how it is initialised).  R is kept on N+1 bits as on the feedback
// path of the data-path drawing.
module bm_radix2_psi_mul #(
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
  logic [N:0]   r_q;

  // ---- psi table -----------------------------------------------------------
  logic [N-1:0] psi_q [1:6];        // Register 1 .. Register 6
  logic [1:0]   phase_q;
  logic         ld1, ld3, ld5;
  logic [N:0]   two_f_m;            // 2F - 2^N
  logic [N-1:0] even_next, odd_next;

  // psi(k) -> psi(k+2): subtract 2F - 2^N; on a negative result add F back.
  function automatic logic [N-1:0] psi_step(input logic [N-1:0] p, input logic [N:0] tfm,
                                            input logic [N-1:0] ff);
    logic [N+1:0] dd;
    dd = {2'b00, p} - {1'b0, tfm};
    return dd[N-1:0] + (ff & {N{dd[N+1]}});
  endfunction

  assign two_f_m   = {f_q, 1'b0} - {1'b1, {N{1'b0}}};
  assign even_next = psi_step(psi_q[6], two_f_m, f_q);
  assign odd_next  = psi_step(psi_q[5], two_f_m, f_q);
  assign ld1 = busy && (phase_q == 2'd0);
  assign ld3 = busy && (phase_q <= 2'd1);
  assign ld5 = busy && (phase_q <= 2'd2);

  // ---- iteration stage -----------------------------------------------------
  logic [N+2:0] t;                  // guard bit above the N+2 of the algorithm
  logic [N-1:0] psi_sel;

  assign t = {1'b0, r_q, 1'b0} + (N+3)'(c_q[N-1]) + (N+3)'(a_q[N-1] ? b_q : '0);

  always_comb begin
    unique case (t[N+1:N-1])
      3'b000:  psi_sel = '0;
      3'b001:  psi_sel = {1'b1, {(N-1){1'b0}}};
      3'b010:  psi_sel = psi_q[2];
      3'b011:  psi_sel = psi_q[1];
      3'b100:  psi_sel = psi_q[4];
      3'b101:  psi_sel = psi_q[3];
      3'b110:  psi_sel = psi_q[6];
      default: psi_sel = psi_q[5];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_q <= '0; a_q <= '0; b_q <= '0; c_q <= '0; r_q <= '0; phase_q <= '0;
      for (int k = 1; k <= 6; k++) psi_q[k] <= '0;
    end else if (load) begin
      f_q <= f; a_q <= a; b_q <= b; c_q <= c; r_q <= '0; phase_q <= '0;
      for (int k = 1; k <= 6; k++) psi_q[k] <= '0;
      psi_q[5] <= {1'b1, {(N-1){1'b0}}};      // odd chain starts at psi(1)
    end else begin
      if (busy && phase_q != 2'd3) phase_q <= phase_q + 2'd1;
      if (ld1) begin psi_q[1] <= odd_next; psi_q[2] <= even_next; end
      if (ld3) begin psi_q[3] <= odd_next; psi_q[4] <= even_next; end
      if (ld5) begin psi_q[5] <= odd_next; psi_q[6] <= even_next; end
      if (step) begin
        r_q <= (N+1)'(psi_sel) + (N+1)'(t[N-2:0]);
        a_q <= {a_q[N-2:0], 1'b0};
        c_q <= {c_q[N-2:0], 1'b0};
      end
    end
  end

  // ---- Modred: R[0] < 2F, add 2^N - F and keep the sum if it carries -------
  logic [N-1:0] f_neg;
  logic [N:0]   sum;
  assign f_neg  = ~f_q + 1'b1;
  assign sum    = (N+1)'(r_q[N-1:0]) + (N+1)'(f_neg);
  assign result = (sum[N] | r_q[N]) ? sum[N-1:0] : r_q[N-1:0];

  a_t_width: assert property (@(posedge clk) disable iff (!rst_n) step |-> !t[N+2]);
endmodule
