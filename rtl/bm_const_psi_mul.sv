// bm_const_psi_mul: radix-2 modular multiplication-addition (A*B + C) mod F
// for one modulus F fixed at design time (second Beuchat-Muller scheme with
// a constant psi table).
//
// The iteration of bm_radix2_psi_mul with an 8-entry constant table:
//   T = 2*R + c_i + a_i*B                        (N+2 bits)
//   R = psi(T div 2^(N-1)) + T mod 2^(N-1)       psi(k) = (k*2^(N-1)) mod F
// Bit j of psi depends on T[N+1], T[N], T[N-1]: a 3-input function that
// shares an FPGA LUT with the sum bit of the adder forming R, which leaves
// no input for a modulus select, hence one modulus only.  The table is
// computed at elaboration; no preprocessing cycle is needed.  R[0] < 2F, so
// the final reduction is one conditional subtraction.
//
// Interface: pulse `start` while idle with a, b, c stable; `done` pulses N
// clock edges later; `result` stays valid until the next start.
// Requirements: 2^(N-1) < F < 2^N, B < F.
// The table and iteration follow the document; the modulus value and the
// handshake are this design's choices.
module bm_const_psi_mul #(
  parameter int unsigned N = 32,
  parameter logic [N-1:0] F = 32'hC0000001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] result,
  output logic         busy,
  output logic         done
);
  // (k * 2^sh) mod F by repeated modular doubling
  function automatic logic [N-1:0] pow2mod(input int unsigned k, input int unsigned sh);
    logic [N+3:0] r;
    r = (N+4)'(k) % (N+4)'(F);
    for (int unsigned j = 0; j < sh; j++) begin
      r = r << 1;
      if (r >= (N+4)'(F)) r = r - (N+4)'(F);
    end
    return r[N-1:0];
  endfunction

  logic load, pre, step;
  logic [$clog2(N+1)-1:0] idx;
  horner_ctrl #(.ITERS(N), .PRE(0)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  logic [N-1:0] psi [8];
  for (genvar g = 0; g < 8; g++) begin : g_psi
    localparam logic [N-1:0] V = pow2mod(g, N - 1);
    assign psi[g] = V;
  end

  logic [N-1:0] a_q, b_q, c_q;
  logic [N:0]   r_q;

  logic [N+2:0] t;                   // one guard bit above the N+2 needed
  assign t = {1'b0, r_q, 1'b0} + (N+3)'(c_q[N-1]) + (N+3)'(a_q[N-1] ? b_q : '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; c_q <= '0; r_q <= '0;
    end else if (load) begin
      a_q <= a; b_q <= b; c_q <= c; r_q <= '0;
    end else if (step) begin
      r_q <= (N+1)'(psi[t[N+1:N-1]]) + (N+1)'(t[N-2:0]);
      a_q <= {a_q[N-2:0], 1'b0};
      c_q <= {c_q[N-2:0], 1'b0};
    end
  end

  // Modred: R[0] < 2F, add 2^N - F and keep the sum if it carries
  logic [N-1:0] f_neg;
  logic [N:0]   sum;
  assign f_neg  = ~F + 1'b1;
  assign sum    = (N+1)'(r_q[N-1:0]) + (N+1)'(f_neg);
  assign result = (sum[N] | r_q[N]) ? sum[N-1:0] : r_q[N-1:0];

  a_t_width: assert property (@(posedge clk) disable iff (!rst_n) step |-> !t[N+2]);
endmodule
