// peeters_cs_mul: carry-save modular multiplier A*B mod F for a modulus
// fixed at design time, with modular reduction before the left shift
// (Peeters et al. iteration stage).
//
// R = rs + 2*rc, rs on N+1 bits and rc on N bits whose LSB is always 0.  The
// top bits U = rs[N:N-2] + rc[N-1:N-3] (0..14) are folded back through a
// 15-entry ROM holding (U * 2^(N-2)) mod F; the shift by one follows the
// reduction, so each iteration computes
//   ts + 2*tc = a_i*B + 2*rs[N-3:0] + 4*rc[N-4:0]     (first CSA)
//   rs + 2*rc = ts + 2*tc + 2*ROM[U]                   (second CSA)
// The ROM read runs in parallel with the first CSA.  One extra iteration
// with a_(-1) = 0 makes R[-1] even and below 2F + 2^N - 12, so R[-1]/2 < 2F
// and the final reduction is one addition plus one conditional subtraction.
//
// Interface: pulse `start` while idle with a and b stable (B < F); `done`
// pulses N+1 clock edges later; `result` stays valid until the next start.
// Parameters: N, F (2^(N-1) < F < 2^N).
// The iteration stage, the ROM and the extra iteration follow the document.
// The document only bounds the final step ("at most one subtraction"); the
// adder + compare/subtract used here is this design's own choice, as is the
// handshake.
module peeters_cs_mul #(
  parameter int unsigned N = 32,
  parameter logic [N-1:0] F = 32'hC0000001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] result,
  output logic         busy,
  output logic         done
);
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
  logic [$clog2(N+2)-1:0] idx;
  horner_ctrl #(.ITERS(N + 1), .PRE(0)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  logic [N-1:0] a_q, b_q, rc_q;
  logic [N:0]   rs_q;

  // ---- Modshift: 4-bit adder + ROM ----
  logic [3:0]   u;
  logic [N-1:0] rom [15];
  for (genvar g = 0; g < 15; g++) begin : g_rom
    localparam logic [N-1:0] V = pow2mod(g, N - 2);
    assign rom[g] = V;
  end
  assign u = 4'(rs_q[N:N-2]) + 4'(rc_q[N-1:N-3]);

  // ---- Modsum ----
  logic [N-1:0] pp, ts, tc;
  assign pp = a_q[N-1] ? b_q : '0;
  csa_row #(.W(N)) u_csa1 (
    .x(pp), .y(N'({rs_q[N-3:0], 1'b0})), .z(N'({rc_q[N-4:0], 2'b00})), .s(ts), .c(tc)
  );

  logic [N:0] rs_d, rc_d;
  csa_row #(.W(N+1)) u_csa2 (
    .x((N+1)'(ts)), .y({tc, 1'b0}), .z({rom[u], 1'b0}), .s(rs_d), .c(rc_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; rs_q <= '0; rc_q <= '0;
    end else if (load) begin
      a_q <= a; b_q <= b; rs_q <= '0; rc_q <= '0;
    end else if (step) begin
      a_q  <= {a_q[N-2:0], 1'b0};
      rs_q <= rs_d;
      rc_q <= rc_d[N-1:0];
    end
  end

  // ---- Modred: R[-1]/2 < 2F ----
  logic [N+1:0] v, w;
  logic [N:0]   half;
  assign v      = (N+2)'(rs_q) + (N+2)'({rc_q, 1'b0});
  assign half   = v[N+1:1];
  assign w      = (N+2)'(half) - (N+2)'(F);
  assign result = w[N+1] ? half[N-1:0] : w[N-1:0];

  // the reduction relies on these properties of the iteration
  a_rc_lsb:  assert property (@(posedge clk) disable iff (!rst_n) step |-> !rc_d[0] && !rc_d[N]);
  a_tc_top:  assert property (@(posedge clk) disable iff (!rst_n) step |-> !tc[N-1]);
  a_even:    assert property (@(posedge clk) disable iff (!rst_n) done |-> !v[0]);
endmodule
