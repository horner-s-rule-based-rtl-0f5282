// ks_cs_mul: carry-save modular multiplier A*B mod F for a modulus fixed at
// design time (Kim-Sobelman iteration stage).
//
// R is kept in carry-save form, R = rs + 2*rc with two N-bit words, so an
// iteration never propagates a carry.  Each iteration (MSB of A first):
//   1. one CSA adds a_i*B + 2*rs[N-2:0] + 4*rc[N-3:0]  ->  ts + 2*tc
//   2. the bits that fall at or above 2^N, k = rs[N-1] + 2*rc[N-1] +
//      rc[N-2] + tc[N-1] (0..5), address a 6-entry ROM holding
//      (k * 2^N) mod F
//   3. a second CSA adds ts + 2*tc[N-2:0] + ROM[k]  ->  new rs, rc.
// After N iterations R[0] <= 2^(N+1) + F - 5 is congruent to A*B; the
// final reduction (ks_modred) converts it to A*B mod F.
//
// Interface: pulse `start` while idle with a and b stable (B < F);
// `done` pulses N clock edges later and `result` stays valid until the next
// start.  Parameters: N, F (2^(N-1) < F < 2^N).
// The datapath and the ROM follow the document; the ROM contents are
// computed at elaboration, and the handshake is this design's choice.
module ks_cs_mul #(
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
  logic [$clog2(N+1)-1:0] idx;
  horner_ctrl #(.ITERS(N), .PRE(0)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  logic [N-1:0] a_q, b_q, rs_q, rc_q;

  // PPG: N AND gates
  logic [N-1:0] pp;
  assign pp = a_q[N-1] ? b_q : '0;

  // Modshift (wires) + first CSA of Modsum
  logic [N-1:0] ts, tc;
  csa_row #(.W(N)) u_csa1 (
    .x(pp), .y({rs_q[N-2:0], 1'b0}), .z({rc_q[N-3:0], 2'b00}), .s(ts), .c(tc)
  );

  // ROM addressed by the four overflow bits
  logic [N-1:0] rom [6];
  for (genvar g = 0; g < 6; g++) begin : g_rom
    localparam logic [N-1:0] V = pow2mod(g, N);
    assign rom[g] = V;
  end

  logic [2:0]   k;
  logic [N-1:0] u;
  assign k = 3'(rs_q[N-1]) + {1'b0, rc_q[N-1], 1'b0} + 3'(rc_q[N-2]) + 3'(tc[N-1]);
  assign u = rom[k];

  logic [N-1:0] rs_d, rc_d;
  csa_row #(.W(N)) u_csa2 (
    .x(ts), .y({tc[N-2:0], 1'b0}), .z(u), .s(rs_d), .c(rc_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; rs_q <= '0; rc_q <= '0;
    end else if (load) begin
      a_q <= a; b_q <= b; rs_q <= '0; rc_q <= '0;
    end else if (step) begin
      a_q  <= {a_q[N-2:0], 1'b0};
      rs_q <= rs_d;
      rc_q <= rc_d;
    end
  end

  ks_modred #(.N(N), .F(F)) u_modred (.rs(rs_q), .rc(rc_q), .result);

  a_k_range: assert property (@(posedge clk) disable iff (!rst_n) step |-> k <= 3'd5);
endmodule
