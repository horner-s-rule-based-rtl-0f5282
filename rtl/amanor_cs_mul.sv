// amanor_cs_mul: carry-save multiplier A*B mod F with both B and F fixed at
// design time (Amanor et al. iteration stage, modified for the ks_modred
// final reduction).
//
// With B constant, the partial product a_i*B can be folded into the
// reduction table, so an iteration is one table look-up and one CSA:
//   k   = 2*rc[N-1] + rc[N-2] + rs[N-1]      (bits of 2R at or above 2^N)
//   ROM[a_i][k] = (k * 2^N + a_i * B) mod F   (2 x 5 entries)
//   rs, rc <- CSA(ROM[a_i][k], 2*rs[N-2:0], 4*rc[N-3:0])
// R = rs + 2*rc stays two N-bit words; after N iterations ks_modred turns it
// into A*B mod F.
//
// Interface: pulse `start` while idle with `a` stable; `done` pulses N clock
// edges later; `result` stays valid until the next start.  Parameters: N, F
// (2^(N-1) < F < 2^N) and the constant multiplicand B (B < F).
// The table and the single CSA follow the document.  The document's text and
// its drawing differ on one address bit (r_(N-2) in the text, r_(N-1) in the
// drawing); the drawing's r_(N-1) is used, being the bit of weight 2^N in 2R.
module amanor_cs_mul #(
  parameter int unsigned N = 32,
  parameter logic [N-1:0] F = 32'hC0000001,
  parameter logic [N-1:0] B = 32'h12345678
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  output logic [N-1:0] result,
  output logic         busy,
  output logic         done
);
  // (k * 2^N + ai * B) mod F
  function automatic logic [N-1:0] entry(input int unsigned k, input bit ai);
    logic [N+3:0] r;
    r = (N+4)'(k) % (N+4)'(F);
    for (int unsigned j = 0; j < N; j++) begin
      r = r << 1;
      if (r >= (N+4)'(F)) r = r - (N+4)'(F);
    end
    if (ai) begin
      r = r + (N+4)'(B);
      if (r >= (N+4)'(F)) r = r - (N+4)'(F);
    end
    return r[N-1:0];
  endfunction

  logic load, pre, step;
  logic [$clog2(N+1)-1:0] idx;
  horner_ctrl #(.ITERS(N), .PRE(0)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  logic [N-1:0] a_q, rs_q, rc_q;

  logic [N-1:0] rom [2][5];
  for (genvar ai = 0; ai < 2; ai++) begin : g_a
    for (genvar g = 0; g < 5; g++) begin : g_k
      localparam logic [N-1:0] V = entry(g, ai[0]);
      assign rom[ai][g] = V;
    end
  end

  logic [2:0]   k;
  logic [N-1:0] rs_d, rc_d;
  assign k = {1'b0, rc_q[N-1], 1'b0} + 3'(rc_q[N-2]) + 3'(rs_q[N-1]);
  csa_row #(.W(N)) u_csa (
    .x(rom[a_q[N-1]][k]), .y({rs_q[N-2:0], 1'b0}), .z({rc_q[N-3:0], 2'b00}),
    .s(rs_d), .c(rc_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0; rs_q <= '0; rc_q <= '0;
    end else if (load) begin
      a_q <= a; rs_q <= '0; rc_q <= '0;
    end else if (step) begin
      a_q  <= {a_q[N-2:0], 1'b0};
      rs_q <= rs_d;
      rc_q <= rc_d;
    end
  end

  ks_modred #(.N(N), .F(F)) u_modred (.rs(rs_q), .rc(rc_q), .result);

  a_k_range: assert property (@(posedge clk) disable iff (!rst_n) step |-> k <= 3'd4);
endmodule
