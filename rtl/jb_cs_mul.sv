// jb_cs_mul: carry-save modular multiplier A*B mod F for a modulus fixed at
// design time (Jeong-Burleson iteration stage: left shift, then reduction).
//
// R = rs + 2*rc with two N-bit words.  Each iteration (MSB of A first):
//   Modshift: the bits of 2R at or above 2^N, k1 = 2*rc[N-1] + rs[N-1] +
//             rc[N-2] (0..4), address ROM1 = (k1 * 2^N) mod F; one CSA adds
//             ROM1 + 2*rs[N-2:0] + 4*rc[N-3:0]  ->  S = ss + 2*sc, S = 2R mod F
//   Modsum:   a CSA adds ss + 2*sc[N-2:0] + a_i*B -> ts + 2*tc; the two
//             overflow bits k2 = sc[N-1] + tc[N-1] (0..2) address
//             ROM2 = (k2 * 2^N) mod F; a third CSA adds ts + 2*tc[N-2:0] +
//             ROM2 -> new rs, rc.
// R stays below F + 2^(N+1) - 4 and the final reduction is ks_modred.
//
// Interface: pulse `start` while idle with a and b stable (B < F); `done`
// pulses N clock edges later; `result` stays valid until the next start.
// Parameters: N, F (2^(N-1) < F < 2^N).
// The three-CSA structure and the ROM address bits follow the document; the
// second ROM's address (sc[N-1], tc[N-1]) is read from the drawing.  The
// final reduction by the Kim-Sobelman block is the one the document names
// for this stage.  The handshake is this design's choice.
module jb_cs_mul #(
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

  logic [N-1:0] rom1 [5];
  logic [N-1:0] rom2 [3];
  for (genvar g = 0; g < 5; g++) begin : g_rom1
    localparam logic [N-1:0] V = pow2mod(g, N);
    assign rom1[g] = V;
  end
  for (genvar g = 0; g < 3; g++) begin : g_rom2
    localparam logic [N-1:0] V = pow2mod(g, N);
    assign rom2[g] = V;
  end

  // ---- Modshift ----
  logic [2:0]   k1;
  logic [N-1:0] ss, sc;
  assign k1 = {1'b0, rc_q[N-1], 1'b0} + 3'(rs_q[N-1]) + 3'(rc_q[N-2]);
  csa_row #(.W(N)) u_csa_shift (
    .x(rom1[k1]), .y({rs_q[N-2:0], 1'b0}), .z({rc_q[N-3:0], 2'b00}), .s(ss), .c(sc)
  );

  // ---- Modsum ----
  logic [N-1:0] pp, ts, tc, rs_d, rc_d;
  logic [1:0]   k2;
  assign pp = a_q[N-1] ? b_q : '0;
  csa_row #(.W(N)) u_csa_sum1 (
    .x(ss), .y({sc[N-2:0], 1'b0}), .z(pp), .s(ts), .c(tc)
  );
  assign k2 = 2'(sc[N-1]) + 2'(tc[N-1]);
  csa_row #(.W(N)) u_csa_sum2 (
    .x(ts), .y({tc[N-2:0], 1'b0}), .z(rom2[k2]), .s(rs_d), .c(rc_d)
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

  a_k1_range: assert property (@(posedge clk) disable iff (!rst_n) step |-> k1 <= 3'd4);
  a_k2_range: assert property (@(posedge clk) disable iff (!rst_n) step |-> k2 <= 2'd2);
endmodule
