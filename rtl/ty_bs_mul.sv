// ty_bs_mul: borrow-save modular multiplier A*B mod F with the modulus given
// at run time (Takagi-Yajima).
//
// Operands and the partial result are (N+1)-digit borrow-save numbers in
// (-F, F), so no step ever propagates a carry.  Each iteration, top digit of
// A first:
//   S = bs_reduce(2R)            Modshift: shift, then correct by 0 or +-F
//   T = S + a_i*B                Modsum: a_i in {-1,0,1}, -B swaps B's bit
//                                pairs; bs_adder gives N+2 digits
//   R = bs_reduce(T)             back into (-F, F)
// After N+1 iterations R is congruent to A*B and lies in (-F, F).  The
// final step subtracts the two bit vectors and adds F if the difference is
// negative, giving A*B mod F in [0, F).
//
// Interface: pulse `start` while idle with f and the operands stable.
// A = ap - an and B = bp - bn (N+1 bits each, any borrow-save encoding of a
// value in (-F, F)).  `done` pulses N+1 clock edges later; `result` stays
// valid until the next start.  Requirement: 2^(N-1) < F < 2^N.
// The iteration and the conversion follow the document; the handshake is
// this design's choice.
module ty_bs_mul #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] f,
  input  logic [N:0]   ap, an,
  input  logic [N:0]   bp, bn,
  output logic [N-1:0] result,
  output logic         busy,
  output logic         done
);
  logic load, pre, step;
  logic [$clog2(N+2)-1:0] idx;
  horner_ctrl #(.ITERS(N + 1), .PRE(0)) u_ctrl (
    .clk, .rst_n, .start, .load, .pre, .step, .idx, .busy, .done
  );

  logic [N-1:0] f_q;
  logic [N:0]   ap_q, an_q, bp_q, bn_q, rp_q, rn_q;

  // Modshift
  logic [N:0] sp, sn;
  bs_reduce #(.N(N)) u_red_shift (
    .f(f_q), .ap({rp_q, 1'b0}), .an({rn_q, 1'b0}), .rp(sp), .rn(sn)
  );

  // PPG: a_i * B with a_i = ap - an of the top digit
  logic [N:0] pp_p, pp_n;
  always_comb begin
    unique case ({ap_q[N], an_q[N]})
      2'b10:   begin pp_p = bp_q; pp_n = bn_q; end
      2'b01:   begin pp_p = bn_q; pp_n = bp_q; end
      default: begin pp_p = '0;   pp_n = '0;   end
    endcase
  end

  // Modsum
  logic [N+1:0] tp, tn;
  logic [N:0]   rp_d, rn_d;
  bs_adder #(.D(N + 1)) u_add (.xp(sp), .xn(sn), .yp(pp_p), .yn(pp_n), .zp(tp), .zn(tn));
  bs_reduce #(.N(N)) u_red_sum (.f(f_q), .ap(tp), .an(tn), .rp(rp_d), .rn(rn_d));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_q <= '0; ap_q <= '0; an_q <= '0; bp_q <= '0; bn_q <= '0; rp_q <= '0; rn_q <= '0;
    end else if (load) begin
      f_q <= f; ap_q <= ap; an_q <= an; bp_q <= bp; bn_q <= bn; rp_q <= '0; rn_q <= '0;
    end else if (step) begin
      ap_q <= {ap_q[N-1:0], 1'b0};
      an_q <= {an_q[N-1:0], 1'b0};
      rp_q <= rp_d;
      rn_q <= rn_d;
    end
  end

  // Modred: borrow-save to integer, at most one correction by F
  logic [N+1:0] diff, diff_f;
  assign diff   = (N+2)'(rp_q) - (N+2)'(rn_q);
  assign diff_f = diff + (N+2)'(f_q);
  assign result = diff[N+1] ? diff_f[N-1:0] : diff[N-1:0];
endmodule
