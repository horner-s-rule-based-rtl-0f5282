// bs_reduce: constant-time modular correction of a borrow-save number
// (Takagi-Yajima).
//
// Input: an (N+2)-digit borrow-save number A with -2F < A < 2F and an N-bit
// modulus F whose MSB is 1.  Output: an (N+1)-digit number congruent to A
// modulo F in (-F, F).  The three top digits give k = 4a(N+1) + 2a(N) +
// a(N-1) in -4..4, which tells the sign of A; the block adds
//   U = F (k < 0),  0 (k = 0),  -F-1 = -2^N + sum(~f_i 2^i, i <= N-2) (k > 0)
// with one row of PPM cells over digits 0..N-1, inserts the missing +1 as
// the positive bit of digit 0, and forms the new top digit
//   a~(N) = 2a(N+1) + a(N) + v - [k > 0]
// from the three top digits (v is the carry of the PPM cell in position
// N-1).  Purely combinational.
// The method follows the document.  The document gives the top digit as a
// 3-digit look-up table; here the same value is produced from its defining
// equation.
module bs_reduce #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] f,
  input  logic [N+1:0] ap, an,
  output logic [N:0]   rp, rn
);
  logic signed [3:0] k, top;
  logic              kpos, kneg;
  logic [N-1:0]      u;
  logic [N:0]        c;       // PPM carries, c[i+1] out of position i
  logic              v;

  always_comb begin
    k = 4'sd4 * (4'(ap[N+1]) - 4'(an[N+1])) + 4'sd2 * (4'(ap[N]) - 4'(an[N]))
        + (4'(ap[N-1]) - 4'(an[N-1]));
    kpos = (k > 0);
    kneg = (k < 0);
    // U on digits 0..N-1 (only positive bits; its digit N is -1 when k > 0)
    if (kneg)      u = f;
    else if (kpos) u = {1'b0, ~f[N-2:0]};
    else           u = '0;
    c[0] = 1'b0;
    for (int i = 0; i < N; i++) begin
      // PPM(ap, u, an): FA(ap, u, ~an) -> carry to i+1, inverted sum is rn(i)
      c[i+1] = (ap[i] & u[i]) | (ap[i] & ~an[i]) | (u[i] & ~an[i]);
      rn[i]  = ~(ap[i] ^ u[i] ^ ~an[i]);
    end
    v = c[N];
    for (int i = 1; i < N; i++) rp[i] = c[i];
    rp[0] = kpos;
    top = 4'sd2 * (4'(ap[N+1]) - 4'(an[N+1])) + (4'(ap[N]) - 4'(an[N]))
          + 4'(v) - 4'(kpos);
    rp[N] = (top == 4'sd1);
    rn[N] = (top == -4'sd1);
  end
endmodule
