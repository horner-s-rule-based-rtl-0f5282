// bs_adder: constant-time addition of two radix-2 borrow-save numbers.
//
// A borrow-save digit is a pair of bits (p, n) with value p - n in {-1,0,1};
// a D-digit number is two D-bit words, value = P - N.  Two rows of cells add
// X + Y without carry propagation:
//   PPM row: 2*h(i+1) - g(i) = xp(i) + yp(i) - xn(i)
//   MMP row: 2*zn(i+1) - zp(i) = g(i) + yn(i) - h(i)
// so X + Y = ZP - ZN with D+1 digits.  Both cells are full adders with one
// input and the sum output inverted.  Purely combinational.
// The two-row PPM/MMP structure follows the document; the full-adder form of
// the cells is the usual one.
module bs_adder #(
  parameter int unsigned D = 8
) (
  input  logic [D-1:0] xp, xn,
  input  logic [D-1:0] yp, yn,
  output logic [D:0]   zp, zn
);
  logic [D:0]   h;          // positive carries of the PPM row, h[0] = 0
  logic [D-1:0] g;          // negative sums of the PPM row
  logic [D-1:0] s2;
  logic [D:0]   c2;

  always_comb begin
    h[0] = 1'b0;
    for (int i = 0; i < D; i++) begin
      // FA(xp, yp, ~xn) = 2c + s  ->  h(i+1) = c, g(i) = ~s
      h[i+1] = (xp[i] & yp[i]) | (xp[i] & ~xn[i]) | (yp[i] & ~xn[i]);
      g[i]   = ~(xp[i] ^ yp[i] ^ ~xn[i]);
    end
    c2[0] = 1'b0;
    for (int i = 0; i < D; i++) begin
      // FA(g, yn, ~h) = 2c + s  ->  zn(i+1) = c, zp(i) = ~s
      c2[i+1] = (g[i] & yn[i]) | (g[i] & ~h[i]) | (yn[i] & ~h[i]);
      s2[i]   = ~(g[i] ^ yn[i] ^ ~h[i]);
    end
  end

  assign zp = {h[D], s2};
  assign zn = c2;
endmodule
