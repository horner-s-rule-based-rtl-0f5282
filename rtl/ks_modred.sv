// ks_modred: final reduction of a carry-save residue (Kim-Sobelman style).
//
// The carry-save iteration stages with a constant modulus leave R[0] as two
// N-bit words with R = rs + 2*rc, congruent to A*B mod F but possibly several
// times larger than F.  This block turns it into the integer A*B mod F:
//   U = rs + 2*rc[N-2:0]                       (fast adder, N+1 bits)
//   V = U[N-1:0] + ((rc[N-1] + u_N) * 2^N mod F)  (ROM of three entries)
// V < 3F, so V - F and V - 2F are formed in parallel and the sign of each
// selects V, V - F or V - 2F.  Purely combinational.
// Parameters: N word size, F the constant modulus (2^(N-1) < F < 2^N).
// The adder/ROM/selection structure follows the document; the ROM contents
// are computed at elaboration from F.
module ks_modred #(
  parameter int unsigned N = 32,
  parameter logic [N-1:0] F = 32'hC0000001
) (
  input  logic [N-1:0] rs,
  input  logic [N-1:0] rc,
  output logic [N-1:0] result
);
  // (k * 2^N) mod F by repeated doubling
  function automatic logic [N-1:0] pow2mod(input int unsigned k, input int unsigned sh);
    logic [N+3:0] r;
    r = (N+4)'(k) % (N+4)'(F);
    for (int unsigned j = 0; j < sh; j++) begin
      r = r << 1;
      if (r >= (N+4)'(F)) r = r - (N+4)'(F);
    end
    return r[N-1:0];
  endfunction

  localparam logic [N-1:0] ROM1 = pow2mod(1, N);
  localparam logic [N-1:0] ROM2 = pow2mod(2, N);

  logic [N:0]   u;
  logic [1:0]   k;
  logic [N-1:0] rom;
  logic [N+1:0] v, v_f, v_2f;

  assign u = (N+1)'(rs) + (N+1)'({rc[N-2:0], 1'b0});
  assign k = 2'(rc[N-1]) + 2'(u[N]);

  always_comb begin
    unique case (k)
      2'd0:    rom = '0;
      2'd1:    rom = ROM1;
      default: rom = ROM2;
    endcase
  end

  assign v    = (N+2)'(u[N-1:0]) + (N+2)'(rom);
  assign v_f  = v - (N+2)'(F);
  assign v_2f = v - (N+2)'({F, 1'b0});

  always_comb begin
    if (!v_2f[N+1])     result = v_2f[N-1:0];
    else if (!v_f[N+1]) result = v_f[N-1:0];
    else                result = v[N-1:0];
  end
endmodule
