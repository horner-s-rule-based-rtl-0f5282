// tb_workloads: the operand sizes used in the published comparison of these
// multipliers, run at full width.
//   * 16- and 64-bit constant moduli, the four iteration stages compared at
//     those sizes: Jeong-Burleson, Kim-Sobelman and Peeters carry-save
//     stages, and both radix-2 stages with constant tables (the phi one with
//     two moduli, one in each range of its final reduction, picked at random
//     per operation; the psi one with a single modulus).
//   * Ten random 256-bit prime moduli with the Peeters carry-save stage (the
//     high-radix variant it was compared with is not part of this design).
// The 32-bit size and GF(3^97) are covered by tb_horner_top.  The moduli
// are random primes with the top bit set, fixed here so the test repeats.
// Results are compared with (a*b [+c]) mod f computed on 512-bit vectors,
// and every latency is checked (N for JB, KS and radix-2, N+1 for Peeters).
module tb_workloads;
  localparam logic [15:0]  F16A = 16'hB3E3, F16B = 16'hDDBF;
  localparam logic [63:0]  F64A = 64'hE9F11C388E52907B, F64B = 64'h93825544EEF85589;
  localparam int NP = 10;
  localparam logic [255:0] F256 [NP] = '{
    256'he9beecee62127b9253ebabdfa005e1ab5d5fe8e7a5b2099e6e175641215edbe9,
    256'h9f90b5fb21ba6c9cca6af12a83b7b4e2c6ee75d6546c5d1f255342a61a0a8a67,
    256'hd76520d69c0e834bcfe858702927b447ed15c8bc8baca900790a00247eed83ad,
    256'hbd3a4510a785ed40c598e1887d794e999e36d2f388da0d5a3e9c46a9caf0ad25,
    256'hc74fc955b79a75eb79c6e091aec9ee34ddfdca94c2c18115524d698e3f387f93,
    256'hf8bdf2874bcff6a67a4c575fcb44d930f19822d2344d919e96d2174340e4cd79,
    256'h97a9f95de5a57e2694f54b956231e85766fa28846d1f4a1d64219c4ffb8e1f57,
    256'ha04801b0d09b3befdc08ebb3a2096b669e01d7ebfd457369ed451c2e3b246163,
    256'hf682bff881ef34605cfb0aaf804ed2be4bf4a9b807511697bd79bb355d607327,
    256'h9acadd78e4719409fefa6df3ae20b0799045e5c329e3f20bc4da3718596df6cb};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [511:0] wide_t;

  function automatic wide_t mulmod(input wide_t x, y, z, m);
    return (x * y + z) % m;
  endfunction

  function automatic wide_t rnd(input int bits);
    wide_t v;
    for (int k = 0; k < 16; k++) v[32*k +: 32] = $urandom;
    return v & ((wide_t'(1) << bits) - 1);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- 16 bits ----------------
  logic        s16 = 0, sel16 = 0;
  logic [15:0] a16, b16, c16;
  logic [15:0] r16_jb, r16_ks, r16_pe, r16_bc, r16_bp;
  logic [4:0]  busy16, done16;
  jb_cs_mul #(.N(16), .F(F16A)) u16_jb (.clk, .rst_n, .start(s16), .a(a16), .b(b16),
    .result(r16_jb), .busy(busy16[0]), .done(done16[0]));
  ks_cs_mul #(.N(16), .F(F16A)) u16_ks (.clk, .rst_n, .start(s16), .a(a16), .b(b16),
    .result(r16_ks), .busy(busy16[1]), .done(done16[1]));
  peeters_cs_mul #(.N(16), .F(F16A)) u16_pe (.clk, .rst_n, .start(s16), .a(a16), .b(b16),
    .result(r16_pe), .busy(busy16[2]), .done(done16[2]));
  bm_const_phi_mul #(.N(16), .F1(F16A), .F2(F16B)) u16_bc (.clk, .rst_n, .start(s16),
    .sel(sel16), .a(a16), .b(b16), .c(c16), .result(r16_bc), .busy(busy16[3]), .done(done16[3]));
  bm_const_psi_mul #(.N(16), .F(F16A)) u16_bp (.clk, .rst_n, .start(s16), .a(a16), .b(b16),
    .c(c16), .result(r16_bp), .busy(busy16[4]), .done(done16[4]));

  // ---------------- 64 bits ----------------
  logic        s64 = 0, sel64 = 0;
  logic [63:0] a64, b64, c64;
  logic [63:0] r64_jb, r64_ks, r64_pe, r64_bc, r64_bp;
  logic [4:0]  busy64, done64;
  jb_cs_mul #(.N(64), .F(F64A)) u64_jb (.clk, .rst_n, .start(s64), .a(a64), .b(b64),
    .result(r64_jb), .busy(busy64[0]), .done(done64[0]));
  ks_cs_mul #(.N(64), .F(F64A)) u64_ks (.clk, .rst_n, .start(s64), .a(a64), .b(b64),
    .result(r64_ks), .busy(busy64[1]), .done(done64[1]));
  peeters_cs_mul #(.N(64), .F(F64A)) u64_pe (.clk, .rst_n, .start(s64), .a(a64), .b(b64),
    .result(r64_pe), .busy(busy64[2]), .done(done64[2]));
  bm_const_phi_mul #(.N(64), .F1(F64A), .F2(F64B)) u64_bc (.clk, .rst_n, .start(s64),
    .sel(sel64), .a(a64), .b(b64), .c(c64), .result(r64_bc), .busy(busy64[3]), .done(done64[3]));
  bm_const_psi_mul #(.N(64), .F(F64A)) u64_bp (.clk, .rst_n, .start(s64), .a(a64), .b(b64),
    .c(c64), .result(r64_bp), .busy(busy64[4]), .done(done64[4]));

  // ---------------- 256 bits, ten moduli ----------------
  logic         s256 = 0;
  logic [255:0] a256, b256;
  logic [255:0] r256 [NP];
  logic [NP-1:0] busy256, done256;
  for (genvar g = 0; g < NP; g++) begin : g256
    peeters_cs_mul #(.N(256), .F(F256[g])) u_pe (.clk, .rst_n, .start(s256), .a(a256),
      .b(b256), .result(r256[g]), .busy(busy256[g]), .done(done256[g]));
  end

  // run one operation of a size group; `done` bits are sampled per cycle
  task automatic run16(input wide_t x, y, z, input logic sl);
    int cyc, lat [5];
    wide_t fm;
    fm = sl ? wide_t'(F16B) : wide_t'(F16A);
    a16 = x[15:0]; b16 = y[15:0]; c16 = z[15:0]; sel16 = sl;
    @(negedge clk) s16 = 1;
    @(negedge clk) s16 = 0;
    cyc = 0;
    for (int k = 0; k < 5; k++) lat[k] = -1;
    while (cyc < 20) begin
      for (int k = 0; k < 5; k++) if (done16[k] && lat[k] < 0) lat[k] = cyc;
      @(negedge clk); cyc++;
    end
    check(wide_t'(r16_jb) == mulmod(x, y, 0, wide_t'(F16A)) && lat[0] == 16, "16-bit JB");
    check(wide_t'(r16_ks) == mulmod(x, y, 0, wide_t'(F16A)) && lat[1] == 16, "16-bit KS");
    check(wide_t'(r16_pe) == mulmod(x, y, 0, wide_t'(F16A)) && lat[2] == 17, "16-bit Peeters");
    check(wide_t'(r16_bc) == mulmod(x, y, z, fm) && lat[3] == 16, "16-bit radix-2 phi");
    check(wide_t'(r16_bp) == mulmod(x, y, z, wide_t'(F16A)) && lat[4] == 16, "16-bit radix-2 psi");
  endtask

  task automatic run64(input wide_t x, y, z, input logic sl);
    int cyc, lat [5];
    wide_t fm;
    fm = sl ? wide_t'(F64B) : wide_t'(F64A);
    a64 = x[63:0]; b64 = y[63:0]; c64 = z[63:0]; sel64 = sl;
    @(negedge clk) s64 = 1;
    @(negedge clk) s64 = 0;
    cyc = 0;
    for (int k = 0; k < 5; k++) lat[k] = -1;
    while (cyc < 68) begin
      for (int k = 0; k < 5; k++) if (done64[k] && lat[k] < 0) lat[k] = cyc;
      @(negedge clk); cyc++;
    end
    check(wide_t'(r64_jb) == mulmod(x, y, 0, wide_t'(F64A)) && lat[0] == 64, "64-bit JB");
    check(wide_t'(r64_ks) == mulmod(x, y, 0, wide_t'(F64A)) && lat[1] == 64, "64-bit KS");
    check(wide_t'(r64_pe) == mulmod(x, y, 0, wide_t'(F64A)) && lat[2] == 65, "64-bit Peeters");
    check(wide_t'(r64_bc) == mulmod(x, y, z, fm) && lat[3] == 64, "64-bit radix-2 phi");
    check(wide_t'(r64_bp) == mulmod(x, y, z, wide_t'(F64A)) && lat[4] == 64, "64-bit radix-2 psi");
  endtask

  task automatic run256(input wide_t x, y);
    int cyc;
    a256 = x[255:0]; b256 = y[255:0];
    @(negedge clk) s256 = 1;
    @(negedge clk) s256 = 0;
    cyc = 0;
    while (!done256[0]) begin @(negedge clk); cyc++; end
    check(cyc == 257 && done256 == '1, "256-bit latency");
    for (int g = 0; g < NP; g++)
      check(wide_t'(r256[g]) == mulmod(x, y, 0, wide_t'(F256[g])),
            $sformatf("256-bit Peeters modulus %0d", g));
  endtask

  initial begin
    wide_t bmax;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // B below both moduli of its group
    bmax = wide_t'(F16A);
    run16((wide_t'(1) << 16) - 1, bmax - 1, (wide_t'(1) << 16) - 1, 1'b0);
    run16((wide_t'(1) << 16) - 1, bmax - 1, (wide_t'(1) << 16) - 1, 1'b1);
    for (int k = 0; k < 200; k++) run16(rnd(16), rnd(16) % bmax, rnd(16), 1'($urandom_range(0, 1)));
    bmax = wide_t'(F64B);
    run64((wide_t'(1) << 64) - 1, bmax - 1, (wide_t'(1) << 64) - 1, 1'b0);
    run64((wide_t'(1) << 64) - 1, bmax - 1, (wide_t'(1) << 64) - 1, 1'b1);
    for (int k = 0; k < 100; k++) run64(rnd(64), rnd(64) % bmax, rnd(64), 1'($urandom_range(0, 1)));
    bmax = wide_t'(F256[0]);
    for (int g = 1; g < NP; g++) if (wide_t'(F256[g]) < bmax) bmax = wide_t'(F256[g]);
    run256((wide_t'(1) << 256) - 1, bmax - 1);
    for (int k = 0; k < 30; k++) run256(rnd(256), rnd(256) % bmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
