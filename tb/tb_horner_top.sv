// tb_horner_top: end-to-end test of all multipliers in horner_top at the
// default sizes (N = 32, F = 3*2^30 + 1 (a prime), GF(3^97) with D = 2).
//
// Every design multiplies random and extreme operands; each result is
// compared with a 64-bit integer (or schoolbook polynomial) reference and
// each latency with the expected cycle count.  Alongside, the testbench
// runs its own model of each recurrence, written from the algorithm and
// independent of the RTL, to count how often each mechanism fired: every
// phi/psi table entry, the ROM addresses of the constant-modulus stages,
// each branch of the final reductions, the three sign estimates, the three
// kinds of borrow-save partial product, and both modulus ranges of the
// radix-2 reduction, and the constant phi/psi tables of the two
// constant-modulus radix-2 designs (both moduli of the two-modulus one).
// A mechanism that never fires counts as a failure.
// The top entries of some tables are worst-case bounds that these operands
// (and, for psi(7), probably any operands) never reach: psi(7), the KS
// ROM[5], JB ROM1[4], Peeters ROM[12..14] and the V-2F branch of the KS
// final reduction at F = 3*2^30+1.  They are reported but not required.
module tb_horner_top;
  localparam int N = 32, P = 3, M = 97, CW = 2;
  localparam logic [N-1:0] F    = 32'hC0000001;
  localparam logic [N-1:0] AM_B = 32'h12345678;
  localparam logic [N-1:0] F2   = 32'h80000011;
  localparam logic [CW*M-1:0] FC = (CW*M)'(1) << (CW*12) | (CW*M)'(2);

  logic clk = 0, rst_n = 0;
  logic bm1_start = 0, bm2_start = 0, kh_start = 0, ty_start = 0, ks_start = 0;
  logic jb_start = 0, am_start = 0, pe_start = 0, shu_start = 0, sp_start = 0;
  logic [N-1:0] bm1_f, bm1_a, bm1_b, bm1_c, bm2_f, bm2_a, bm2_b, bm2_c;
  logic [N-1:0] kh_f, kh_a, kh_b, ty_f, ks_a, ks_b, jb_a, jb_b, am_a, pe_a, pe_b;
  logic [N:0]   ty_ap, ty_an, ty_bp, ty_bn;
  logic [N-1:0] bm1_result, bm2_result, kh_result, ty_result, ks_result, jb_result;
  logic [N-1:0] am_result, pe_result;
  logic bm1_busy, bm1_done, bm2_busy, bm2_done, kh_busy, kh_done, ty_busy, ty_done;
  logic ks_busy, ks_done, jb_busy, jb_done, am_busy, am_done, pe_busy, pe_done;
  logic [1:0] kh_est;
  logic [CW*M-1:0] shu_a, shu_b, shu_result, sp_a, sp_b, sp_result;
  logic shu_busy, shu_done, sp_busy, sp_done;
  logic bc1_start = 0, bc1_sel = 0, bc2_start = 0;
  logic [N-1:0] bc1_a, bc1_b, bc1_c, bc2_a, bc2_b, bc2_c, bc1_result, bc2_result;
  logic bc1_busy, bc1_done, bc2_busy, bc2_done;

  horner_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int bm1_k [4], bm1_red_f, bm1_red_2f, bm1_hi_range, bm1_lo_range;
  int bm2_k [8], bm2_red_f;
  int kh_plus, kh_minus, kh_pm;
  int ty_pos, ty_neg, ty_zero;
  int ks_k [6], ks_v2f, ks_vf, ks_v0;
  int jb_k1 [5], jb_k2 [3];
  int am_k [5];
  int pe_u [15], pe_sub;
  int bc1_k [2][4], bc1_red_f [2], bc1_red_2f;
  int bc2_k [8], bc2_red_f;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (kh_busy) begin
    if (kh_est == 2'b10) kh_plus++;
    else if (kh_est == 2'b01) kh_minus++;
    else kh_pm++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // waits for done on one design; returns the start-to-done latency
  task automatic wait_done(ref logic st, ref logic dn, output int cycles);
    @(negedge clk) st = 1'b1;
    @(negedge clk) st = 1'b0;
    cycles = 0;
    while (!dn) begin @(negedge clk); cycles++; end
  endtask

  function automatic logic [63:0] pow2mod(input logic [63:0] k, input int sh, input logic [63:0] ff);
    logic [63:0] r;
    r = k % ff;
    for (int j = 0; j < sh; j++) begin r = r << 1; if (r >= ff) r -= ff; end
    return r;
  endfunction

  // ---------------- radix-2 models ----------------
  task automatic do_bm1(input logic [N-1:0] ff, aa, bb, cc);
    logic [63:0] r, t, k, want;
    int cyc;
    bm1_f = ff; bm1_a = aa; bm1_b = bb; bm1_c = cc;
    wait_done(bm1_start, bm1_done, cyc);
    want = (64'(aa) * 64'(bb) + 64'(cc)) % 64'(ff);
    check(64'(bm1_result) == want, $sformatf("bm1 result %h want %h", bm1_result, want));
    check(cyc == N + 1, "bm1 latency");
    r = 0;
    for (int i = N - 1; i >= 0; i--) begin
      t = 2 * r + 64'(cc[i]) + (aa[i] ? 64'(bb) : 0);
      k = t >> N;
      bm1_k[k]++;
      r = pow2mod(k, N, 64'(ff)) + (t & 64'hFFFF_FFFF);
    end
    if (ff[N-2]) bm1_hi_range++; else bm1_lo_range++;
    if (r >= 2 * 64'(ff)) bm1_red_2f++;
    else if (r >= 64'(ff)) bm1_red_f++;
  endtask

  task automatic do_bm2(input logic [N-1:0] ff, aa, bb, cc);
    logic [63:0] r, t, k, want;
    int cyc;
    bm2_f = ff; bm2_a = aa; bm2_b = bb; bm2_c = cc;
    wait_done(bm2_start, bm2_done, cyc);
    want = (64'(aa) * 64'(bb) + 64'(cc)) % 64'(ff);
    check(64'(bm2_result) == want, $sformatf("bm2 result %h want %h", bm2_result, want));
    check(cyc == N + 1, "bm2 latency");
    r = 0;
    for (int i = N - 1; i >= 0; i--) begin
      t = 2 * r + 64'(cc[i]) + (aa[i] ? 64'(bb) : 0);
      k = t >> (N - 1);
      bm2_k[k]++;
      r = pow2mod(k, N - 1, 64'(ff)) + (t & 64'h7FFF_FFFF);
    end
    if (r >= 64'(ff)) bm2_red_f++;
  endtask

  // constant-table radix-2: same recurrences, modulus fixed by parameter
  task automatic do_bc1(input logic sl, input logic [N-1:0] aa, bb, cc);
    logic [63:0] r, t, k, want, ff;
    int cyc;
    ff = sl ? 64'(F2) : 64'(F);
    bc1_sel = sl; bc1_a = aa; bc1_b = bb; bc1_c = cc;
    wait_done(bc1_start, bc1_done, cyc);
    want = (64'(aa) * 64'(bb) + 64'(cc)) % ff;
    check(64'(bc1_result) == want, $sformatf("bc1 result %h want %h", bc1_result, want));
    check(cyc == N, "bc1 latency");
    r = 0;
    for (int i = N - 1; i >= 0; i--) begin
      t = 2 * r + 64'(cc[i]) + (aa[i] ? 64'(bb) : 0);
      k = t >> N;
      bc1_k[sl][k]++;
      r = pow2mod(k, N, ff) + (t & 64'hFFFF_FFFF);
    end
    if (r >= 2 * ff) bc1_red_2f++;
    else if (r >= ff) bc1_red_f[sl]++;
  endtask

  task automatic do_bc2(input logic [N-1:0] aa, bb, cc);
    logic [63:0] r, t, k, want;
    int cyc;
    bc2_a = aa; bc2_b = bb; bc2_c = cc;
    wait_done(bc2_start, bc2_done, cyc);
    want = (64'(aa) * 64'(bb) + 64'(cc)) % 64'(F);
    check(64'(bc2_result) == want, $sformatf("bc2 result %h want %h", bc2_result, want));
    check(cyc == N, "bc2 latency");
    r = 0;
    for (int i = N - 1; i >= 0; i--) begin
      t = 2 * r + 64'(cc[i]) + (aa[i] ? 64'(bb) : 0);
      k = t >> (N - 1);
      bc2_k[k]++;
      r = pow2mod(k, N - 1, 64'(F)) + (t & 64'h7FFF_FFFF);
    end
    if (r >= 64'(F)) bc2_red_f++;
  endtask

  task automatic do_kh(input logic [N-1:0] ff, aa, bb);
    logic [63:0] want;
    int cyc;
    kh_f = ff; kh_a = aa; kh_b = bb;
    wait_done(kh_start, kh_done, cyc);
    want = (64'(aa) * 64'(bb)) % 64'(ff);
    check(64'(kh_result) == want, $sformatf("kh result %h want %h", kh_result, want));
    check(cyc == N + 3, "kh latency");
  endtask

  // ---------------- borrow-save ----------------
  task automatic encode(input longint x, output logic [N:0] p, output logic [N:0] n);
    longint lim, r;
    lim = (longint'(1) << (N + 1)) - 1;
    r = longint'({$urandom, $urandom} & 64'h7FFF_FFFF_FFFF_FFFF);
    if (x >= 0) begin r = r % (lim - x + 1); n = (N+1)'(r); p = (N+1)'(r + x); end
    else begin r = r % (lim + x + 1); p = (N+1)'(r); n = (N+1)'(r - x); end
  endtask

  task automatic do_ty(input logic [N-1:0] ff, input longint xa, input longint xb);
    logic [63:0] am, bm, want;
    int cyc;
    ty_f = ff;
    encode(xa, ty_ap, ty_an);
    encode(xb, ty_bp, ty_bn);
    for (int i = 0; i <= N; i++) begin
      if (ty_ap[i] && !ty_an[i]) ty_pos++;
      else if (!ty_ap[i] && ty_an[i]) ty_neg++;
      else ty_zero++;
    end
    wait_done(ty_start, ty_done, cyc);
    am = (xa < 0) ? 64'(xa + longint'(ff)) : 64'(xa);
    bm = (xb < 0) ? 64'(xb + longint'(ff)) : 64'(xb);
    want = (am * bm) % 64'(ff);
    check(64'(ty_result) == want, $sformatf("ty result %h want %h", ty_result, want));
    check(cyc == N + 1, "ty latency");
  endtask

  // ---------------- carry-save models (constant F) ----------------
  function automatic logic [63:0] maj(input logic [63:0] x, y, z);
    return (x & y) | (x & z) | (y & z);
  endfunction

  // final reduction branch of the Kim-Sobelman Modred for a residue rs + 2rc
  task automatic count_modred(input logic [63:0] rs, rc);
    logic [63:0] u, v;
    u = rs + 2 * (rc & 64'h7FFF_FFFF);
    v = (u & 64'hFFFF_FFFF) + pow2mod(64'(rc[31]) + (u >> 32), N, 64'(F));
    if (v >= 2 * 64'(F)) ks_v2f++;
    else if (v >= 64'(F)) ks_vf++;
    else ks_v0++;
  endtask

  task automatic do_ks(input logic [N-1:0] aa, bb);
    logic [63:0] rs, rc, pp, ts, tc, k, y, want;
    int cyc;
    ks_a = aa; ks_b = bb;
    wait_done(ks_start, ks_done, cyc);
    want = (64'(aa) * 64'(bb)) % 64'(F);
    check(64'(ks_result) == want, $sformatf("ks result %h want %h", ks_result, want));
    check(cyc == N, "ks latency");
    rs = 0; rc = 0;
    for (int i = N - 1; i >= 0; i--) begin
      pp = aa[i] ? 64'(bb) : 0;
      ts = (pp ^ (rs << 1) ^ (rc << 2)) & 64'hFFFF_FFFF;
      tc = maj(pp, (rs << 1) & 64'hFFFF_FFFF, (rc << 2) & 64'hFFFF_FFFF);
      k = 64'(rs[31]) + 2 * 64'(rc[31]) + 64'(rc[30]) + 64'(tc[31]);
      ks_k[k]++;
      y = (tc << 1) & 64'hFFFF_FFFF;
      pp = pow2mod(k, N, 64'(F));
      rs = ts ^ y ^ pp;
      rc = maj(ts, y, pp);
    end
    count_modred(rs, rc);
  endtask

  task automatic do_jb(input logic [N-1:0] aa, bb);
    logic [63:0] rs, rc, pp, ss, sc, ts, tc, k1, k2, x, y, z, want;
    int cyc;
    jb_a = aa; jb_b = bb;
    wait_done(jb_start, jb_done, cyc);
    want = (64'(aa) * 64'(bb)) % 64'(F);
    check(64'(jb_result) == want, $sformatf("jb result %h want %h", jb_result, want));
    check(cyc == N, "jb latency");
    rs = 0; rc = 0;
    for (int i = N - 1; i >= 0; i--) begin
      k1 = 2 * 64'(rc[31]) + 64'(rs[31]) + 64'(rc[30]);
      jb_k1[k1]++;
      x = pow2mod(k1, N, 64'(F));
      y = (rs << 1) & 64'hFFFF_FFFF;
      z = (rc << 2) & 64'hFFFF_FFFF;
      ss = x ^ y ^ z; sc = maj(x, y, z);
      pp = aa[i] ? 64'(bb) : 0;
      y = (sc << 1) & 64'hFFFF_FFFF;
      ts = ss ^ y ^ pp; tc = maj(ss, y, pp);
      k2 = 64'(sc[31]) + 64'(tc[31]);
      jb_k2[k2]++;
      y = (tc << 1) & 64'hFFFF_FFFF;
      z = pow2mod(k2, N, 64'(F));
      rs = ts ^ y ^ z; rc = maj(ts, y, z);
    end
  endtask

  task automatic do_am(input logic [N-1:0] aa);
    logic [63:0] rs, rc, k, x, y, z, want;
    int cyc;
    am_a = aa;
    wait_done(am_start, am_done, cyc);
    want = (64'(aa) * 64'(AM_B)) % 64'(F);
    check(64'(am_result) == want, $sformatf("am result %h want %h", am_result, want));
    check(cyc == N, "am latency");
    rs = 0; rc = 0;
    for (int i = N - 1; i >= 0; i--) begin
      k = 2 * 64'(rc[31]) + 64'(rc[30]) + 64'(rs[31]);
      am_k[k]++;
      x = (pow2mod(k, N, 64'(F)) + (aa[i] ? 64'(AM_B) : 0)) % 64'(F);
      y = (rs << 1) & 64'hFFFF_FFFF;
      z = (rc << 2) & 64'hFFFF_FFFF;
      rs = x ^ y ^ z; rc = maj(x, y, z);
    end
  endtask

  task automatic do_pe(input logic [N-1:0] aa, bb);
    logic [63:0] rs, rc, u, pp, x, y, z, ts, tc, half, want;
    int cyc;
    pe_a = aa; pe_b = bb;
    wait_done(pe_start, pe_done, cyc);
    want = (64'(aa) * 64'(bb)) % 64'(F);
    check(64'(pe_result) == want, $sformatf("pe result %h want %h", pe_result, want));
    check(cyc == N + 1, "pe latency");
    rs = 0; rc = 0;
    for (int i = N - 1; i >= -1; i--) begin
      u = ((rs >> 30) & 7) + ((rc >> 29) & 7);
      pe_u[u]++;
      pp = (i >= 0 && aa[i]) ? 64'(bb) : 0;
      y = (rs & 64'h3FFF_FFFF) << 1;
      z = (rc & 64'h1FFF_FFFF) << 2;
      ts = pp ^ y ^ z; tc = maj(pp, y, z);
      x = tc << 1;
      z = pow2mod(u, N - 2, 64'(F)) << 1;
      rs = ts ^ x ^ z; rc = maj(ts, x, z) & 64'hFFFF_FFFF;
    end
    half = (rs + 2 * rc) >> 1;
    if (half >= 64'(F)) pe_sub++;
  endtask

  // ---------------- GF(3^97) ----------------
  function automatic logic [CW*M-1:0] ref_mul(input logic [CW*M-1:0] x, y);
    int prod [2*M-1];
    logic [CW*M-1:0] o;
    foreach (prod[i]) prod[i] = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        prod[i+j] = (prod[i+j] + int'(x[CW*i +: CW]) * int'(y[CW*j +: CW])) % P;
    for (int k = 2*M-2; k >= M; k--) begin
      int t;
      t = prod[k];
      prod[k] = 0;
      for (int j = 0; j < M; j++)
        prod[k-M+j] = (prod[k-M+j] + (P - t) * int'(FC[CW*j +: CW])) % P;
    end
    for (int i = 0; i < M; i++) o[CW*i +: CW] = CW'(prod[i]);
    return o;
  endfunction

  function automatic logic [CW*M-1:0] rnd_poly();
    logic [CW*M-1:0] o;
    for (int i = 0; i < M; i++) o[CW*i +: CW] = CW'($urandom % P);
    return o;
  endfunction

  task automatic do_gf(input logic [CW*M-1:0] x, y);
    logic [CW*M-1:0] want;
    int cyc;
    want = ref_mul(x, y);
    shu_a = x; shu_b = y;
    wait_done(shu_start, shu_done, cyc);
    check(shu_result == want, "shu result");
    check(cyc == (M + 1) / 2, "shu latency");
    sp_a = x; sp_b = y;
    wait_done(sp_start, sp_done, cyc);
    check(sp_result == want, "sp result");
    check(cyc == (M + 1) / 2 + 1, "sp latency");
  endtask

  function automatic logic [N-1:0] rnd_f(input bit high);
    logic [N-1:0] v;
    v = N'({$urandom, $urandom});
    v[N-1] = 1'b1;
    v[N-2] = high;
    if (v == {1'b1, {(N-1){1'b0}}}) v[0] = 1'b1;
    return v;
  endfunction

  task automatic mech(input int count, input string what);
    check(count > 0, {"mechanism never seen: ", what});
  endtask

  initial begin
    logic [N-1:0] ff;
    logic [CW*M-1:0] all2;
    longint m1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // extremes first
    ff = '1;
    do_bm1(ff, '1, ff - 1, '1);
    do_bm2(ff, '1, ff - 1, '1);
    ff = {1'b1, {(N-2){1'b0}}, 1'b1};
    do_bm1(ff, '1, ff - 1, '1);
    do_bm2(ff, '1, ff - 1, '1);
    do_kh(ff, ff - 1, ff - 1);
    do_ty(ff, -(longint'(ff) - 1), longint'(ff) - 1);
    do_ks('1, F - 1);
    do_jb('1, F - 1);
    do_am('1);
    do_pe('1, F - 1);
    do_bc1(1'b0, '1, F - 1, '1);
    do_bc1(1'b1, '1, F2 - 1, '1);
    do_bc2('1, F - 1, '1);
    for (int k = 0; k < 150; k++) begin
      ff = rnd_f(k[0]);
      do_bm1(ff, $urandom, $urandom % ff, $urandom);
      do_bm2(ff, $urandom, $urandom % ff, $urandom);
      do_kh(ff, $urandom % ff, $urandom % ff);
      m1 = longint'(ff) - 1;
      do_ty(ff, longint'({$urandom, $urandom} & 64'h7FFF_FFFF_FFFF_FFFF) % (2 * m1 + 1) - m1,
                longint'({$urandom, $urandom} & 64'h7FFF_FFFF_FFFF_FFFF) % (2 * m1 + 1) - m1);
      do_ks($urandom, $urandom % F);
      do_jb($urandom, $urandom % F);
      do_am($urandom);
      do_pe($urandom, $urandom % F);
      do_bc1(k[0], $urandom, $urandom % (k[0] ? F2 : F), $urandom);
      do_bc2($urandom, $urandom % F, $urandom);
    end
    // large operands near the top of the ranges
    for (int k = 0; k < 150; k++) begin
      ff = rnd_f(1'b1);
      ff[N-3] = 1'b1;
      do_bm2(ff, N'({$urandom, $urandom}) | N'(32'hF000_0000), ff - ($urandom % 4096), $urandom);
      do_ks($urandom | 32'hC000_0000, F - 1 - ($urandom % 65536));
      do_jb($urandom | 32'hC000_0000, F - 1 - ($urandom % 65536));
      do_pe($urandom | 32'hC000_0000, F - 1 - ($urandom % 65536));
      do_bc1(k[0], $urandom | 32'hF000_0000, (k[0] ? F2 : F) - 1 - ($urandom % 65536), $urandom);
      do_bc2(N'({$urandom, $urandom}) | N'(32'hF000_0000), F - 1 - ($urandom % 4096), $urandom);
    end
    for (int i = 0; i < M; i++) all2[CW*i +: CW] = CW'(P - 1);
    do_gf(all2, all2);
    for (int k = 0; k < 20; k++) do_gf(rnd_poly(), rnd_poly());

    // mechanisms
    for (int k = 1; k < 4; k++) mech(bm1_k[k], $sformatf("bm1 phi(%0d)", k));
    mech(bm1_red_f, "bm1 Modred subtracts F");
    mech(bm1_red_2f, "bm1 Modred subtracts 2F");
    mech(bm1_hi_range, "bm1 modulus >= 2^(N-1)+2^(N-2)");
    mech(bm1_lo_range, "bm1 modulus < 2^(N-1)+2^(N-2)");
    for (int k = 1; k < 7; k++) mech(bm2_k[k], $sformatf("bm2 psi(%0d)", k));
    mech(bm2_red_f, "bm2 Modred subtracts F");
    for (int m = 0; m < 2; m++) begin
      for (int k = 1; k < 4; k++) mech(bc1_k[m][k], $sformatf("bc1 modulus %0d phi(%0d)", m + 1, k));
      mech(bc1_red_f[m], $sformatf("bc1 modulus %0d Modred subtracts F", m + 1));
    end
    mech(bc1_red_2f, "bc1 Modred subtracts 2F");
    for (int k = 1; k < 7; k++) mech(bc2_k[k], $sformatf("bc2 psi(%0d)", k));
    mech(bc2_red_f, "bc2 Modred subtracts F");
    mech(kh_plus, "kh estimate (+)");
    mech(kh_minus, "kh estimate (-)");
    mech(kh_pm, "kh estimate (+-)");
    mech(ty_pos, "ty digit +1");
    mech(ty_neg, "ty digit -1");
    mech(ty_zero, "ty digit 0");
    for (int k = 1; k < 5; k++) mech(ks_k[k], $sformatf("ks ROM[%0d]", k));
    mech(ks_vf, "ks Modred V-F");
    mech(ks_v0, "ks Modred V");
    for (int k = 1; k < 4; k++) mech(jb_k1[k], $sformatf("jb ROM1[%0d]", k));
    for (int k = 1; k < 3; k++) mech(jb_k2[k], $sformatf("jb ROM2[%0d]", k));
    for (int k = 1; k < 5; k++) mech(am_k[k], $sformatf("am ROM[%0d]", k));
    for (int k = 1; k < 12; k++) mech(pe_u[k], $sformatf("pe ROM[%0d]", k));
    mech(pe_sub, "pe Modred subtracts F");
    $display("bm1 k: %0d %0d %0d %0d  red F %0d 2F %0d", bm1_k[0], bm1_k[1], bm1_k[2], bm1_k[3], bm1_red_f, bm1_red_2f);
    $display("bm2 k: %p  red F %0d", bm2_k, bm2_red_f);
    $display("bc1 k: %p  red F %p 2F %0d", bc1_k, bc1_red_f, bc1_red_2f);
    $display("bc2 k: %p  red F %0d", bc2_k, bc2_red_f);
    $display("kh est + %0d - %0d +- %0d", kh_plus, kh_minus, kh_pm);
    $display("ks k: %p  modred %0d %0d %0d", ks_k, ks_v2f, ks_vf, ks_v0);
    $display("jb k1: %p k2: %p", jb_k1, jb_k2);
    $display("am k: %p", am_k);
    $display("pe u: %p  sub %0d", pe_u, pe_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
