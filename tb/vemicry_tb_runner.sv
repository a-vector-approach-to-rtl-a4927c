// vemicry_tb_runner -- drives one vemicry instance through a whole program and
// checks it against an instruction-level reference model kept in this module.
//
// Programs, in order:
//   1. timing: issue interval P/R for independent instructions, one stall cycle
//      for an EXM-consumer right after its producer when P/R = 1, none for an
//      EXC-consumer, write-back latency (busy) P/R+3 cycles after issue; the
//      same with a vector length l = R (one iteration, so the stall returns)
//   2. AES-128 encryption of one block (vector length 4) and of two blocks at
//      once (8 words), using the vector sequences for AddRoundKey, SubBytes
//      (VBYTELD), ShiftRows (VTRANSP + VBCROTR) and MixColumns (VBCROTR, VXOR,
//      VMPMUL); block 0 is the FIPS-197 example, block 1 random; both compared
//      with a reference AES in this file
//   3. Montgomery multiplication in GF(2^191), f = x^191 + x^9 + 1, 32-bit
//      reduction steps (VSPMULT, VXOR, VEXTRACT, VSMOVE, VWSHR), compared with a
//      bit-serial reference
//   4. carry chains: VADDU, VSAMULT and VSPMULT whose carries or high words
//      cross every element, each result word extracted
//   5. random instruction streams over few registers (many hazards) and random
//      vector lengths (MTVL); every VEXTRACT and the final register, CAR and VCR
//      state compared with the model
// The top-level testbench instantiates this with R = P (the default machine) and
// R < P (several iterations per instruction).
module vemicry_tb_runner
  import vemicry_pkg::*;
#(
  parameter int R        = 8,
  parameter int NRAND    = 400,
  parameter int NMONT    = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_drain,
  output int   n_fwd_exm,
  output int   n_fwd_exc,
  output int   n_bypass,
  output int   n_multi,
  output int   n_host,
  output int   n_short,
  output logic done
);
  localparam int Q = 8, P = 8, DEPTH = 1024;
  localparam int G = P / R;
  localparam int LW = (R > 1) ? $clog2(R) : 1;

  logic          iss_valid = 1'b0;
  vinstr_t       iss_instr = '0;
  logic          iss_ready, res_valid, busy;
  logic [31:0]   res_data;
  logic          hm_req = 1'b0, hm_we = 1'b0, hm_gnt;
  logic [LW-1:0] hm_lane = '0;
  logic [9:0]    hm_addr = '0;
  logic [3:0]    hm_be = '0;
  logic [31:0]   hm_wdata = '0, hm_rdata;
  vevents_t      ev;

  if (R == 8) begin : g_default
    vemicry u_dut (.clk, .rst_n, .iss_valid, .iss_instr, .iss_ready, .res_valid, .res_data,
                   .hm_req, .hm_we, .hm_lane, .hm_addr, .hm_be, .hm_wdata, .hm_gnt,
                   .hm_rdata, .busy, .ev);
  end else begin : g_scaled
    vemicry #(.R(R)) u_dut (.clk, .rst_n, .iss_valid, .iss_instr, .iss_ready, .res_valid,
                   .res_data, .hm_req, .hm_we, .hm_lane, .hm_addr, .hm_be, .hm_wdata,
                   .hm_gnt, .hm_rdata, .busy, .ev);
  end

  // ---------------- cycle and event counters ----------------
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_stall   <= n_stall   + int'(ev.hazard_stall);
      n_drain   <= n_drain   + int'(ev.drain_wait);
      n_fwd_exm <= n_fwd_exm + int'(ev.fwd_exm);
      n_fwd_exc <= n_fwd_exc + int'(ev.fwd_exc);
      n_bypass  <= n_bypass  + int'(ev.rf_bypass);
      n_multi   <= n_multi   + int'(ev.multi_iter);
      n_host    <= n_host    + int'(hm_gnt);
    end
  end
  initial begin
    n_stall = 0; n_drain = 0; n_fwd_exm = 0; n_fwd_exc = 0;
    n_bypass = 0; n_multi = 0; n_host = 0;
  end

  // ---------------- reference model state ----------------
  logic [31:0] mv [Q][P];
  logic [31:0] mcar, mvcr;
  int          mvl;
  logic [7:0]  mmem [R][4][DEPTH];

  function automatic logic [31:0] rotr(logic [31:0] x, int s);
    s = s % 32;
    return (s == 0) ? x : ((x >> s) | (x << (32 - s)));
  endfunction

  function automatic int clipn(int v);
    return (v > P) ? P : v;
  endfunction

  // Apply one instruction to the model; returns the scalar result if any.
  function automatic logic [31:0] model_exec(vinstr_t in);
    logic [31:0] a [P];
    logic [31:0] b [P];
    logic [31:0] o [P];
    logic [32:0] s;
    logic [63:0] pr;
    logic [31:0] hi;
    logic        c;
    int          cnt, n, l;
    logic [31:0] ret;
    ret = '0;
    l = mvl;
    n = int'(in.n);
    for (int e = 0; e < P; e++) begin
      a[e] = mv[in.vj][e];
      b[e] = mv[in.vk][e];
      o[e] = mv[in.vd][e];
    end
    case (in.op)
      OP_VADDU: begin
        c = 1'b0;
        for (int e = 0; e < l; e++) begin
          s = {1'b0, a[e]} + {1'b0, b[e]} + {32'b0, c};
          o[e] = s[31:0]; c = s[32];
        end
        if (l == P) mcar = mcar + {31'b0, c};
      end
      OP_VBYTELD: begin
        cnt = clipn(n + 1);
        for (int e = 0; e < cnt; e++)
          for (int k = 0; k < 4; k++)
            o[e][8*k +: 8] = mmem[e % R][k][(in.rs + {24'b0, o[e][8*k +: 8]}) % DEPTH];
      end
      OP_VLOAD: begin
        cnt = clipn(n + 1);
        for (int e = 0; e < cnt; e++)
          for (int k = 0; k < 4; k++)
            o[e][8*k +: 8] = mmem[e % R][k][(in.rs + 32'(e / R)) % DEPTH];
      end
      OP_VSTORE: begin
        cnt = clipn(n + 1);
        for (int e = 0; e < cnt; e++)
          for (int k = 0; k < 4; k++)
            mmem[e % R][k][(in.rs + 32'(e / R)) % DEPTH] = a[e][8*k +: 8];
      end
      OP_VBCROTR:
        for (int e = 0; e < l; e++) o[e] = mvcr[e] ? rotr(a[e], n % 32) : a[e];
      OP_VMPMUL:
        for (int e = 0; e < l; e++)
          for (int k = 0; k < 4; k++)
            o[e][8*k +: 8] = {a[e][8*k +: 7], 1'b0} ^ (a[e][8*k+7] ? mvcr[7:0] : 8'h00);
      OP_VSADDU:
        for (int e = 0; e < l; e++) begin
          s = {1'b0, a[e]} + {1'b0, in.rs};
          o[e] = s[31:0]; mcar[e] = s[32];
        end
      OP_VSAMULT: begin
        hi = '0; c = 1'b0;
        for (int e = 0; e < l; e++) begin
          pr = {32'b0, a[e]} * {32'b0, in.rs};
          s = {1'b0, pr[31:0]} + {1'b0, hi} + {32'b0, c};
          o[e] = s[31:0]; c = s[32]; hi = pr[63:32];
        end
        mcar = hi + {31'b0, c};
      end
      OP_VSPMULT: begin
        hi = '0;
        for (int e = 0; e < l; e++) begin
          pr = '0;
          for (int i = 0; i < 32; i++) if (in.rs[i]) pr = pr ^ ({32'b0, a[e]} << i);
          o[e] = pr[31:0] ^ hi; hi = pr[63:32];
        end
        mcar = hi;
      end
      OP_VSMOVE: begin
        cnt = (n == 0 || n > l) ? l : n;
        for (int e = 0; e < cnt; e++) o[e] = in.rs;
      end
      OP_VXOR: for (int e = 0; e < l; e++) o[e] = a[e] ^ b[e];
      OP_VTRANSP: begin
        for (int e = 0; e < P; e++) o[e] = a[e];
        if (n != 0)
          for (int blk = 0; blk + 4 <= P; blk += 4)
            for (int col = 0; col < 4; col++)
              for (int row = 0; row < 4; row++)
                o[blk + col][31 - 8*row -: 8] = a[blk + row][31 - 8*col -: 8];
      end
      OP_VWSHL: begin
        for (int e = 0; e < P; e++) o[e] = (e >= n) ? a[e - n] : '0;
        if (n != 0) mcar = (n <= P) ? a[P - n] : '0;
      end
      OP_VWSHR: begin
        logic [31:0] cc;
        cc = mcar;
        for (int e = 0; e < P; e++)
          o[e] = (n == 0) ? a[e] : (e + n < P) ? a[e + n] : (e + n == P) ? cc : '0;
      end
      OP_VEXTRACT: ret = (n == 0) ? mcar : (n <= P) ? a[n - 1] : '0;
      OP_MTVCR:    mvcr = in.rs;
      OP_MFVCR:    ret = mvcr;
      OP_MTVL:     mvl = (in.rs == 0 || in.rs > P) ? P : int'(in.rs);
      default: ;
    endcase
    if (!(in.op inside {OP_VSTORE, OP_VEXTRACT, OP_MTVCR, OP_MFVCR, OP_MTVL}))
      for (int e = 0; e < P; e++) mv[in.vd][e] = o[e];
    return ret;
  endfunction

  // ---------------- driver tasks ----------------
  int acc_cyc;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL R=%0d %s: got %08h expected %08h", R, what, got, exp);
    end
  endtask

  task automatic issue(vinstr_t in, output logic [31:0] result);
    logic [31:0] exp;
    @(negedge clk);
    iss_valid = 1'b1;
    iss_instr = in;
    #1;
    while (!iss_ready) begin @(negedge clk); #1; end
    acc_cyc = cyc;
    if (uses_vl(in.op) && mvl < P) n_short++;
    exp = model_exec(in);
    @(posedge clk);
    #1;
    iss_valid = 1'b0;
    result = res_data;
    if (in.op == OP_VEXTRACT || in.op == OP_MFVCR)
      check($sformatf("%s n=%0d", in.op.name(), in.n), res_valid ? res_data : ~exp, exp);
  endtask

  task automatic op(vop_t o, int vd, int vj, int vk, int n, logic [31:0] rs);
    logic [31:0] r;
    vinstr_t in;
    in = '{op: o, vd: RNW'(vd), vj: RNW'(vj), vk: RNW'(vk), n: NW'(n), rs: rs};
    issue(in, r);
  endtask

  task automatic extract(int v, int n, output logic [31:0] r);
    vinstr_t in;
    in = '{op: OP_VEXTRACT, vd: '0, vj: RNW'(v), vk: '0, n: NW'(n), rs: '0};
    issue(in, r);
  endtask

  task automatic host_write(int lane, int addr, logic [31:0] data);
    @(negedge clk);
    hm_req = 1'b1; hm_we = 1'b1; hm_lane = LW'(lane); hm_addr = 10'(addr);
    hm_be = 4'hF; hm_wdata = data;
    #1;
    while (!hm_gnt) begin @(negedge clk); #1; end
    for (int k = 0; k < 4; k++) mmem[lane][k][addr % DEPTH] = data[8*k +: 8];
    @(posedge clk);
    #1;
    hm_req = 1'b0; hm_we = 1'b0;
  endtask

  task automatic host_read(int lane, int addr, output logic [31:0] data);
    @(negedge clk);
    hm_req = 1'b1; hm_we = 1'b0; hm_lane = LW'(lane); hm_addr = 10'(addr);
    #1;
    while (!hm_gnt) begin @(negedge clk); #1; end
    @(posedge clk);
    #1;
    hm_req = 1'b0;
    data = hm_rdata;
  endtask

  // word e of a vector placed at row base in the lane banks
  task automatic put_vec_word(int base, int e, logic [31:0] d);
    host_write(e % R, base + e / R, d);
  endtask
  task automatic get_vec_word(int base, int e, output logic [31:0] d);
    host_read(e % R, base + e / R, d);
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  // ---------------- AES reference ----------------
  logic [7:0] sbox [256];

  function automatic logic [7:0] gmul(logic [7:0] x, logic [7:0] y);
    logic [7:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) begin
      if (y[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  // S-box: multiplicative inverse in GF(2^8) followed by the FIPS-197 affine map.
  task automatic build_sbox();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, bb;
      inv = '0;
      for (int y = 1; y < 256; y++) if (gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      for (int i = 0; i < 8; i++)
        bb[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ (8'h63 >> i) & 1;
      sbox[x] = bb;
    end
  endtask

  logic [31:0] rk [44];

  function automatic logic [31:0] subw(logic [31:0] w);
    return {sbox[w[31:24]], sbox[w[23:16]], sbox[w[15:8]], sbox[w[7:0]]};
  endfunction

  task automatic key_expand(logic [127:0] key);
    logic [7:0] rcon;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) rk[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = rk[i-1];
      if (i % 4 == 0) begin
        t = subw({t[23:0], t[31:24]}) ^ {rcon, 24'h0};
        rcon = {rcon[6:0], 1'b0} ^ (rcon[7] ? 8'h1b : 8'h00);
      end
      rk[i] = rk[i-4] ^ t;
    end
  endtask

  function automatic logic [127:0] aes_ref(logic [127:0] pt);
    logic [7:0] st [4][4];   // [row][col]
    logic [7:0] t  [4][4];
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) st[r][c] = pt[127 - 8*(4*c + r) -: 8];
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) st[r][c] ^= rk[c][31 - 8*r -: 8];
    for (int round = 1; round <= 10; round++) begin
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) st[r][c] = sbox[st[r][c]];
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) t[r][c] = st[r][(c + r) % 4];
      st = t;
      if (round != 10)
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            t[r][c] = gmul(st[r][c], 8'h02) ^ gmul(st[(r+1)%4][c], 8'h03) ^
                      st[(r+2)%4][c] ^ st[(r+3)%4][c];
      st = t;
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) st[r][c] ^= rk[4*round + c][31 - 8*r -: 8];
    end
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) aes_ref[127 - 8*(4*c + r) -: 8] = st[r][c];
  endfunction

  // ---------------- AES on the co-processor ----------------
  localparam int SBOX_BASE = 256, KEY_BASE = 16, DATA_BASE = 8;

  // nblk = 1: one block with the vector length set to 4 words; nblk = 2: two
  // blocks side by side filling all 8 words. Tables are loaded on the first call.
  task automatic run_aes(int nblk);
    logic [127:0] key, pt0, pt1, ct0, ct1;
    logic [31:0]  w;
    int           t0, nw;
    nw  = 4 * nblk;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    pt0 = 128'h00112233445566778899aabbccddeeff;
    pt1 = {$urandom, $urandom, $urandom, $urandom};
    if (nblk == 1) build_sbox();
    check("sbox[00]", {24'b0, sbox[8'h00]}, 32'h63);
    check("sbox[53]", {24'b0, sbox[8'h53]}, 32'hed);
    key_expand(key);
    // S-box copy in every byte array of every lane
    if (nblk == 1)
      for (int l = 0; l < R; l++)
        for (int x = 0; x < 256; x++)
          host_write(l, SBOX_BASE + x, {4{sbox[x]}});
    // round keys, repeated for the two blocks (8 words per round key)
    for (int k = 0; k <= 10; k++)
      for (int e = 0; e < 8; e++)
        put_vec_word(KEY_BASE + k * (8 / R > 0 ? 8 / R : 1), e, rk[4*k + e % 4]);
    for (int e = 0; e < 8; e++)
      put_vec_word(DATA_BASE, e, (e < 4) ? pt0[127 - 32*e -: 32] : pt1[127 - 32*(e-4) -: 32]);

    t0 = cyc;
    op(OP_MTVL, 0, 0, 0, 0, 32'(nw));                          // l = 4 or 8 words
    op(OP_VLOAD, 1, 0, 0, nw - 1, DATA_BASE);                  // V1 = state
    op(OP_VLOAD, 0, 0, 0, nw - 1, KEY_BASE);                   // AddRoundKey
    op(OP_VXOR, 1, 1, 0, 0, 0);
    for (int round = 1; round <= 10; round++) begin
      op(OP_VBYTELD, 1, 0, 0, nw - 1, SBOX_BASE);              // SubBytes
      op(OP_VTRANSP, 2, 1, 0, 4, 0);                           // ShiftRows
      op(OP_MTVCR, 0, 0, 0, 0, 32'hEE);
      op(OP_VBCROTR, 3, 2, 0, 24, 0);
      op(OP_MTVCR, 0, 0, 0, 0, 32'hCC);
      op(OP_VBCROTR, 2, 3, 0, 24, 0);
      op(OP_MTVCR, 0, 0, 0, 0, 32'h88);
      op(OP_VBCROTR, 3, 2, 0, 24, 0);
      op(OP_VTRANSP, 1, 3, 0, 4, 0);
      if (round != 10) begin                                   // MixColumns
        op(OP_MTVCR, 0, 0, 0, 0, 32'hFFFF);
        op(OP_VBCROTR, 4, 1, 0, 8, 0);
        op(OP_VBCROTR, 5, 1, 0, 16, 0);
        op(OP_VBCROTR, 6, 1, 0, 24, 0);
        op(OP_VXOR, 7, 1, 6, 0, 0);
        op(OP_MTVCR, 0, 0, 0, 0, 32'h011B);
        op(OP_VMPMUL, 2, 7, 0, 0, 0);
        op(OP_VXOR, 1, 2, 4, 0, 0);
        op(OP_VXOR, 1, 1, 5, 0, 0);
        op(OP_VXOR, 1, 1, 6, 0, 0);
      end
      op(OP_VLOAD, 0, 0, 0, nw - 1, KEY_BASE + round * (8 / R > 0 ? 8 / R : 1));
      op(OP_VXOR, 1, 1, 0, 0, 0);
    end
    op(OP_VSTORE, 0, 1, 0, nw - 1, DATA_BASE + 4);
    op(OP_MTVL, 0, 0, 0, 0, 0);
    wait_idle();
    $display("R=%0d AES-128, %0d block(s), l=%0d: %0d co-processor cycles", R, nblk, nw, cyc - t0);
    ct0 = aes_ref(pt0);
    ct1 = aes_ref(pt1);
    check("AES ref FIPS-197", ct0[127:96], 32'h69c4e0d8);
    check("AES ref FIPS-197", ct0[31:0],   32'h70b4c55a);
    for (int e = 0; e < nw; e++) begin
      get_vec_word(DATA_BASE + 4, e, w);
      check($sformatf("AES ciphertext word %0d", e), w,
            (e < 4) ? ct0[127 - 32*e -: 32] : ct1[127 - 32*(e-4) -: 32]);
    end
  endtask

  // ---------------- Montgomery in GF(2^191) ----------------
  localparam int MW = 6;                       // M = ceil(191/32)
  localparam int MB = 512, FB = 520, CB = 528; // memory rows of b, f, c

  function automatic logic [191:0] polymod_mul(logic [191:0] a, logic [191:0] b, logic [191:0] f);
    logic [191:0] r;
    r = '0;
    for (int i = 190; i >= 0; i--) begin
      r = r << 1;
      if (r[191]) r ^= f;
      if (a[i]) r ^= b;
    end
    return r;
  endfunction

  task automatic run_mont(int rep);
    logic [191:0] a, b, f, cref;
    logic [31:0]  n0, aj, c0, mm, w;
    logic [63:0]  pr;
    int           t0;
    f = '0; f[191] = 1'b1; f[9] = 1'b1; f[0] = 1'b1;
    a = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom}; a[191] = 1'b0;
    b = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom}; b[191] = 1'b0;
    // N0 = F0^-1 mod x^32, F0 = low word of f
    n0 = 32'h1;
    for (int i = 1; i < 32; i++) begin
      pr = '0;
      for (int k = 0; k < 32; k++) if (n0[k]) pr ^= {32'b0, f[31:0]} << k;
      if (pr[i]) n0[i] = 1'b1;
    end
    // reference: a*b*x^-192 mod f
    cref = polymod_mul(a, b, f);
    for (int i = 0; i < 192; i++) begin
      if (cref[0]) cref ^= f;
      cref = cref >> 1;
    end
    for (int e = 0; e < MW; e++) begin
      put_vec_word(MB, e, b[32*e +: 32]);
      put_vec_word(FB, e, f[32*e +: 32]);
    end
    t0 = cyc;
    for (int v = 0; v < 6; v++) op(OP_VSMOVE, v, 0, 0, 0, 0); // clear
    op(OP_VLOAD, 0, 0, 0, MW - 1, MB);                        // v0 = b
    op(OP_VLOAD, 1, 0, 0, MW - 1, FB);                        // v1 = f
    for (int j = 0; j < MW; j++) begin
      aj = a[32*j +: 32];
      op(OP_VSPMULT, 5, 0, 0, 0, aj);                         // v5 = a_j * b
      op(OP_VXOR, 3, 5, 3, 0, 0);                             // c += v5
      extract(3, 1, c0);                                      // C0
      op(OP_VSMOVE, 2, 0, 0, 1, c0);
      op(OP_VSPMULT, 4, 2, 0, 0, n0);                         // M = C0*N0 mod x^32
      extract(4, 1, mm);
      op(OP_VSPMULT, 5, 1, 0, 0, mm);                         // v5 = M * f
      op(OP_VXOR, 3, 3, 5, 0, 0);
      op(OP_VWSHR, 3, 3, 0, 1, 0);                            // c /= x^32
    end
    op(OP_VSTORE, 0, 3, 0, MW - 1, CB);
    wait_idle();
    if (rep == 0) $display("R=%0d Montgomery GF(2^191): %0d co-processor cycles", R, cyc - t0);
    for (int e = 0; e < MW; e++) begin
      get_vec_word(CB, e, w);
      check($sformatf("Montgomery word %0d", e), w, cref[32*e +: 32]);
    end
  endtask

  // ---------------- timing ----------------
  task automatic run_timing();
    int c1, c2, c3, cb;
    logic [31:0] r;
    op(OP_VXOR, 1, 2, 3, 0, 0); c1 = acc_cyc;
    op(OP_VXOR, 4, 5, 6, 0, 0); c2 = acc_cyc;
    op(OP_VXOR, 7, 2, 3, 0, 0); c3 = acc_cyc;
    check("issue interval", 32'(c2 - c1), 32'(G));
    check("issue interval", 32'(c3 - c2), 32'(G));
    wait_idle();
    op(OP_VXOR, 1, 2, 3, 0, 0); c1 = acc_cyc;
    op(OP_VADDU, 4, 1, 3, 0, 0); c2 = acc_cyc;              // PIVI after producer
    check("PIVI-after-GIVI interval", 32'(c2 - c1), 32'((G == 1) ? 2 : G));
    op(OP_VXOR, 5, 4, 4, 0, 0); c3 = acc_cyc;               // GIVI after PIVI
    check("GIVI-after-PIVI interval", 32'(c3 - c2), 32'(G));
    // busy falls after the last write-back: issue + (G-1) + 4 cycles
    @(negedge clk);
    while (busy) @(negedge clk);
    cb = cyc;
    check("write-back latency", 32'(cb - c3), 32'(G + 3));
    // vector length l = R: a single iteration per instruction
    op(OP_MTVL, 0, 0, 0, 0, 32'(R));
    op(OP_VXOR, 1, 2, 3, 0, 0); c1 = acc_cyc;
    op(OP_VXOR, 4, 5, 6, 0, 0); c2 = acc_cyc;
    check("l=R issue interval", 32'(c2 - c1), 32'd1);
    op(OP_VSAMULT, 6, 4, 0, 0, 32'hDEAD_BEEF); c3 = acc_cyc;
    check("l=R PIVI-after-GIVI interval", 32'(c3 - c2), 32'd2);
    @(negedge clk);
    while (busy) @(negedge clk);
    check("l=R write-back latency", 32'(cyc - c3), 32'd4);
    extract(0, 0, r);                                       // CAR from element l-1
    op(OP_MTVL, 0, 0, 0, 0, 0);
  endtask

  // ---------------- carry chains ----------------
  // Carries and high words that must cross every element, hence every lane and,
  // when R < P, every iteration boundary; each result word extracted and checked.
  task automatic run_carry();
    logic [31:0] r;
    op(OP_VSMOVE, 1, 0, 0, 0, 32'hFFFF_FFFF);                // v1 = 2^256 - 1
    op(OP_VSMOVE, 2, 0, 0, 0, 32'h0);
    op(OP_VSMOVE, 2, 0, 0, 1, 32'h1);                        // v2 = 1
    op(OP_VADDU, 3, 1, 2, 0, 0);                             // ripples through all
    op(OP_VSAMULT, 4, 1, 0, 0, 32'hFFFF_FFFF);
    op(OP_VSPMULT, 5, 1, 0, 0, 32'h8000_0001);
    for (int k = 0; k < 6; k++) begin
      op(OP_VSMOVE, 6, 0, 0, 0, $urandom | 32'hF000_0000);
      op(OP_VADDU, 7, 6, 1, 0, 0);
      op(OP_VSAMULT, 6, 7, 0, 0, $urandom);
      for (int e = 1; e <= P; e++) begin extract(6, e, r); extract(7, e, r); end
      extract(0, 0, r);
    end
    for (int v = 3; v <= 5; v++)
      for (int e = 1; e <= P; e++) extract(v, e, r);
    extract(0, 0, r);
  endtask

  // ---------------- random streams ----------------
  task automatic run_random();
    vop_t ops [17] = '{OP_VADDU, OP_VBYTELD, OP_VLOAD, OP_VBCROTR, OP_VEXTRACT, OP_VTRANSP,
                       OP_VMPMUL, OP_VSADDU, OP_VSAMULT, OP_VSMOVE, OP_VSTORE, OP_VSPMULT,
                       OP_VXOR, OP_VWSHL, OP_VWSHR, OP_MTVCR, OP_MTVL};
    logic [31:0] r;
    vinstr_t in;
    for (int l = 0; l < R; l++)
      for (int a = 0; a < 16; a++) host_write(l, a, $urandom);
    for (int v = 0; v < Q; v++) op(OP_VSMOVE, v, 0, 0, 0, $urandom);
    for (int i = 0; i < NRAND; i++) begin
      in.op = ops[$urandom_range(0, 16)];
      in.vd = RNW'($urandom_range(0, 3));
      in.vj = RNW'($urandom_range(0, 3));
      in.vk = RNW'($urandom_range(0, 3));
      in.rs = $urandom;
      case (in.op)
        OP_VBCROTR:  in.n = NW'($urandom_range(0, 31));
        OP_VEXTRACT: in.n = NW'($urandom_range(0, P));
        OP_VTRANSP:  in.n = NW'($urandom_range(0, 1) * 4);
        OP_VWSHL, OP_VWSHR: in.n = NW'($urandom_range(0, P + 1));
        OP_VSMOVE:   in.n = NW'($urandom_range(0, P));
        default:     in.n = NW'($urandom_range(0, P - 1));
      endcase
      if (in.op inside {OP_VLOAD, OP_VSTORE}) in.rs = 32'($urandom_range(0, 6));
      if (in.op == OP_VBYTELD) in.rs = 32'(SBOX_BASE);
      if (in.op == OP_MTVL) in.rs = 32'($urandom_range(0, P + 1));
      if (in.op == OP_MTVCR && $urandom_range(0, 1) == 1) in.rs = {24'h0, 8'h1b} | ($urandom & 32'hFF00);
      issue(in, r);
    end
    op(OP_MTVL, 0, 0, 0, 0, 0);
    wait_idle();
    for (int v = 0; v < Q; v++)
      for (int e = 1; e <= P; e++) extract(v, e, r);
    extract(0, 0, r);
    op(OP_MFVCR, 0, 0, 0, 0, 0);
    for (int l = 0; l < R; l++)
      for (int a = 0; a < 8; a++) begin
        host_read(l, a, r);
        check("lane memory", r, {mmem[l][3][a], mmem[l][2][a], mmem[l][1][a], mmem[l][0][a]});
      end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    mcar = '0; mvcr = '0; mvl = P; n_short = 0;
    for (int v = 0; v < Q; v++) for (int e = 0; e < P; e++) mv[v][e] = '0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    // registers start unknown: give them defined contents first
    for (int v = 0; v < Q; v++) op(OP_VSMOVE, v, 0, 0, 0, 32'(v));
    run_timing();
    run_aes(1);
    run_aes(2);
    for (int k = 0; k < NMONT; k++) run_mont(k);
    run_carry();
    run_random();
    done = 1'b1;
  end
endmodule
