// tb_vemicry_vpu -- checks one vector processing unit with its memory bank.
//
// The testbench plays the rest of the machine for a single lane: it sequences
// the stage control (DF -> EXM -> EXC -> WB), keeps a register file fed by the
// lane's write-back (with write-through into DF) and closes the carry and
// high-word chains from one iteration to the next through registers. With
// P = 4 elements every instruction takes four iterations through the one lane,
// which tests the multi-word chains of VADDU, VSAMULT and VSPMULT; with P = 1
// instructions issue back to back, which tests forwarding from WB into EXC (no
// bubble) and into EXM (one bubble). Results are compared with a model.
module tb_vemicry_vpu;
  import vemicry_pkg::*;
  localparam int Q = 4, PM = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nfwd_m = 0, nfwd_c = 0;

  vctrl_t       df = '0, exm_c = '0, exc_c = '0, wb_c = '0;
  logic [31:0]  df_a, df_b, hi_out, hi_exc, wb_data, hi_reg = '0;
  logic         cout, sadd_carry, en_exc, wb_we, fwd_m, fwd_c, carry_reg = 1'b0;
  logic         mem_en;
  logic [3:0]   mem_we;
  logic [3:0][9:0] mem_addr;
  logic [3:0][7:0] mem_wdata, mem_rdata;
  logic [31:0]  rf [Q][PM];
  logic [31:0]  ref_rf [Q][PM];
  logic [7:0]   ref_mem [4][1024];
  int           P = PM;

  vemicry_vpu #(.R(1), .LANE(0), .MEM_AW(10)) dut (.clk, .exm_c, .exc_c, .wb_c, .df_a, .df_b,
    .hi_in(exm_c.first ? 32'h0 : hi_reg), .hi_out, .hi_exc,
    .cin(exc_c.first ? 1'b0 : carry_reg), .cout, .sadd_carry, .en_exc,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .wb_we, .wb_data, .fwd_m, .fwd_c);

  logic        tb_mem_en = 0;
  logic [3:0]  tb_mem_we = '0;
  logic [9:0]  tb_mem_addr = '0;
  logic [31:0] tb_mem_wdata = '0;
  vemicry_lane_mem #(.DEPTH(1024)) u_mem (.clk, .en(mem_en | tb_mem_en),
    .we(tb_mem_en ? tb_mem_we : mem_we), .addr(tb_mem_en ? {4{tb_mem_addr}} : mem_addr),
    .wdata(tb_mem_en ? tb_mem_wdata : mem_wdata), .rdata(mem_rdata));

  always_comb begin
    df_a = rf[df.va][df.grp];
    df_b = rf[df.vb][df.grp];
    if (wb_c.valid && wb_we && wb_c.vd == df.va && wb_c.grp == df.grp) df_a = wb_data;
    if (wb_c.valid && wb_we && wb_c.vd == df.vb && wb_c.grp == df.grp) df_b = wb_data;
  end

  always @(posedge clk) begin
    exm_c <= df; exc_c <= exm_c; wb_c <= exc_c;
    hi_reg <= hi_out; carry_reg <= cout;
    if (wb_c.valid && wb_we) rf[wb_c.vd][wb_c.grp] <= wb_data;
    nfwd_m <= nfwd_m + int'(fwd_m);
    nfwd_c <= nfwd_c + int'(fwd_c);
  end

  function automatic void model(vop_t op, int vd, int va, int vb, logic [31:0] s,
                                logic [31:0] vcr, int n, int cnt);
    logic [31:0] o [PM];
    logic [63:0] pr;
    logic [32:0] t;
    logic [31:0] hi;
    logic        c;
    hi = '0; c = 1'b0;
    for (int e = 0; e < P; e++) o[e] = ref_rf[vd][e];
    for (int e = 0; e < P; e++) begin
      logic [31:0] a, b;
      a = ref_rf[va][e]; b = ref_rf[vb][e];
      case (op)
        OP_VXOR:    o[e] = a ^ b;
        OP_VBCROTR: o[e] = vcr[e] ? ((a >> n) | (a << (32 - n))) : a;
        OP_VMPMUL:  for (int k = 0; k < 4; k++)
                      o[e][8*k +: 8] = {a[8*k +: 7], 1'b0} ^ (a[8*k+7] ? vcr[7:0] : 8'h0);
        OP_VSADDU:  o[e] = a + s;
        OP_VSMOVE:  if (e < cnt) o[e] = s;
        OP_VADDU:   begin t = {1'b0, a} + {1'b0, b} + {32'b0, c}; o[e] = t[31:0]; c = t[32]; end
        OP_VSAMULT: begin
                      pr = {32'b0, a} * {32'b0, s};
                      t = {1'b0, pr[31:0]} + {1'b0, hi} + {32'b0, c};
                      o[e] = t[31:0]; c = t[32]; hi = pr[63:32];
                    end
        OP_VSPMULT: begin
                      pr = '0;
                      for (int i = 0; i < 32; i++) if (s[i]) pr ^= {32'b0, a} << i;
                      o[e] = pr[31:0] ^ hi; hi = pr[63:32];
                    end
        OP_VLOAD:   if (e < cnt) for (int k = 0; k < 4; k++) o[e][8*k +: 8] = ref_mem[k][(s + e) % 1024];
        OP_VBYTELD: if (e < cnt) for (int k = 0; k < 4; k++)
                      o[e][8*k +: 8] = ref_mem[k][(s + {24'b0, ref_rf[vd][e][8*k +: 8]}) % 1024];
        OP_VSTORE:  if (e < cnt) for (int k = 0; k < 4; k++) ref_mem[k][(s + e) % 1024] = a[8*k +: 8];
        default: ;
      endcase
    end
    if (op != OP_VSTORE) for (int e = 0; e < P; e++) ref_rf[vd][e] = o[e];
  endfunction

  // one instruction, P iterations; bubble = idle cycles before it
  task automatic run(vop_t op, int vd, int va, int vb, logic [31:0] s, logic [31:0] vcr,
                     int n, int cnt, int bubble);
    repeat (bubble) begin @(negedge clk); df = '0; end
    if (op == OP_VBYTELD) va = vd;   // VBYTELD reads the offsets from its destination
    if (!(op inside {OP_VSMOVE, OP_VLOAD, OP_VBYTELD, OP_VSTORE})) cnt = P;
    model(op, vd, va, vb, s, vcr, n, cnt);
    for (int g = 0; g < P; g++) begin
      @(negedge clk);
      df = '0;
      df.valid = 1'b1; df.op = op; df.vd = RNW'(vd); df.va = RNW'(va); df.vb = RNW'(vb);
      df.use_a = !(op inside {OP_VLOAD, OP_VSMOVE});
      df.use_b = op inside {OP_VXOR, OP_VADDU};
      df.wr = op != OP_VSTORE; df.grp = GW'(g); df.first = g == 0; df.last = g == P - 1;
      df.n = NW'(n); df.sbi = s; df.vcr = vcr; df.cnt = 7'(cnt);
    end
  endtask

  task automatic drain();
    repeat (5) begin @(negedge clk); df = '0; end
  endtask

  task automatic compare(string w);
    for (int v = 0; v < Q; v++)
      for (int e = 0; e < P; e++) begin
        checks++;
        if (rf[v][e] !== ref_rf[v][e]) begin
          failures++;
          $display("FAIL %s v%0d[%0d]: %08h vs %08h", w, v, e, rf[v][e], ref_rf[v][e]);
        end
      end
  endtask

  vop_t opl [11] = '{OP_VXOR, OP_VBCROTR, OP_VMPMUL, OP_VSADDU, OP_VSMOVE, OP_VADDU,
                     OP_VSAMULT, OP_VSPMULT, OP_VLOAD, OP_VBYTELD, OP_VSTORE};

  initial begin
    // memory contents
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      tb_mem_en = 1; tb_mem_we = 4'hF; tb_mem_addr = 10'(a); tb_mem_wdata = $urandom;
      for (int k = 0; k < 4; k++) ref_mem[k][a] = tb_mem_wdata[8*k +: 8];
    end
    @(negedge clk);
    tb_mem_en = 0;
    for (int v = 0; v < Q; v++)
      for (int e = 0; e < PM; e++) begin rf[v][e] = $urandom; ref_rf[v][e] = rf[v][e]; end
    // phase A: four iterations per instruction
    P = 4;
    for (int i = 0; i < 300; i++) begin
      vop_t op;
      op = opl[$urandom_range(0, 10)];
      run(op, $urandom_range(0, Q-1), $urandom_range(0, Q-1), $urandom_range(0, Q-1),
          (op inside {OP_VLOAD, OP_VBYTELD, OP_VSTORE}) ? 32'($urandom_range(0, 900)) : $urandom,
          (op == OP_VMPMUL) ? 32'h11B : $urandom, $urandom_range(0, 31),
          $urandom_range(1, 4), 0);
      if (i % 10 == 9) begin drain(); compare("4 iterations"); end
    end
    drain();
    compare("4 iterations");
    // phase B: one iteration, back to back; EXM consumers get one bubble
    P = 1;
    for (int i = 0; i < 400; i++) begin
      vop_t op;
      op = opl[$urandom_range(0, 10)];
      run(op, $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1),
          (op inside {OP_VLOAD, OP_VBYTELD, OP_VSTORE}) ? 32'($urandom_range(0, 900)) : $urandom,
          (op == OP_VMPMUL) ? 32'h11B : $urandom, $urandom_range(0, 31), 1,
          needs_at_exm(op) ? 1 : 0);
      if (i % 10 == 9) begin drain(); compare("back to back"); end
    end
    drain();
    compare("back to back");
    checks++;
    if (nfwd_m == 0 || nfwd_c == 0) begin
      failures++;
      $display("FAIL forwarding not exercised: exm %0d exc %0d", nfwd_m, nfwd_c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
