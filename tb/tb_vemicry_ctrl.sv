// tb_vemicry_ctrl -- checks the issue controller on two configurations:
// P/R = 1 (default) and P/R = 2. Checks the issue interval, the group numbers and
// first/last flags of the iterations, stage propagation, the one-cycle stall for
// an EXM consumer right after its producer (P/R = 1 only), no stall for an EXC
// consumer, the drain wait of whole-vector instructions and VEXTRACT, MTVCR /
// MFVCR and VEXTRACT results, and the vector length: MTVL, the element count
// and the single iteration of a short vector, its hazard stall at P/R = 2,
// memory instructions unaffected, out-of-range lengths selecting P.
module tb_vemicry_ctrl;
  import vemicry_pkg::*;
  localparam int P = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(string w, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", w, got, exp); end
  endtask

  // two controllers, one per configuration, driven by the same stimulus
  logic               iss_valid = 0;
  vinstr_t            iss_instr = '0;
  logic [1:0]         ready, vcr_we, sbi_we, perm_load, res_valid, busy, hz, dw, mi;
  logic [1:0][31:0]   res_data;
  logic [1:0][6:0]    vl;
  logic [31:0]        irs = 32'h55;
  vctrl_t             df_c [2], exm_c [2], exc_c [2], wb_c [2];
  logic [31:0]        vcr = 32'h1234_5678, car = 32'hCAFE_0000;
  logic [P-1:0][31:0] rd_v;

  vemicry_ctrl #(.P(P), .R(8)) u_g1 (.clk, .rst_n, .iss_valid, .iss_instr, .iss_ready(ready[0]),
    .vcr, .car, .rd_v_data(rd_v), .df_c(df_c[0]), .exm_c(exm_c[0]), .exc_c(exc_c[0]),
    .wb_c(wb_c[0]), .vcr_we(vcr_we[0]), .sbi_we(sbi_we[0]), .perm_load(perm_load[0]),
    .res_valid(res_valid[0]), .res_data(res_data[0]), .busy(busy[0]), .vl(vl[0]),
    .ev_hazard_stall(hz[0]), .ev_drain_wait(dw[0]), .ev_multi_iter(mi[0]));
  vemicry_ctrl #(.P(P), .R(4)) u_g2 (.clk, .rst_n, .iss_valid, .iss_instr, .iss_ready(ready[1]),
    .vcr, .car, .rd_v_data(rd_v), .df_c(df_c[1]), .exm_c(exm_c[1]), .exc_c(exc_c[1]),
    .wb_c(wb_c[1]), .vcr_we(vcr_we[1]), .sbi_we(sbi_we[1]), .perm_load(perm_load[1]),
    .res_valid(res_valid[1]), .res_data(res_data[1]), .busy(busy[1]), .vl(vl[1]),
    .ev_hazard_stall(hz[1]), .ev_drain_wait(dw[1]), .ev_multi_iter(mi[1]));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Issue to configuration k only (the other sees iss_valid low is not possible
  // with shared stimulus, so each test runs on one configuration at a time).
  int sel = 0;
  task automatic issue(vop_t op, int vd, int vj, int vk, int n, output int acc);
    @(negedge clk);
    iss_valid = 1; iss_instr = '{op: op, vd: RNW'(vd), vj: RNW'(vj), vk: RNW'(vk), n: NW'(n), rs: irs};
    #1;
    while (!ready[sel]) begin @(negedge clk); #1; end
    acc = cyc;
    @(posedge clk);
    #1;
    iss_valid = 0;
  endtask

  task automatic idle();
    @(negedge clk);
    while (busy[0] || busy[1]) @(negedge clk);
  endtask

  initial begin
    int a0, a1, a2, nstall;
    for (int e = 0; e < P; e++) rd_v[e] = 32'(100 + e);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- configuration P/R = 1 ----
    sel = 0;
    issue(OP_VXOR, 1, 2, 3, 0, a0);
    chk("df after issue: exm valid", int'(exm_c[0].valid), 1);
    issue(OP_VXOR, 4, 2, 3, 0, a1);
    chk("G=1 interval", a1 - a0, 1);
    issue(OP_VADDU, 5, 4, 3, 0, a2);               // needs v4 in EXM: one stall
    chk("G=1 PIVI hazard interval", a2 - a1, 2);
    issue(OP_VXOR, 6, 5, 5, 0, a0);                // GIVI after PIVI: no stall
    chk("G=1 GIVI after PIVI", a0 - a2, 1);
    issue(OP_VSTORE, 0, 6, 0, 7, a1);              // store data needed in EXM: stall
    chk("G=1 VSTORE hazard", a1 - a0, 2);
    issue(OP_VBYTELD, 2, 0, 0, 7, a0);             // independent
    chk("G=1 VBYTELD no hazard", a0 - a1, 1);
    issue(OP_VTRANSP, 3, 2, 0, 4, a1);             // drain: EXM and EXC empty
    chk("G=1 whole-vector drain", a1 - a0, 3);
    issue(OP_VEXTRACT, 0, 3, 0, 3, a0);
    chk("G=1 VEXTRACT drain", a0 - a1, 3);
    @(negedge clk);
    chk("VEXTRACT result", int'(res_data[0]), 102);
    issue(OP_VEXTRACT, 0, 3, 0, 0, a0);
    @(negedge clk);
    chk("VEXTRACT CAR", int'(res_data[0] == car), 1);
    issue(OP_MFVCR, 0, 0, 0, 0, a0);
    @(negedge clk);
    chk("MFVCR", int'(res_data[0] == vcr), 1);
    issue(OP_MTVCR, 0, 0, 0, 0, a0);
    chk("MTVCR no pipeline", int'(exm_c[0].valid), 0);
    idle();
    // stage propagation and control contents
    @(negedge clk);
    iss_valid = 1; iss_instr = '{op: OP_VSMOVE, vd: 3, vj: 0, vk: 0, n: 2, rs: 32'hABCD};
    #1;
    chk("VSMOVE count", int'(df_c[0].cnt), 2);
    chk("VSMOVE sbi", int'(df_c[0].sbi == 32'hABCD), 1);
    chk("VSMOVE vcr", int'(df_c[0].vcr == vcr), 1);
    chk("first/last", int'(df_c[0].first && df_c[0].last), 1);
    @(negedge clk);
    iss_valid = 0;
    chk("exm", int'(exm_c[0].valid && exm_c[0].op == OP_VSMOVE), 1);
    @(negedge clk);
    chk("exc", int'(exc_c[0].valid && exc_c[0].vd == 3), 1);
    @(negedge clk);
    chk("wb", int'(wb_c[0].valid && wb_c[0].op == OP_VSMOVE), 1);
    @(negedge clk);
    chk("pipeline empty", int'(busy[0]), 0);
    idle();
    // ---- configuration P/R = 2 ----
    sel = 1;
    nstall = 0;
    issue(OP_VXOR, 1, 2, 3, 0, a0);
    chk("G=2 second iteration grp", int'(df_c[1].grp), 1);
    chk("G=2 second iteration last", int'(df_c[1].last && !df_c[1].first), 1);
    issue(OP_VADDU, 4, 1, 3, 0, a1);
    chk("G=2 interval with dependency", a1 - a0, 2);
    issue(OP_VSPMULT, 5, 4, 0, 0, a2);
    chk("G=2 interval PIVI after PIVI", a2 - a1, 2);
    idle();
    // ---- vector length ----
    chk("vl after reset", int'(vl[1]), P);
    irs = 3;
    issue(OP_MTVL, 0, 0, 0, 0, a0);
    chk("MTVL no pipeline", int'(exm_c[1].valid), 0);
    @(negedge clk);
    chk("vl set", int'(vl[1]), 3);
    chk("vl set (G=1)", int'(vl[0]), 3);
    issue(OP_VXOR, 1, 2, 3, 0, a0);
    chk("short vector count", int'(exm_c[1].cnt), 3);
    chk("short vector one iteration", int'(exm_c[1].first && exm_c[1].last), 1);
    issue(OP_VXOR, 4, 2, 3, 0, a1);
    chk("short vector interval", a1 - a0, 1);
    issue(OP_VADDU, 5, 4, 3, 0, a2);
    chk("short vector PIVI hazard", a2 - a1, 2);
    issue(OP_VLOAD, 6, 0, 0, 7, a0);
    chk("VLOAD keeps P/R iterations", int'(exm_c[1].last), 0);
    chk("VLOAD count", int'(exm_c[1].cnt), 8);
    issue(OP_VSMOVE, 6, 0, 0, 5, a0);
    chk("VSMOVE n > l", int'(exm_c[1].cnt), 3);
    issue(OP_VSMOVE, 6, 0, 0, 2, a0);
    chk("VSMOVE n < l", int'(exm_c[1].cnt), 2);
    irs = 5;
    issue(OP_MTVL, 0, 0, 0, 0, a0);
    issue(OP_VSPMULT, 6, 1, 0, 0, a0);
    chk("l=5 count", int'(exm_c[1].cnt), 5);
    chk("l=5 first iteration", int'(exm_c[1].last), 0);
    issue(OP_VXOR, 6, 1, 1, 0, a1);
    chk("l=5 two iterations", a1 - a0, 2);
    irs = 9;
    issue(OP_MTVL, 0, 0, 0, 0, a0);
    @(negedge clk);
    chk("l above P selects P", int'(vl[1]), P);
    irs = 0;
    issue(OP_MTVL, 0, 0, 0, 0, a0);
    @(negedge clk);
    chk("l = 0 selects P", int'(vl[1]), P);
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
