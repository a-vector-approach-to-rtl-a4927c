// tb_vemicry -- end-to-end test of the vemicry co-processor.
//
// Runs the same program (timing checks, two-block AES-128, three GF(2^191)
// Montgomery multiplications, a random instruction stream checked against an
// instruction-level model) on two machines at once: the default machine
// (q = p = r = 8, one iteration per instruction) and one with r = 4 lanes (two
// iterations per instruction, one when the vector length l <= r). Also checks that
// every pipeline mechanism was exercised: hazard stall, drain wait, forwarding
// into EXM and into EXC, write-through in DF, multi-iteration issue, short
// vectors (l < p), host memory access.
module tb_vemicry;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int   ck [2], fl [2], st [2], dr [2], fm [2], fc [2], bp [2], mi [2], hs [2], sv [2];
  logic dn [2];
  int   checks = 0, failures = 0;

  vemicry_tb_runner #(.R(8)) u_r8 (.clk, .rst_n, .checks(ck[0]), .failures(fl[0]),
    .n_stall(st[0]), .n_drain(dr[0]), .n_fwd_exm(fm[0]), .n_fwd_exc(fc[0]),
    .n_bypass(bp[0]), .n_multi(mi[0]), .n_host(hs[0]), .n_short(sv[0]), .done(dn[0]));
  vemicry_tb_runner #(.R(4)) u_r4 (.clk, .rst_n, .checks(ck[1]), .failures(fl[1]),
    .n_stall(st[1]), .n_drain(dr[1]), .n_fwd_exm(fm[1]), .n_fwd_exc(fc[1]),
    .n_bypass(bp[1]), .n_multi(mi[1]), .n_host(hs[1]), .n_short(sv[1]), .done(dn[1]));

  task automatic need(string what, int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (dn[0] && dn[1]);
    checks   += ck[0] + ck[1];
    failures += fl[0] + fl[1];
    $display("mechanism counts (r=8 / r=4):");
    need("hazard stall, r=8", st[0]);
    need("hazard stall (l <= r), r=4", st[1]);
    need("drain wait, r=8", dr[0]);
    need("drain wait, r=4", dr[1]);
    need("forward WB->EXM, r=8", fm[0]);
    need("forward WB->EXM, r=4", fm[1]);
    need("forward WB->EXC, r=8", fc[0]);
    need("write-through in DF, r=8", bp[0]);
    need("multi-iteration, r=4", mi[1]);
    need("short vector l < p, r=8", sv[0]);
    need("short vector l < p, r=4", sv[1]);
    need("host memory access", hs[0] + hs[1]);
    checks++;
    if (mi[0] != 0) begin
      failures++;
      $display("FAIL r=8 machine ran more than one iteration per instruction");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
