// tb_vemicry_vrf -- checks the vector register file with R = 4 lanes and P = 8
// (two element groups): group writes with per-lane enables, both group read
// ports, the whole-register port, and same-cycle write-through on all ports.
module tb_vemicry_vrf;
  import vemicry_pkg::*;
  localparam int Q = 8, P = 8, R = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]          rd_a_reg = '0, rd_b_reg = '0, rd_v_reg = '0, wr_reg = '0;
  logic [0:0]          rd_a_grp = '0, rd_b_grp = '0, wr_grp = '0;
  logic [R-1:0][31:0]  rd_a_data, rd_b_data, wr_data = '0;
  logic [P-1:0][31:0]  rd_v_data;
  logic [R-1:0]        wr_en = '0;
  logic                bypass;
  logic [31:0]         model [Q][P];
  int checks = 0, failures = 0;

  vemicry_vrf #(.Q(Q), .P(P), .R(R)) dut (.clk, .rd_a_reg, .rd_a_grp, .rd_a_data,
    .rd_b_reg, .rd_b_grp, .rd_b_data, .rd_v_reg, .rd_v_data, .wr_reg, .wr_grp, .wr_en,
    .wr_data, .bypass);

  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %08h vs %08h", w, got, exp); end
  endtask

  task automatic write_grp(int rg, int g, logic [R-1:0] en);
    @(negedge clk);
    wr_reg = 3'(rg); wr_grp = 1'(g); wr_en = en;
    for (int j = 0; j < R; j++) begin
      wr_data[j] = $urandom;
      if (en[j]) model[rg][g*R + j] = wr_data[j];
    end
    // write-through: read the same group in the same cycle
    rd_a_reg = 3'(rg); rd_a_grp = 1'(g); rd_v_reg = 3'(rg);
    #1;
    for (int j = 0; j < R; j++) chk("write-through a", rd_a_data[j], model[rg][g*R + j]);
    for (int j = 0; j < R; j++) chk("write-through v", rd_v_data[g*R + j], model[rg][g*R + j]);
    if (en != 0) chk("bypass flag", {31'b0, bypass}, 32'd1);
    @(negedge clk);
    wr_en = '0;
  endtask

  initial begin
    for (int rg = 0; rg < Q; rg++)
      for (int g = 0; g < P / R; g++) write_grp(rg, g, '1);
    for (int i = 0; i < 100; i++)
      write_grp($urandom_range(0, Q-1), $urandom_range(0, 1), R'($urandom));
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rd_a_reg = 3'($urandom); rd_a_grp = 1'($urandom);
      rd_b_reg = 3'($urandom); rd_b_grp = 1'($urandom);
      rd_v_reg = 3'($urandom);
      #1;
      for (int j = 0; j < R; j++) begin
        chk("port a", rd_a_data[j], model[rd_a_reg][rd_a_grp*R + j]);
        chk("port b", rd_b_data[j], model[rd_b_reg][rd_b_grp*R + j]);
      end
      for (int e = 0; e < P; e++) chk("port v", rd_v_data[e], model[rd_v_reg][e]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
