// tb_vemicry_cregs -- checks VCR and SBI writes, reset, and every CAR update rule
// against a model: VADDU accumulate (only when the vector length is P), VSAMULT,
// VSPMULT, VSADDU per-element bits and VWSHL. Uses R = 4 lanes, so VSADDU bits
// land in two groups.
module tb_vemicry_cregs;
  import vemicry_pkg::*;
  localparam int P = 8, R = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         vcr_we = 0, sbi_we = 0, perm_car_we = 0, cout_top = 0;
  logic [31:0]  vcr_wdata = '0, sbi_wdata = '0, perm_car = '0, hi_top = '0;
  vctrl_t       exc_c = '0;
  logic [R-1:0] lane_carry = '0, lane_en = '0;
  logic [31:0]  vcr, sbi, car, mcar;
  int checks = 0, failures = 0;

  vemicry_cregs #(.P(P), .R(R)) dut (.clk, .rst_n, .vcr_we, .vcr_wdata, .sbi_we, .sbi_wdata,
    .perm_car_we, .perm_car, .exc_c, .cout_top, .hi_top, .lane_carry, .lane_en,
    .vcr, .sbi, .car);

  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %08h vs %08h", w, got, exp); end
  endtask

  task automatic step();
    @(posedge clk);
    #1;
    vcr_we = 0; sbi_we = 0; perm_car_we = 0; exc_c = '0;
    chk("CAR", car, mcar);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    chk("reset vcr", vcr, 0); chk("reset car", car, 0); chk("reset sbi", sbi, 0);
    rst_n = 1'b1;
    mcar = 0;
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 6);
      exc_c = '0;
      exc_c.valid = 1'b1;
      exc_c.last  = 1'($urandom);
      exc_c.grp   = GW'($urandom_range(0, 1));
      exc_c.cnt   = ($urandom_range(0, 2) == 0) ? 7'($urandom_range(1, P - 1)) : 7'(P);
      cout_top    = 1'($urandom);
      hi_top      = $urandom;
      lane_carry  = R'($urandom);
      lane_en     = R'($urandom);
      case (k)
        0: begin exc_c.op = OP_VADDU;   if (exc_c.last && exc_c.cnt == 7'(P)) mcar = mcar + 32'(cout_top); end
        1: begin exc_c.op = OP_VSAMULT; if (exc_c.last) mcar = hi_top + 32'(cout_top); end
        2: begin exc_c.op = OP_VSPMULT; if (exc_c.last) mcar = hi_top; end
        3: begin
             exc_c.op = OP_VSADDU;
             for (int j = 0; j < R; j++) if (lane_en[j]) mcar[exc_c.grp*R + j] = lane_carry[j];
           end
        4: begin exc_c = '0; perm_car_we = 1; perm_car = $urandom; mcar = perm_car; end
        5: begin exc_c.op = OP_VXOR; vcr_we = 1; vcr_wdata = $urandom; end
        default: begin exc_c.valid = 1'b0; exc_c.op = OP_VADDU; exc_c.last = 1'b1;
                       sbi_we = 1; sbi_wdata = $urandom; end
      endcase
      if (k == 5) begin step(); chk("VCR", vcr, vcr_wdata); end
      else if (k == 6) begin step(); chk("SBI", sbi, sbi_wdata); end
      else step();
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
