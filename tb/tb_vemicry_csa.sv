// tb_vemicry_csa -- random and corner-case check of the carry select adder:
// both sums and both carries against 33-bit reference additions.
module tb_vemicry_csa;
  logic [31:0] a, b, s0, s1;
  logic        c0, c1;
  int checks = 0, failures = 0;

  vemicry_csa #(.W(32)) dut (.a, .b, .s0, .c0, .s1, .c1);

  task automatic one(logic [31:0] x, logic [31:0] y);
    logic [32:0] r0, r1;
    a = x; b = y;
    #1;
    r0 = {1'b0, x} + {1'b0, y};
    r1 = {1'b0, x} + {1'b0, y} + 33'd1;
    checks += 2;
    if ({c0, s0} !== r0) begin failures++; $display("FAIL cin=0 %08h+%08h", x, y); end
    if ({c1, s1} !== r1) begin failures++; $display("FAIL cin=1 %08h+%08h", x, y); end
  endtask

  initial begin
    one(32'h0, 32'h0);
    one(32'hFFFFFFFF, 32'h0);
    one(32'hFFFFFFFF, 32'h1);
    one(32'hFFFFFFFF, 32'hFFFFFFFF);
    one(32'h80000000, 32'h80000000);
    for (int i = 0; i < 2000; i++) one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
