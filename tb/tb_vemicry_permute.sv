// tb_vemicry_permute -- checks the whole-register rearrangements: a 4x4 byte
// transposition known by hand, transposition twice gives the input back, word
// shifts left/right for every n with the CAR word in and out.
module tb_vemicry_permute;
  import vemicry_pkg::*;
  localparam int P = 8;
  vop_t                op;
  logic [15:0]         n;
  logic [P-1:0][31:0]  src, dst;
  logic [31:0]         car, car_out;
  logic                car_we;
  int checks = 0, failures = 0;

  vemicry_permute #(.P(P)) dut (.op, .n, .src, .car, .dst, .car_we, .car_out);

  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %08h vs %08h", w, got, exp); end
  endtask

  initial begin
    logic [P-1:0][31:0] t;
    // columns (a0 b0 c0 d0) ... become rows
    src = '0;
    src[0] = 32'h00010203; src[1] = 32'h10111213; src[2] = 32'h20212223; src[3] = 32'h30313233;
    src[4] = 32'h40414243; src[5] = 32'h50515253; src[6] = 32'h60616263; src[7] = 32'h70717273;
    car = 32'hCAFE0001;
    op = OP_VTRANSP; n = 16'd4;
    #1;
    chk("transp w0", dst[0], 32'h00102030);
    chk("transp w1", dst[1], 32'h01112131);
    chk("transp w3", dst[3], 32'h03132333);
    chk("transp w4", dst[4], 32'h40506070);
    chk("transp w7", dst[7], 32'h43536373);
    n = 16'd0;
    #1;
    for (int e = 0; e < P; e++) chk("copy", dst[e], src[e]);
    for (int i = 0; i < 50; i++) begin
      for (int e = 0; e < P; e++) src[e] = $urandom;
      op = OP_VTRANSP; n = 16'd4;
      #1;
      t = src; src = dst;
      #1;
      for (int e = 0; e < P; e++) chk("transp twice", dst[e], t[e]);
      src = t;
      car = $urandom;
      for (int k = 0; k <= P + 1; k++) begin
        op = OP_VWSHL; n = 16'(k);
        #1;
        for (int e = 0; e < P; e++) chk("shl", dst[e], (e >= k) ? src[e - k] : 32'h0);
        chk("shl car_we", {31'b0, car_we}, (k != 0) ? 32'd1 : 32'd0);
        if (k != 0) chk("shl car", car_out, (k <= P) ? src[P - k] : 32'h0);
        op = OP_VWSHR;
        #1;
        for (int e = 0; e < P; e++)
          chk("shr", dst[e], (k == 0) ? src[e] : (e + k < P) ? src[e + k] : (e + k == P) ? car : 32'h0);
        chk("shr car_we", {31'b0, car_we}, 32'd0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
