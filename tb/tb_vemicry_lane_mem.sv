// tb_vemicry_lane_mem -- checks the lane memory bank: word writes with byte
// enables, synchronous word reads, and four independent byte reads in one cycle
// (each byte array at its own address), against a byte-array model.
module tb_vemicry_lane_mem;
  localparam int DEPTH = 1024;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic              en = 1'b0;
  logic [3:0]        we = '0;
  logic [3:0][9:0]   addr = '0;
  logic [3:0][7:0]   wdata = '0, rdata;
  logic [7:0]        model [4][DEPTH];
  int checks = 0, failures = 0;

  vemicry_lane_mem #(.DEPTH(DEPTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  task automatic cyc_write(int row, logic [31:0] d, logic [3:0] be);
    @(negedge clk);
    en = 1'b1; we = be; addr = {4{10'(row)}}; wdata = d;
    for (int b = 0; b < 4; b++) if (be[b]) model[b][row] = d[8*b +: 8];
    @(negedge clk);
    en = 1'b0; we = '0;
  endtask

  task automatic cyc_read(logic [3:0][9:0] ad);
    @(negedge clk);
    en = 1'b1; we = '0; addr = ad;
    @(negedge clk);
    en = 1'b0;
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (rdata[b] !== model[b][ad[b]]) begin
        failures++;
        $display("FAIL array %0d addr %0d: %02h vs %02h", b, ad[b], rdata[b], model[b][ad[b]]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 64; r++) cyc_write(r, $urandom, 4'hF);
    for (int r = 0; r < 64; r++) cyc_write(r, $urandom, 4'($urandom));
    cyc_write(DEPTH - 1, 32'hA5C3_0F1E, 4'hF);
    for (int r = 0; r < 64; r++) cyc_read({4{10'(r)}});
    cyc_read({4{10'(DEPTH - 1)}});
    for (int i = 0; i < 200; i++)
      cyc_read({10'($urandom_range(0, 63)), 10'($urandom_range(0, 63)),
                10'($urandom_range(0, 63)), 10'($urandom_range(0, 63))});
    // read data holds while the bank is not enabled
    begin
      logic [31:0] held;
      held = rdata;
      repeat (3) @(negedge clk);
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL rdata changed while idle"); end
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
