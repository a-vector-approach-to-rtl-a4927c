// vemicry_lane_mem -- software-managed memory bank of one lane.
//
// Four byte arrays of DEPTH bytes each, side by side. Array b holds byte b of
// every word (b = 0 is the least significant byte), and each array has its own
// address, so a lane can read one 32-bit word (all four addresses equal, VLOAD)
// or four unrelated bytes (VBYTELD: four table look-ups) in the same cycle.
// One port: en, per-array address, per-array write enable and data. Reads are
// synchronous: rdata holds the bytes addressed in the previous enabled cycle;
// a write does not change rdata. The bank structure and the 1 KB array size
// follow the paper; the single port and the read timing are this design's.
module vemicry_lane_mem #(
  parameter int DEPTH = 1024,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                en,
  input  logic [3:0]          we,
  input  logic [3:0][AW-1:0]  addr,
  input  logic [3:0][7:0]     wdata,
  output logic [3:0][7:0]     rdata
);
  for (genvar b = 0; b < 4; b++) begin : g_arr
    logic [7:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (en) begin
        if (we[b]) mem[addr[b]] <= wdata[b];
        else       rdata[b]     <= mem[addr[b]];
      end
    end
  end
endmodule
