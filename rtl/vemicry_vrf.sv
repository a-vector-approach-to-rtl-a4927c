// vemicry_vrf -- vector register file.
//
// Q vector registers of P 32-bit elements. The elements are organised in lanes:
// lane j owns elements j, j+R, j+2R, ... of every register, and one iteration of
// an instruction works on a group of R elements, group g being elements g*R to
// g*R+R-1. Two group read ports (operands a and b of all lanes), one whole-register
// read port (permute unit and VEXTRACT) and one group write port with a write
// enable per lane. Reads are combinational and write-through: a read of the group
// being written in the same cycle returns the new value, so the WB stage of one
// instruction feeds the DF stage of another in the same cycle. Writes take effect
// at the clock edge. Lane organisation after the paper's register-file figure;
// the port set and the write-through are this design's choices. No reset: software
// initialises the registers it reads.
module vemicry_vrf
  import vemicry_pkg::*;
#(
  parameter int Q  = 8,
  parameter int P  = 8,
  parameter int R  = 8,
  parameter int QW = $clog2(Q),
  parameter int G  = P / R,
  parameter int GB = (G > 1) ? $clog2(G) : 1
) (
  input  logic                 clk,
  input  logic [QW-1:0]        rd_a_reg,
  input  logic [GB-1:0]        rd_a_grp,
  output logic [R-1:0][W-1:0]  rd_a_data,
  input  logic [QW-1:0]        rd_b_reg,
  input  logic [GB-1:0]        rd_b_grp,
  output logic [R-1:0][W-1:0]  rd_b_data,
  input  logic [QW-1:0]        rd_v_reg,
  output logic [P-1:0][W-1:0]  rd_v_data,
  input  logic [QW-1:0]        wr_reg,
  input  logic [GB-1:0]        wr_grp,
  input  logic [R-1:0]         wr_en,
  input  logic [R-1:0][W-1:0]  wr_data,
  output logic                 bypass     // a read port returned write-back data
);
  logic [P-1:0][W-1:0] regs [Q];

  always_ff @(posedge clk) begin
    for (int j = 0; j < R; j++)
      if (wr_en[j]) regs[wr_reg][int'(wr_grp) * R + j] <= wr_data[j];
  end

  always_comb begin
    bypass = 1'b0;
    for (int j = 0; j < R; j++) begin
      rd_a_data[j] = regs[rd_a_reg][int'(rd_a_grp) * R + j];
      rd_b_data[j] = regs[rd_b_reg][int'(rd_b_grp) * R + j];
      if (wr_en[j] && wr_reg == rd_a_reg && wr_grp == rd_a_grp) begin
        rd_a_data[j] = wr_data[j];
        bypass = 1'b1;
      end
      if (wr_en[j] && wr_reg == rd_b_reg && wr_grp == rd_b_grp) begin
        rd_b_data[j] = wr_data[j];
        bypass = 1'b1;
      end
    end
    for (int e = 0; e < P; e++) begin
      rd_v_data[e] = regs[rd_v_reg][e];
      if (wr_reg == rd_v_reg && int'(wr_grp) == e / R && wr_en[e % R])
        rd_v_data[e] = wr_data[e % R];
    end
  end
endmodule
