// vemicry_cregs -- the co-processor's scalar registers VCR, SBI and CAR.
//
// VCR (vector condition register): written by MTVCR when it issues. Bit i
//   enables element i for VBCROTR; its low 8 bits are the reduction polynomial
//   of VMPMUL. Held as 32 bits so that both uses fit.
// SBI (scalar buffer interface): takes the scalar operand of an instruction when
//   its first iteration enters DF.
// CAR (carry register), updated from the EXC stage of the iteration that
//   produces it, or from the permute unit for VWSHL:
//   VADDU   last iteration: CAR <- CAR + carry out of the top element, only
//           when the vector length l equals P (otherwise CAR is kept)
//   VSAMULT last iteration: CAR <- high product word of the top element + carry
//   VSPMULT last iteration: CAR <- high product word of the top element
//   VSADDU  every iteration: CAR bit e <- carry of element e (other bits kept)
//   VWSHL   CAR <- word shifted out
// All registers reset to 0 (synchronous, active-low). The three registers and
// their uses follow the paper; widths, reset and update timing are this
// design's choices.
module vemicry_cregs
  import vemicry_pkg::*;
#(
  parameter int P = 8,
  parameter int R = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               vcr_we,
  input  logic [W-1:0]       vcr_wdata,
  input  logic               sbi_we,
  input  logic [W-1:0]       sbi_wdata,
  input  logic               perm_car_we,
  input  logic [W-1:0]       perm_car,
  input  vctrl_t             exc_c,       // iteration in EXC
  input  logic               cout_top,    // carry out of element l-1's lane
  input  logic [W-1:0]       hi_top,      // high product word of element l-1's lane
  input  logic [R-1:0]       lane_carry,  // per-lane carry of VSADDU
  input  logic [R-1:0]       lane_en,     // lanes whose element is in range
  output logic [W-1:0]       vcr,
  output logic [W-1:0]       sbi,
  output logic [W-1:0]       car
);
  logic [W-1:0] car_nxt;

  always_comb begin
    car_nxt = car;
    if (perm_car_we) car_nxt = perm_car;
    if (exc_c.valid) begin
      case (exc_c.op)
        OP_VADDU:   if (exc_c.last && int'(exc_c.cnt) == P) car_nxt = car + {{(W-1){1'b0}}, cout_top};
        OP_VSAMULT: if (exc_c.last) car_nxt = hi_top + {{(W-1){1'b0}}, cout_top};
        OP_VSPMULT: if (exc_c.last) car_nxt = hi_top;
        OP_VSADDU:
          for (int j = 0; j < R; j++)
            if (lane_en[j] && int'(exc_c.grp) * R + j < W)
              car_nxt[int'(exc_c.grp) * R + j] = lane_carry[j];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vcr <= '0;
      sbi <= '0;
      car <= '0;
    end else begin
      if (vcr_we) vcr <= vcr_wdata;
      if (sbi_we) sbi <= sbi_wdata;
      car <= car_nxt;
    end
  end
endmodule
