// vemicry_pkg -- types and helpers shared by the VeMICry vector co-processor.
//
// Holds the vector opcodes (the instruction list of the vector extension), the
// decoded-instruction struct the scalar core hands over, the per-stage pipeline
// control struct, the event flags and the instruction classification:
//   GIVI  genuinely independent: each element on its own, operands used in EXC
//   PIVI  partially independent: carry or high word from the neighbour element,
//         operands used in EXM (VADDU, VSPMULT, VSAMULT)
//   MAVI  memory accessing (VLOAD, VSTORE, VBYTELD); memory address in EXM
//   WHOLE whole-register rearrangement (VTRANSP, VWSHL, VWSHR), computed at once
//         by the permute unit after the pipeline has drained
//   SCAL  no lane work (MTVCR, MFVCR, VEXTRACT, MTVL)
// The GIVI/PIVI/MAVI split and the stage names follow the paper; the WHOLE and
// SCAL classes, the field layout and the widths are this design's own choices.
package vemicry_pkg;

  localparam int W     = 32;   // element width m
  localparam int NW    = 16;   // immediate n
  localparam int QMAX  = 16;   // register-number field covers up to 16 registers
  localparam int RNW   = $clog2(QMAX);
  localparam int PMAX  = 32;   // VCR and CAR bit fields hold up to 32 elements
  localparam int GW    = 5;    // element-group (iteration) number field

  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,
    OP_VADDU   = 5'd1,
    OP_VBYTELD = 5'd2,
    OP_VLOAD   = 5'd3,
    OP_VBCROTR = 5'd4,
    OP_VEXTRACT= 5'd5,
    OP_VTRANSP = 5'd6,
    OP_VMPMUL  = 5'd7,
    OP_VSADDU  = 5'd8,
    OP_VSAMULT = 5'd9,
    OP_VSMOVE  = 5'd10,
    OP_VSTORE  = 5'd11,
    OP_VSPMULT = 5'd12,
    OP_VXOR    = 5'd13,
    OP_VWSHL   = 5'd14,
    OP_VWSHR   = 5'd15,
    OP_MTVCR   = 5'd16,
    OP_MFVCR   = 5'd17,
    OP_COPY    = 5'd18,   // internal: lanes write back the permute unit's result
    OP_MTVL    = 5'd19    // set the vector length l (this design's encoding)
  } vop_t;

  typedef enum logic [2:0] {
    CL_GIVI, CL_PIVI, CL_MAVI, CL_WHOLE, CL_SCAL
  } vclass_t;

  // Decoded vector instruction as handed over by the scalar core.
  // vd: destination vector, vj/vk: source vectors, n: immediate,
  // rs: value of the scalar register operand (Ri / Rk / Rj).
  typedef struct packed {
    vop_t           op;
    logic [RNW-1:0] vd;
    logic [RNW-1:0] vj;
    logic [RNW-1:0] vk;
    logic [NW-1:0]  n;
    logic [W-1:0]   rs;
  } vinstr_t;

  // Control of one iteration (one group of R elements) in one pipeline stage.
  typedef struct packed {
    logic           valid;
    vop_t           op;
    logic [RNW-1:0] vd;
    logic [RNW-1:0] va;      // register read as operand a
    logic [RNW-1:0] vb;      // register read as operand b
    logic           use_a;   // operand a comes from the register file
    logic           use_b;
    logic           wr;      // writes vd back
    logic [GW-1:0]  grp;     // element group: elements grp*R .. grp*R+R-1
    logic           first;   // first iteration of the instruction
    logic           last;    // last iteration
    logic [NW-1:0]  n;
    logic [W-1:0]   sbi;     // scalar operand (copy of SBI)
    logic [W-1:0]   vcr;     // copy of VCR taken in DF
    logic [6:0]     cnt;     // number of elements the instruction touches
  } vctrl_t;

  // One flag per cycle for each mechanism the testbench counts.
  typedef struct packed {
    logic hazard_stall;  // issue held after ID for a data hazard
    logic drain_wait;    // issue held until the pipeline is empty
    logic fwd_exm;       // a lane forwarded its WB result into EXM
    logic fwd_exc;       // a lane forwarded its WB result into EXC
    logic rf_bypass;     // DF read the value being written back in the same cycle
    logic multi_iter;    // an iteration other than the first entered DF
  } vevents_t;

  function automatic vclass_t op_class(vop_t op);
    case (op)
      OP_VADDU, OP_VSPMULT, OP_VSAMULT:        return CL_PIVI;
      OP_VLOAD, OP_VSTORE, OP_VBYTELD:         return CL_MAVI;
      OP_VTRANSP, OP_VWSHL, OP_VWSHR:          return CL_WHOLE;
      OP_MTVCR, OP_MFVCR, OP_VEXTRACT, OP_MTVL,
      OP_NOP:                                  return CL_SCAL;
      default:                                 return CL_GIVI;
    endcase
  endfunction

  // Instructions that act on the first l elements only (vector length l).
  function automatic logic uses_vl(vop_t op);
    return op_class(op) == CL_GIVI || op_class(op) == CL_PIVI;
  endfunction

  // Operand needed at the start of EXM rather than EXC (PIVI, memory address or data).
  function automatic logic needs_at_exm(vop_t op);
    return op_class(op) == CL_PIVI || op == OP_VSTORE || op == OP_VBYTELD;
  endfunction

  // Multiply one GF(2^8) byte by x modulo the polynomial whose low 8 bits are poly.
  function automatic logic [7:0] xtime(logic [7:0] b, logic [7:0] poly);
    return {b[6:0], 1'b0} ^ (b[7] ? poly : 8'h00);
  endfunction

  // 32 x 32 carry-less (polynomial, GF(2)) product.
  function automatic logic [63:0] clmul32(logic [31:0] a, logic [31:0] b);
    logic [63:0] acc;
    acc = '0;
    for (int i = 0; i < 32; i++)
      if (b[i]) acc = acc ^ ({32'b0, a} << i);
    return acc;
  endfunction

endpackage
