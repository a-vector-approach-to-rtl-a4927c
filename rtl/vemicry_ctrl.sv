// vemicry_ctrl -- issue and sequencing of vector instructions.
//
// The scalar core offers one decoded vector instruction at a time (iss_valid /
// iss_instr); iss_ready accepts it. An accepted lane instruction enters DF in the
// same cycle (the scalar EX cycle) with its first group of R elements and, when
// P > R, the following groups enter DF in the next P/R-1 cycles, during which
// iss_ready stays low: the issue rate is one instruction every P/R cycles. The
// stage control registers exm_c, exc_c and wb_c follow df_c one cycle apart.
// Issue is held (the "stall after ID" of the paper's hazard table) when the
// new instruction needs an operand at the start of EXM (PIVI, VSTORE data,
// VBYTELD offsets) and the iteration now in EXM writes that register and group:
// its result only exists after EXC, so one bubble lets it be forwarded from WB.
// Hazards on operands used in EXC need no stall (forwarded from WB).
// Whole-vector instructions (VTRANSP, VWSHL, VWSHR) and VEXTRACT wait until EXM
// and EXC are empty, then read the full register (write-through covers WB) in
// their issue cycle. MTVCR and MFVCR complete in their issue cycle; VEXTRACT and
// MFVCR return their value on res_data one cycle after acceptance.
// Vector length l (register vl, set by MTVL, P after reset): element-wise and
// multi-word instructions act on elements 0..l-1 only and take ceil(l/R)
// iterations, so a short vector also issues faster when R < P; MTVL with 0 or
// a value above P selects P. Memory and whole-vector instructions keep their
// own counts and always take P/R iterations.
// Stages, issue rate, the stall rules and the notion of a vector length follow
// the paper; the drain rule for whole-vector instructions, the result timing,
// the MTVL instruction and which instructions l applies to are this design's
// choices.
module vemicry_ctrl
  import vemicry_pkg::*;
#(
  parameter int Q  = 8,
  parameter int P  = 8,
  parameter int R  = 8,
  parameter int G  = P / R
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                iss_valid,
  input  vinstr_t             iss_instr,
  output logic                iss_ready,
  input  logic [W-1:0]        vcr,
  input  logic [W-1:0]        car,
  input  logic [P-1:0][W-1:0] rd_v_data,   // whole register iss_instr.vj
  output vctrl_t              df_c,
  output vctrl_t              exm_c,
  output vctrl_t              exc_c,
  output vctrl_t              wb_c,
  output logic                vcr_we,
  output logic                sbi_we,
  output logic                perm_load,   // whole-vector instruction issues now
  output logic                res_valid,
  output logic [W-1:0]        res_data,
  output logic                busy,
  output logic [6:0]          vl,          // current vector length l
  output logic                ev_hazard_stall,
  output logic                ev_drain_wait,
  output logic                ev_multi_iter
);
  vclass_t cls;
  vctrl_t  nc;          // control of the offered instruction, first iteration
  vctrl_t  cur;         // instruction being sequenced
  logic    active;      // more iterations of cur to go
  logic [GW-1:0] iter;
  logic [GW-1:0] ng, cur_ng;  // iterations of the offered / current instruction
  logic    lane_op, hazard, drain_block, accept;

  function automatic logic [6:0] clip(int v);
    return (v > P) ? 7'(P) : 7'(v);
  endfunction

  always_comb begin
    cls = op_class(iss_instr.op);
    nc = '0;
    nc.valid = 1'b1;
    nc.op    = (cls == CL_WHOLE) ? OP_COPY : iss_instr.op;
    nc.vd    = iss_instr.vd;
    nc.n     = iss_instr.n;
    nc.sbi   = iss_instr.rs;
    nc.vcr   = vcr;
    nc.first = 1'b1;
    nc.cnt   = uses_vl(iss_instr.op) ? vl : 7'(P);
    ng       = uses_vl(iss_instr.op) ? GW'((int'(vl) + R - 1) / R) : GW'(G);
    nc.last  = (ng == GW'(1));
    nc.wr    = 1'b1;
    case (iss_instr.op)
      OP_VADDU, OP_VXOR: begin
        nc.va = iss_instr.vj; nc.use_a = 1'b1;
        nc.vb = iss_instr.vk; nc.use_b = 1'b1;
      end
      OP_VBCROTR, OP_VMPMUL, OP_VSADDU, OP_VSAMULT, OP_VSPMULT: begin
        nc.va = iss_instr.vj; nc.use_a = 1'b1;
      end
      OP_VBYTELD: begin
        nc.va = iss_instr.vd; nc.use_a = 1'b1;
        nc.cnt = clip(int'(iss_instr.n) + 1);
      end
      OP_VLOAD:  nc.cnt = clip(int'(iss_instr.n) + 1);
      OP_VSTORE: begin
        nc.va = iss_instr.vj; nc.use_a = 1'b1; nc.wr = 1'b0;
        nc.cnt = clip(int'(iss_instr.n) + 1);
      end
      OP_VSMOVE:
        if (iss_instr.n != '0 && int'(iss_instr.n) < int'(vl)) nc.cnt = 7'(iss_instr.n);
      default: ;
    endcase

    lane_op = cls != CL_SCAL;
    // Data hazard: operand needed in EXM, producer now in EXM (result after EXC).
    hazard = lane_op && needs_at_exm(iss_instr.op) && exm_c.valid && exm_c.wr &&
             exm_c.grp == '0 &&
             ((nc.use_a && exm_c.vd == nc.va) || (nc.use_b && exm_c.vd == nc.vb));
    drain_block = (cls == CL_WHOLE || iss_instr.op == OP_VEXTRACT) &&
                  (exm_c.valid || exc_c.valid);
    iss_ready = rst_n && !active && !hazard && !drain_block;
    accept    = iss_valid && iss_ready;

    df_c = '0;
    if (active) begin
      df_c       = cur;
      df_c.grp   = iter;
      df_c.first = 1'b0;
      df_c.last  = (iter == cur_ng - 1'b1);
    end else if (accept && lane_op) begin
      df_c = nc;
    end

    vcr_we    = accept && iss_instr.op == OP_MTVCR;
    sbi_we    = accept && lane_op;
    perm_load = accept && cls == CL_WHOLE;
    busy      = active || exm_c.valid || exc_c.valid || wb_c.valid;
    ev_hazard_stall = iss_valid && !active && hazard;
    ev_drain_wait   = iss_valid && !active && drain_block;
    ev_multi_iter   = df_c.valid && !df_c.first;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      iter      <= '0;
      cur_ng    <= '0;
      vl        <= 7'(P);
      cur       <= '0;
      exm_c     <= '0;
      exc_c     <= '0;
      wb_c      <= '0;
      res_valid <= 1'b0;
      res_data  <= '0;
    end else begin
      exm_c <= df_c;
      exc_c <= exm_c;
      wb_c  <= exc_c;
      if (active) begin
        iter <= iter + 1'b1;
        if (iter == cur_ng - 1'b1) active <= 1'b0;
      end else if (accept && lane_op && ng > GW'(1)) begin
        active <= 1'b1;
        iter   <= GW'(1);
        cur    <= nc;
        cur_ng <= ng;
      end
      if (accept && iss_instr.op == OP_MTVL)
        vl <= (iss_instr.rs == '0 || iss_instr.rs > W'(P)) ? 7'(P) : 7'(iss_instr.rs);
      res_valid <= accept && (iss_instr.op == OP_MFVCR || iss_instr.op == OP_VEXTRACT);
      if (iss_instr.op == OP_MFVCR)           res_data <= vcr;
      else if (iss_instr.n == '0)             res_data <= car;
      else if (int'(iss_instr.n) <= P)        res_data <= rd_v_data[int'(iss_instr.n) - 1];
      else                                    res_data <= '0;
    end
  end
endmodule
