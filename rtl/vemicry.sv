// vemicry -- VeMICry, a vector co-processor for cryptography.
//
// A MIPS-style scalar core decodes every instruction and hands the vector ones
// over through the issue port (iss_valid/iss_instr/iss_ready), together with the
// value of the scalar register the instruction names. The co-processor holds Q
// vector registers of P 32-bit elements, split over R lanes; each lane has a
// vector processing unit (VPU) and its own memory bank of four byte arrays. An
// instruction runs through DF (register read) - EXM - EXC - WB, one group of R
// elements per iteration and P/R iterations back to back, so a new instruction
// can issue every P/R cycles. A vector length l <= P (MTVL) limits element-wise
// and multi-word instructions to elements 0..l-1 and ceil(l/R) iterations.
// Carries and high product words ripple from lane to lane inside EXC/EXM and
// from one iteration to the next through registers here,
// which makes multi-word addition and multiplication (RSA, binary-field
// Montgomery) run at the same rate as element-wise instructions (AES).
//
// Ports: issue port; res_valid/res_data carry the scalar result of VEXTRACT and
// MFVCR one cycle after issue; the host memory port (hm_*) lets the scalar side
// fill or read any lane's bank, one word per cycle, when no memory instruction is
// in EXM (hm_gnt), read data on hm_rdata one cycle after the grant; busy is high
// while an instruction is in the pipeline; ev flags the mechanisms of each cycle.
// The SBI register is kept as the architecture names it, but the lanes use the
// copy of the scalar operand that travels with each stage, so its output and
// the controller's vl output are left unread here (lint reports them unused).
// Reset is synchronous and active low. Default sizes are the paper's evaluated
// configuration: q = p = r = 8, 1 KB byte arrays.
module vemicry
  import vemicry_pkg::*;
#(
  parameter int Q         = 8,
  parameter int P         = 8,
  parameter int R         = 8,
  parameter int MEM_DEPTH = 1024,
  localparam int G        = P / R,
  localparam int GB       = (G > 1) ? $clog2(G) : 1,
  localparam int QW       = $clog2(Q),
  localparam int AW       = $clog2(MEM_DEPTH),
  localparam int LW       = (R > 1) ? $clog2(R) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  iss_valid,
  input  vinstr_t               iss_instr,
  output logic                  iss_ready,
  output logic                  res_valid,
  output logic [W-1:0]          res_data,
  input  logic                  hm_req,
  input  logic                  hm_we,
  input  logic [LW-1:0]         hm_lane,
  input  logic [AW-1:0]         hm_addr,
  input  logic [3:0]            hm_be,
  input  logic [W-1:0]          hm_wdata,
  output logic                  hm_gnt,
  output logic [W-1:0]          hm_rdata,
  output logic                  busy,
  output vevents_t              ev
);
  vctrl_t df_c, exm_c, exc_c, wb_c;
  logic   vcr_we, sbi_we, perm_load, hazard_ev, drain_ev, multi_ev;
  logic [6:0] vl;
  logic [W-1:0] vcr, sbi, car;

  logic [R-1:0][W-1:0] rd_a, rd_b, df_a, wb_data, hi_out, hi_exc;
  logic [P-1:0][W-1:0] rd_v, perm_dst, perm_buf;
  logic [R-1:0]        wb_we, wr_en, cout, cin, sadd_carry, en_exc, fwd_m, fwd_c;
  logic [R-1:0][W-1:0] hi_in;
  logic                perm_car_we, rf_bypass;
  logic [W-1:0]        perm_car;
  logic [W-1:0]        hi_reg;
  logic                carry_reg;

  // ---------------- controller ----------------
  vemicry_ctrl #(.Q(Q), .P(P), .R(R)) u_ctrl (
    .clk, .rst_n, .iss_valid, .iss_instr, .iss_ready,
    .vcr, .car, .rd_v_data(rd_v),
    .df_c, .exm_c, .exc_c, .wb_c,
    .vcr_we, .sbi_we, .perm_load, .res_valid, .res_data, .busy, .vl,
    .ev_hazard_stall(hazard_ev), .ev_drain_wait(drain_ev), .ev_multi_iter(multi_ev)
  );

  // ---------------- register file ----------------
  for (genvar j = 0; j < R; j++) begin : g_wen
    assign wr_en[j] = wb_c.valid && wb_we[j];
  end

  vemicry_vrf #(.Q(Q), .P(P), .R(R)) u_vrf (
    .clk,
    .rd_a_reg(df_c.va[QW-1:0]), .rd_a_grp(df_c.grp[GB-1:0]), .rd_a_data(rd_a),
    .rd_b_reg(df_c.vb[QW-1:0]), .rd_b_grp(df_c.grp[GB-1:0]), .rd_b_data(rd_b),
    .rd_v_reg(iss_instr.vj[QW-1:0]), .rd_v_data(rd_v),
    .wr_reg(wb_c.vd[QW-1:0]), .wr_grp(wb_c.grp[GB-1:0]), .wr_en, .wr_data(wb_data),
    .bypass(rf_bypass)
  );

  // ---------------- permute unit ----------------
  vemicry_permute #(.P(P)) u_perm (
    .op(iss_instr.op), .n(iss_instr.n), .src(rd_v), .car,
    .dst(perm_dst), .car_we(perm_car_we), .car_out(perm_car)
  );

  always_ff @(posedge clk)
    if (perm_load) perm_buf <= perm_dst;

  always_comb
    for (int j = 0; j < R; j++) begin
      if (df_c.op == OP_COPY)
        df_a[j] = df_c.first ? perm_dst[j] : perm_buf[int'(df_c.grp) * R + j];
      else
        df_a[j] = rd_a[j];
    end

  // ---------------- control registers ----------------
  // The most significant element of a multi-word result is element l-1; in the
  // last iteration it sits in lane (l-1) mod R (lane R-1 when l = P).
  logic [LW-1:0] top_lane;
  assign top_lane = LW'((int'(exc_c.cnt) + R - 1) % R);

  vemicry_cregs #(.P(P), .R(R)) u_cregs (
    .clk, .rst_n,
    .vcr_we, .vcr_wdata(iss_instr.rs),
    .sbi_we, .sbi_wdata(iss_instr.rs),
    .perm_car_we(perm_load && perm_car_we), .perm_car,
    .exc_c, .cout_top(cout[top_lane]), .hi_top(hi_exc[top_lane]),
    .lane_carry(sadd_carry), .lane_en(en_exc),
    .vcr, .sbi, .car
  );

  // ---------------- lane chains ----------------
  // High product word and carry cross from lane R-1 of one iteration to lane 0
  // of the next through these registers; the first iteration starts from zero.
  always_ff @(posedge clk) begin
    hi_reg    <= hi_out[R-1];
    carry_reg <= cout[R-1];
  end

  always_comb
    for (int j = 0; j < R; j++) begin
      hi_in[j] = (j == 0) ? (exm_c.first ? '0 : hi_reg)    : hi_out[(j + R - 1) % R];
      cin[j]   = (j == 0) ? (exc_c.first ? 1'b0 : carry_reg) : cout[(j + R - 1) % R];
    end

  // ---------------- lanes and their memory banks ----------------
  logic                   mav_in_exm;
  logic [LW-1:0]          hm_lane_q;
  logic [R-1:0][3:0][7:0] mrdata;

  assign mav_in_exm = exm_c.valid && op_class(exm_c.op) == CL_MAVI;
  assign hm_gnt     = hm_req && !mav_in_exm;

  always_ff @(posedge clk)
    if (hm_gnt) hm_lane_q <= hm_lane;
  assign hm_rdata = mrdata[hm_lane_q];

  for (genvar j = 0; j < R; j++) begin : g_lane
    logic                  v_en;
    logic [3:0]            v_we;
    logic [3:0][AW-1:0]    v_addr;
    logic [3:0][7:0]       v_wdata;
    logic                  m_en;
    logic [3:0]            m_we;
    logic [3:0][AW-1:0]    m_addr;
    logic [3:0][7:0]       m_wdata;

    vemicry_vpu #(.R(R), .LANE(j), .MEM_AW(AW)) u_vpu (
      .clk, .exm_c, .exc_c, .wb_c,
      .df_a(df_a[j]), .df_b(rd_b[j]),
      .hi_in(hi_in[j]), .hi_out(hi_out[j]), .hi_exc(hi_exc[j]),
      .cin(cin[j]), .cout(cout[j]), .sadd_carry(sadd_carry[j]), .en_exc(en_exc[j]),
      .mem_en(v_en), .mem_we(v_we), .mem_addr(v_addr), .mem_wdata(v_wdata),
      .mem_rdata(mrdata[j]),
      .wb_we(wb_we[j]), .wb_data(wb_data[j]), .fwd_m(fwd_m[j]), .fwd_c(fwd_c[j])
    );

    always_comb begin
      if (hm_gnt && hm_lane == LW'(j)) begin
        m_en    = 1'b1;
        m_we    = hm_we ? hm_be : 4'h0;
        m_addr  = {4{hm_addr}};
        m_wdata = hm_wdata;
      end else begin
        m_en    = v_en;
        m_we    = v_we;
        m_addr  = v_addr;
        m_wdata = v_wdata;
      end
    end

    vemicry_lane_mem #(.DEPTH(MEM_DEPTH)) u_mem (
      .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(mrdata[j])
    );
  end

  // ---------------- events ----------------
  always_comb begin
    ev = '0;
    ev.hazard_stall = hazard_ev;
    ev.drain_wait   = drain_ev;
    ev.fwd_exm      = |fwd_m;
    ev.fwd_exc      = |fwd_c;
    ev.rf_bypass    = rf_bypass && df_c.valid && (df_c.use_a || df_c.use_b);
    ev.multi_iter   = multi_ev;
  end

  // The scalar core must not offer an instruction while reset is asserted.
  a_issue_known: assert property (@(posedge clk) disable iff (!rst_n)
                                  iss_valid && iss_ready |-> iss_instr.op != OP_COPY);
endmodule
