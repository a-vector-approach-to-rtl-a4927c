// vemicry_vpu -- one vector processing unit (one lane).
//
// Lane LANE handles element grp*R+LANE of every iteration. The shared controller
// supplies the control of the iteration in each stage; this module holds the
// lane's data pipeline registers:
//   DF  (outside) the register file is read; df_a/df_b arrive here.
//   EXM PIVI work: carry-select addition for VADDU, 32x32 product plus the
//       neighbour's high word for VSAMULT (integer) and VSPMULT (carry-less);
//       memory address (and store data) for VLOAD/VSTORE/VBYTELD.
//   EXC carry selection for PIVIs (cin from the lower lane, cout to the upper
//       one); all GIVI operations (VXOR, VBCROTR, VMPMUL, VSADDU, VSMOVE); load
//       data from the lane memory; the permute result for whole-vector ops.
//   WB  registered result, written to the register file by the top.
// Forwarding: operands about to be used in EXM and in EXC are replaced by this
// lane's WB result when WB writes the register and group they were read from.
// The stage split and the carry select scheme follow the paper; the exact
// bypass wiring and memory addressing (row = scalar + group for words, scalar +
// byte for VBYTELD, each byte in its own array) are this design's choices.
module vemicry_vpu
  import vemicry_pkg::*;
#(
  parameter int R      = 8,
  parameter int LANE   = 0,
  parameter int MEM_AW = 10
) (
  input  logic                   clk,
  input  vctrl_t                 exm_c,
  input  vctrl_t                 exc_c,
  input  vctrl_t                 wb_c,
  input  logic [W-1:0]           df_a,
  input  logic [W-1:0]           df_b,
  // neighbour chain
  input  logic [W-1:0]           hi_in,     // EXM: high word of element below
  output logic [W-1:0]           hi_out,    // EXM: this element's high word
  output logic [W-1:0]           hi_exc,    // EXC: this element's high word
  input  logic                   cin,       // EXC: carry from element below
  output logic                   cout,
  output logic                   sadd_carry,// EXC: carry of VSADDU
  output logic                   en_exc,    // element in EXC is in range
  // lane memory
  output logic                   mem_en,
  output logic [3:0]             mem_we,
  output logic [3:0][MEM_AW-1:0] mem_addr,
  output logic [3:0][7:0]        mem_wdata,
  input  logic [3:0][7:0]        mem_rdata,
  // write-back
  output logic                   wb_we,
  output logic [W-1:0]           wb_data,
  output logic                   fwd_m,
  output logic                   fwd_c
);
  // ---------------- EXM ----------------
  logic [W-1:0] m_a, m_b;          // DF/EXM operand registers
  logic [W-1:0] a_m, b_m;          // after forwarding
  logic         en_m;
  logic [W-1:0] s0_m, s1_m;
  logic         c0_m, c1_m;
  logic [W-1:0] csa_x, csa_y, cs0, cs1;
  logic         cc0, cc1;
  logic [63:0]  prod;

  function automatic logic in_range(vctrl_t c);
    return c.valid && (int'(c.grp) * R + LANE < int'(c.cnt));
  endfunction

  function automatic logic fwd_hit(vctrl_t c, logic [RNW-1:0] src, logic use_src,
                                   vctrl_t w, logic w_we);
    return c.valid && use_src && w.valid && w_we && w.vd == src && w.grp == c.grp;
  endfunction

  always_ff @(posedge clk) begin
    m_a <= df_a;
    m_b <= df_b;
  end

  vemicry_csa #(.W(W)) u_csa (.a(csa_x), .b(csa_y), .s0(cs0), .c0(cc0), .s1(cs1), .c1(cc1));

  always_comb begin
    en_m  = in_range(exm_c);
    fwd_m = 1'b0;
    a_m   = m_a;
    b_m   = m_b;
    if (fwd_hit(exm_c, exm_c.va, exm_c.use_a, wb_c, wb_we)) begin a_m = wb_data; fwd_m = 1'b1; end
    if (fwd_hit(exm_c, exm_c.vb, exm_c.use_b, wb_c, wb_we)) begin b_m = wb_data; fwd_m = 1'b1; end

    prod  = '0;
    csa_x = a_m;
    csa_y = b_m;
    case (exm_c.op)
      OP_VSAMULT: begin
        prod  = {32'b0, a_m} * {32'b0, exm_c.sbi};
        csa_x = prod[31:0];
        csa_y = hi_in;
      end
      OP_VSPMULT: prod = clmul32(a_m, exm_c.sbi);
      default: ;
    endcase
    hi_out = prod[63:32];
    s0_m = cs0; s1_m = cs1; c0_m = cc0; c1_m = cc1;
    if (exm_c.op == OP_VSPMULT) begin
      s0_m = prod[31:0] ^ hi_in;
      s1_m = s0_m;
      c0_m = 1'b0;
      c1_m = 1'b0;
    end

    // lane memory
    mem_en    = en_m && op_class(exm_c.op) == CL_MAVI;
    mem_we    = (mem_en && exm_c.op == OP_VSTORE) ? 4'hF : 4'h0;
    mem_wdata = a_m;
    for (int b = 0; b < 4; b++) begin
      if (exm_c.op == OP_VBYTELD)
        mem_addr[b] = MEM_AW'(exm_c.sbi + {24'b0, a_m[8*b +: 8]});
      else
        mem_addr[b] = MEM_AW'(exm_c.sbi + W'(exm_c.grp));
    end
  end

  // ---------------- EXC ----------------
  logic [W-1:0] c_a, c_b, c_s0, c_s1, c_hi;
  logic         c_c0, c_c1;
  logic [W-1:0] a_c, b_c, res;
  logic [W:0]   sadd;

  always_ff @(posedge clk) begin
    c_a  <= a_m;
    c_b  <= b_m;
    c_s0 <= s0_m;
    c_s1 <= s1_m;
    c_c0 <= c0_m;
    c_c1 <= c1_m;
    c_hi <= hi_out;
  end

  assign hi_exc = c_hi;

  always_comb begin
    en_exc = in_range(exc_c);
    fwd_c  = 1'b0;
    a_c    = c_a;
    b_c    = c_b;
    if (fwd_hit(exc_c, exc_c.va, exc_c.use_a, wb_c, wb_we)) begin a_c = wb_data; fwd_c = 1'b1; end
    if (fwd_hit(exc_c, exc_c.vb, exc_c.use_b, wb_c, wb_we)) begin b_c = wb_data; fwd_c = 1'b1; end

    sadd = {1'b0, a_c} + {1'b0, exc_c.sbi};
    sadd_carry = sadd[W];
    cout = 1'b0;
    res  = a_c;
    case (exc_c.op)
      OP_VADDU, OP_VSAMULT, OP_VSPMULT: begin
        res  = cin ? c_s1 : c_s0;
        cout = cin ? c_c1 : c_c0;
      end
      OP_VXOR:    res = a_c ^ b_c;
      OP_VBCROTR: if (exc_c.vcr[(int'(exc_c.grp) * R + LANE) % PMAX])
                    res = (a_c >> exc_c.n[4:0]) | (a_c << (6'd32 - {1'b0, exc_c.n[4:0]}));
      OP_VMPMUL:  for (int b = 0; b < 4; b++) res[8*b +: 8] = xtime(a_c[8*b +: 8], exc_c.vcr[7:0]);
      OP_VSADDU:  res = sadd[W-1:0];
      OP_VSMOVE:  res = exc_c.sbi;
      OP_VLOAD, OP_VBYTELD: res = mem_rdata;
      default: ;
    endcase
  end

  // ---------------- WB ----------------
  always_ff @(posedge clk) begin
    wb_we   <= en_exc && exc_c.wr;
    wb_data <= res;
  end
endmodule
