// damp_pe: one bit-serial DAMP processor.
//
// Six 16-bit shift registers: the accumulator ACC and R0-R4. Operands travel
// LSB first: a shift moves every bit one place toward bit 0 and the new bit
// enters at bit 15. ACC shifts under its own control, independently of
// R0-R4, so operands can be aligned relative to each other. The operation
// unit is a full adder: operand A is ACC's LSB, operand B is the LSB of a
// selected Rk (or a bit from the node controller, or a constant), and its
// sum or carry can be shifted into ACC. Each Rk takes either its own LSB
// (rotate) or ACC's LSB during a shift. ACC, R0 and R1 can load a random
// constant fixed at assembly time (parameters RAND_ACC, RAND_R0, RAND_R1).
// Six status bits B C D R S W allow conditional work: a control word marked
// `cond` is ignored by a processor whose wait bit W is set. Status bit R
// enables the processor's ringer, its only output.
//
// From the source: register count and width, LSB-first bit-serial order,
// independent ACC shift, full adder with sum/carry to ACC, own-LSB-or-ACC
// inputs of R0-R4, random constants in ACC/R0/R1, the six status-bit names,
// wait-bit conditional execution and the ringer. This design's own choices:
// the meaning of B, C, D, R and S, the status-bit operations, the
// controller-bit paths and the control-word encoding (see damp_pkg).
//
// Interface: `ctrl` is the broadcast control word, applied on every rising
// clock edge. `ring` is the ringer output. `acc_q` and `status_q` are
// observation outputs for test. All state updates take one clock.
module damp_pe
  import damp_pkg::*;
#(
  parameter logic [REG_W-1:0] RAND_ACC = 16'h0000,
  parameter logic [REG_W-1:0] RAND_R0  = 16'h0000,
  parameter logic [REG_W-1:0] RAND_R1  = 16'h0000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pe_ctrl_t            ctrl,
  output logic                ring,
  output logic [REG_W-1:0]    acc_q,
  output logic [N_STATUS-1:0] status_q
);

  logic [REG_W-1:0]  acc;
  logic [REG_W-1:0]  r [N_REGS];
  logic [N_STATUS-1:0] st;

  logic en;           // this word applies to this processor
  logic opb_bit, cin_bit, fa_s, fa_co;
  logic acc_in;
  logic src_bit, dst_old, dst_new;

  assign en = !(ctrl.cond && st[ST_W]);

  always_comb begin
    unique case (ctrl.opb)
      OPB_R0:   opb_bit = r[0][0];
      OPB_R1:   opb_bit = r[1][0];
      OPB_R2:   opb_bit = r[2][0];
      OPB_R3:   opb_bit = r[3][0];
      OPB_R4:   opb_bit = r[4][0];
      OPB_CBIT: opb_bit = ctrl.cbit;
      OPB_ZERO: opb_bit = 1'b0;
      default:  opb_bit = 1'b1;
    endcase
    unique case (ctrl.cin)
      CIN_C:    cin_bit = st[ST_C];
      CIN_ONE:  cin_bit = 1'b1;
      default:  cin_bit = 1'b0;
    endcase
  end

  full_adder u_op (.a(acc[0]), .b(opb_bit), .ci(cin_bit), .s(fa_s), .co(fa_co));

  always_comb begin
    unique case (ctrl.acc_src)
      ACC_ROT:   acc_in = acc[0];
      ACC_SUM:   acc_in = fa_s;
      ACC_CARRY: acc_in = fa_co;
      default:   acc_in = ctrl.cbit;
    endcase
    unique case (ctrl.st_src)
      SRC_B:    src_bit = st[ST_B];
      SRC_C:    src_bit = st[ST_C];
      SRC_D:    src_bit = st[ST_D];
      SRC_R:    src_bit = st[ST_R];
      SRC_S:    src_bit = st[ST_S];
      SRC_W:    src_bit = st[ST_W];
      SRC_ACC:  src_bit = acc[0];
      SRC_OPB:  src_bit = opb_bit;
      SRC_CBIT: src_bit = ctrl.cbit;
      default:  src_bit = 1'b1;
    endcase
    dst_old = st[ctrl.st_dst];
    unique case (ctrl.st_op)
      SOP_SET:  dst_new = src_bit;
      SOP_SETN: dst_new = ~src_bit;
      SOP_OR:   dst_new = dst_old | src_bit;
      SOP_AND:  dst_new = dst_old & src_bit;
      SOP_ANDN: dst_new = dst_old & ~src_bit;
      default:  dst_new = dst_old;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      for (int k = 0; k < N_REGS; k++) r[k] <= '0;
      st  <= '0;
    end else if (en) begin
      // accumulator
      if (ctrl.rand_ld[0])     acc <= RAND_ACC;
      else if (ctrl.acc_shift) acc <= {acc_in, acc[REG_W-1:1]};
      // R0..R4
      for (int k = 0; k < N_REGS; k++) begin
        if (k == 0 && ctrl.rand_ld[1])      r[k] <= RAND_R0;
        else if (k == 1 && ctrl.rand_ld[2]) r[k] <= RAND_R1;
        else if (ctrl.r_shift[k])
          r[k] <= {(ctrl.r_from_acc[k] ? acc[0] : r[k][0]), r[k][REG_W-1:1]};
      end
      // full-adder flags
      if (ctrl.flags_we) begin
        st[ST_C] <= fa_co;
        st[ST_S] <= fa_s;
        st[ST_D] <= st[ST_D] | fa_s;
      end
      // status operation (wins over the flag update on the same bit)
      if (ctrl.st_op != SOP_NOP && ctrl.st_dst <= ST_W)
        st[ctrl.st_dst] <= dst_new;
    end
  end

  ringer u_ringer (.clk(clk), .rst_n(rst_n), .en(st[ST_R]), .osc(ring));

  assign acc_q    = acc;
  assign status_q = st;

endmodule
