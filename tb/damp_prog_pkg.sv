// damp_prog_pkg: program builders for the DAMP node controller, used by the
// testbenches. They assemble ci_instr_t words (see damp_pkg) into a program
// array that a testbench then writes into the controller.
//
// prog_add_minquery builds the program exercised end to end:
//   1. load the random constants into ACC and R0 (all processors),
//   2. ACC = ACC + R0 bit-serially (16 clocks, carry kept in status bit C),
//   3. MIN-QUERY over ACC, most significant bit first: every processor still
//      taking part (W = 0) rings when its current ACC bit is 0; if any rings,
//      those holding a 1 set W and drop out. The controller records one ring
//      sample per bit, so the minimum is the complement of `result`.
//   4. a final rotate leaves ACC as it was after step 2.
package damp_prog_pkg;
  import damp_pkg::*;

  typedef ci_instr_t prog_t [256];

  function automatic ci_instr_t ci(input ci_op_e op, input logic any, input int count,
                                   input int target, input pe_ctrl_t w);
    ci_instr_t i;
    i.op = op; i.any = any; i.count = 16'(count); i.target = 8'(target); i.word = w;
    return i;
  endfunction

  function automatic pe_ctrl_t w_status(input logic cond, input st_idx_e dst,
                                        input sop_e op, input ssrc_e src);
    pe_ctrl_t w = PE_NOP;
    w.cond = cond; w.st_dst = dst; w.st_op = op; w.st_src = src;
    return w;
  endfunction

  function automatic pe_ctrl_t w_rotate_acc();
    pe_ctrl_t w = PE_NOP;
    w.acc_shift = 1'b1; w.acc_src = ACC_ROT;
    return w;
  endfunction

  function automatic pe_ctrl_t w_add_r0();
    pe_ctrl_t w = PE_NOP;
    w.cond = 1'b1; w.acc_shift = 1'b1; w.acc_src = ACC_SUM; w.opb = OPB_R0;
    w.cin = CIN_C; w.flags_we = 1'b1; w.r_shift = 5'b00001;
    return w;
  endfunction

  // any = 1: query over all nodes; any = 0: only node `node` is watched.
  function automatic prog_t prog_add_minquery(input logic any, input int node);
    prog_t p;
    pe_ctrl_t w;
    int a = 0;
    int loop_top;
    for (int k = 0; k < 256; k++) p[k] = ci(CI_HALT, 1'b0, 0, 0, PE_NOP);
    w = PE_NOP; w.rand_ld = 3'b011;                                   // ACC, R0
    p[a++] = ci(CI_EXEC, 0, 0, 0, w);
    p[a++] = ci(CI_EXEC, 0, 0, 0, w_status(0, ST_W, SOP_SETN, SRC_ONE)); // W = 0
    p[a++] = ci(CI_EXEC, 0, 0, 0, w_status(0, ST_R, SOP_SETN, SRC_ONE)); // R = 0
    p[a++] = ci(CI_EXEC, 0, 0, 0, w_status(0, ST_C, SOP_SETN, SRC_ONE)); // C = 0
    p[a++] = ci(CI_EXEC, 0, 15, 0, w_add_r0());                        // ACC += R0
    p[a++] = ci(CI_EXEC, 0, 14, 0, w_rotate_acc());                    // MSB to bit 0
    p[a++] = ci(CI_SETLOOP, 0, 15, 0, PE_NOP);
    loop_top = a;
    p[a++] = ci(CI_EXEC, 0, 0, 0, w_status(1, ST_R, SOP_SETN, SRC_ACC)); // ring if bit is 0
    p[a++] = ci(CI_SAMPLE, any, node, 0, PE_NOP);
    p[a]   = ci(CI_BRQUIET, any, node, a + 2, PE_NOP); a++;
    p[a++] = ci(CI_EXEC, 0, 0, 0, w_status(1, ST_W, SOP_OR, SRC_ACC));   // 1s drop out
    p[a++] = ci(CI_EXEC, 0, 0, 0, w_status(0, ST_R, SOP_SETN, SRC_ONE)); // R = 0
    p[a++] = ci(CI_EXEC, 0, 14, 0, w_rotate_acc());                    // next bit
    p[a++] = ci(CI_LOOP, 0, 0, loop_top, PE_NOP);
    p[a++] = ci(CI_EXEC, 0, 0, 0, w_rotate_acc());                     // realign
    p[a++] = ci(CI_HALT, 0, 0, 0, PE_NOP);
    return p;
  endfunction

endpackage
