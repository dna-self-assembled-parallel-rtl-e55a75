// damp_pkg: types and constants shared by the decoupled array multi-processor
// (DAMP): the broadcast control word that drives every bit-serial processor in
// lock-step, the node-controller instruction format, and the function that
// stands in for the random assembly event fixing each processor's random
// constants.
//
// Following the source architecture: 16-bit registers ACC and R0-R4, a
// full-adder operation unit, six status bits B C D R S W, and no microcode on
// the processors -- every control line is encoded directly in the broadcast
// word (horizontal, VLIW-like). The encodings, the status-bit operations and
// the controller instruction set are this design's own choices.
package damp_pkg;

  localparam int unsigned REG_W  = 16;  // register width (bits)
  localparam int unsigned N_REGS = 5;   // R0..R4

  // Status bit indices: B C D R S W.
  //   C  carry of the bit-serial adder, fed back as carry-in
  //   S  last sum bit produced (the sign after a full-width operation)
  //   D  sticky OR of sum bits (non-zero result detect)
  //   B  general-purpose bit
  //   R  ringer enable
  //   W  wait-status: when set, conditional words are ignored
  typedef enum logic [2:0] {
    ST_B = 3'd0, ST_C = 3'd1, ST_D = 3'd2, ST_R = 3'd3, ST_S = 3'd4, ST_W = 3'd5
  } st_idx_e;
  localparam int unsigned N_STATUS = 6;

  // Accumulator input during a shift.
  typedef enum logic [1:0] {
    ACC_ROT   = 2'd0,   // own LSB (rotate)
    ACC_SUM   = 2'd1,   // full-adder sum
    ACC_CARRY = 2'd2,   // full-adder carry out
    ACC_CBIT  = 2'd3    // bit supplied by the node controller
  } acc_src_e;

  // Second full-adder operand.
  typedef enum logic [2:0] {
    OPB_R0 = 3'd0, OPB_R1 = 3'd1, OPB_R2 = 3'd2, OPB_R3 = 3'd3, OPB_R4 = 3'd4,
    OPB_CBIT = 3'd5, OPB_ZERO = 3'd6, OPB_ONE = 3'd7
  } opb_e;

  // Full-adder carry-in.
  typedef enum logic [1:0] {
    CIN_C = 2'd0, CIN_ZERO = 2'd1, CIN_ONE = 2'd2
  } cin_e;

  // Status-bit operation: dst <= f(dst, src).
  typedef enum logic [2:0] {
    SOP_NOP  = 3'd0,
    SOP_SET  = 3'd1,   // dst = src
    SOP_SETN = 3'd2,   // dst = ~src
    SOP_OR   = 3'd3,   // dst = dst | src
    SOP_AND  = 3'd4,   // dst = dst & src
    SOP_ANDN = 3'd5    // dst = dst & ~src
  } sop_e;

  // Status-bit operation source.
  typedef enum logic [3:0] {
    SRC_B = 4'd0, SRC_C = 4'd1, SRC_D = 4'd2, SRC_R = 4'd3, SRC_S = 4'd4, SRC_W = 4'd5,
    SRC_ACC = 4'd6,    // ACC LSB
    SRC_OPB = 4'd7,    // selected full-adder operand B
    SRC_CBIT = 4'd8,   // controller bit
    SRC_ONE = 4'd9
  } ssrc_e;

  // Broadcast control word: one per clock, identical for every processor.
  typedef struct packed {
    logic                cond;        // 1: ignored by processors whose W is set
    logic                acc_shift;   // shift ACC right one bit
    acc_src_e            acc_src;     // what enters ACC's MSB
    logic [N_REGS-1:0]   r_shift;     // shift Rk right one bit
    logic [N_REGS-1:0]   r_from_acc;  // Rk takes ACC LSB (1) or its own LSB (0)
    opb_e                opb;         // full-adder operand B
    cin_e                cin;         // full-adder carry-in
    logic                flags_we;    // update C, S and D from the full adder
    logic [2:0]          rand_ld;     // {R1, R0, ACC}: load the random constant
    st_idx_e             st_dst;      // status operation destination
    sop_e                st_op;
    ssrc_e               st_src;
    logic                cbit;        // data bit from the node controller
  } pe_ctrl_t;

  localparam pe_ctrl_t PE_NOP = '0;

  // Node-controller instructions.
  typedef enum logic [2:0] {
    CI_NOP     = 3'd0,
    CI_EXEC    = 3'd1,  // broadcast word for (count+1) cycles
    CI_SETLOOP = 3'd2,  // loop counter = count
    CI_LOOP    = 3'd3,  // if counter != 0: counter--, jump to target
    CI_BRRING  = 3'd4,  // after the ring wait: jump if the selected node rings
    CI_BRQUIET = 3'd5,  // after the ring wait: jump if it is quiet
    CI_SAMPLE  = 3'd6,  // after the ring wait: shift ring state into the result
    CI_HALT    = 3'd7
  } ci_op_e;

  typedef struct packed {
    ci_op_e     op;
    logic       any;     // ring condition from any node (1) or node `count` (0)
    logic [15:0] count;  // repeat count / loop count / node index
    logic [7:0]  target; // jump target
    pe_ctrl_t   word;
  } ci_instr_t;

  // Stand-in for the random assembly event that fixes a 16-bit constant in
  // ACC, R0 or R1 of every processor: a fixed integer hash of seed, node,
  // processor index and register, evaluated at elaboration.
  function automatic logic [REG_W-1:0] rand_const(input int unsigned seed,
                                                   input int unsigned node,
                                                   input int unsigned pe,
                                                   input int unsigned which);
    logic [31:0] h;
    h = seed ^ (node * 32'h9E37_79B9) ^ (pe * 32'h85EB_CA6B) ^ (which * 32'hC2B2_AE35);
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    h = h * 32'h846C_A68B;
    h = h ^ (h >> 16);
    return h[REG_W-1:0];
  endfunction

endpackage
