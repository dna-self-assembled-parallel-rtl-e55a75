// damp_pe_tb: drives one DAMP processor with control words and checks the
// results against arithmetic done in the testbench: random-constant loads,
// a bit-serial 16-bit add (result, carry, sign and non-zero flags, 16 clocks),
// a subtract built from two inversions and an add, copying ACC into R2,
// shifting controller bits into ACC, status-bit operations, conditional
// words ignored while W is set, and the ringer following status bit R.
module damp_pe_tb;
  import damp_pkg::*;
  localparam logic [15:0] RA = 16'hB3C5, R0V = 16'h7A19, R1V = 16'h4E2F;

  logic clk = 0, rst_n = 0;
  pe_ctrl_t ctrl = PE_NOP;
  logic ring;
  logic [15:0] acc_q;
  logic [N_STATUS-1:0] st;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  damp_pe #(.RAND_ACC(RA), .RAND_R0(R0V), .RAND_R1(R1V)) dut (
    .clk, .rst_n, .ctrl, .ring, .acc_q, .status_q(st));

  task automatic apply(input pe_ctrl_t w, input int n);
    ctrl = w;
    repeat (n) @(posedge clk);
    #1 ctrl = PE_NOP;
  endtask

  task automatic status(input logic cond, input st_idx_e d, input sop_e op, input ssrc_e s,
                        input logic cb = 1'b0);
    pe_ctrl_t w = PE_NOP;
    w.cond = cond; w.st_dst = d; w.st_op = op; w.st_src = s; w.cbit = cb;
    apply(w, 1);
  endtask

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  // ACC = Rk: clear ACC with controller zeros, then add Rk (rotating it back)
  task automatic read_reg(input opb_e k, output logic [15:0] v);
    pe_ctrl_t x = PE_NOP;
    x.acc_shift = 1; x.acc_src = ACC_CBIT; x.cbit = 0;
    apply(x, 16);
    x = PE_NOP; x.acc_shift = 1; x.acc_src = ACC_SUM; x.opb = k; x.cin = CIN_ZERO;
    x.r_shift = 5'b00001 << k;
    apply(x, 16);
    v = acc_q;
  endtask

  pe_ctrl_t w;
  logic [15:0] exp16, v16;
  logic [16:0] sum17;
  int t0;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // random constants
    w = PE_NOP; w.rand_ld = 3'b111; apply(w, 1);
    chk(acc_q, RA, "rand ACC");
    read_reg(OPB_R0, v16); chk(v16, R0V, "rand R0");
    read_reg(OPB_R1, v16); chk(v16, R1V, "rand R1");
    w = PE_NOP; w.rand_ld = 3'b001; apply(w, 1);
    chk(acc_q, RA, "ACC reloaded");
    // ACC = ACC + R0, 16 clocks
    status(0, ST_C, SOP_SETN, SRC_ONE);
    w = PE_NOP; w.acc_shift = 1; w.acc_src = ACC_SUM; w.opb = OPB_R0; w.cin = CIN_C;
    w.flags_we = 1; w.r_shift = 5'b00001;
    t0 = $time;
    apply(w, 16);
    chk(($time - t0 + 9) / 10, 16, "add takes 16 clocks");
    sum17 = {1'b0, RA} + {1'b0, R0V};
    chk(acc_q, sum17[15:0], "add result");
    chk(st[ST_C], sum17[16], "carry"); chk(st[ST_S], sum17[15], "sign");
    chk(st[ST_D], sum17[15:0] != 0, "non-zero");
    read_reg(OPB_R0, v16); chk(v16, R0V, "R0 restored by rotation");
    // ACC = sum again, shifted in from the controller
    for (int k = 0; k < 16; k++) begin
      w = PE_NOP; w.acc_shift = 1; w.acc_src = ACC_CBIT; w.cbit = sum17[k];
      apply(w, 1);
    end
    exp16 = sum17[15:0];
    // ACC = ACC - R1 = ~(~ACC + R1)
    w = PE_NOP; w.acc_shift = 1; w.acc_src = ACC_SUM; w.opb = OPB_ONE; w.cin = CIN_ZERO;
    apply(w, 16);
    chk(acc_q, 16'(~exp16), "invert");
    status(0, ST_C, SOP_SETN, SRC_ONE);
    w = PE_NOP; w.acc_shift = 1; w.acc_src = ACC_SUM; w.opb = OPB_R1; w.cin = CIN_C;
    w.flags_we = 1; w.r_shift = 5'b00010;
    apply(w, 16);
    w = PE_NOP; w.acc_shift = 1; w.acc_src = ACC_SUM; w.opb = OPB_ONE; w.cin = CIN_ZERO;
    apply(w, 16);
    exp16 = exp16 - R1V;
    chk(acc_q, exp16, "subtract");
    // R2 = ACC (ACC rotates along)
    w = PE_NOP; w.acc_shift = 1; w.acc_src = ACC_ROT; w.r_shift = 5'b00100; w.r_from_acc = 5'b00100;
    apply(w, 16);
    chk(acc_q, exp16, "ACC rotated back");
    read_reg(OPB_R2, v16); chk(v16, exp16, "R2 copy");
    // controller bits into ACC: pattern 16'h5A3C LSB first
    for (int k = 0; k < 16; k++) begin
      w = PE_NOP; w.acc_shift = 1; w.acc_src = ACC_CBIT; w.cbit = 1'(16'h5A3C >> k);
      apply(w, 1);
    end
    chk(acc_q, 16'h5A3C, "cbit shift-in");
    // ACC = carry(ACC, R2, 0) per bit, i.e. ACC & R2 with carry-in 0
    w = PE_NOP; w.acc_shift = 1; w.acc_src = ACC_CARRY; w.opb = OPB_R2; w.cin = CIN_ZERO;
    w.r_shift = 5'b00100;
    apply(w, 16);
    chk(acc_q, 16'h5A3C & exp16, "carry as AND");
    // status operations on B
    status(0, ST_B, SOP_SET, SRC_CBIT, 1'b1);   chk(st[ST_B], 1, "B set");
    status(0, ST_B, SOP_AND, SRC_CBIT, 1'b0);   chk(st[ST_B], 0, "B and");
    status(0, ST_B, SOP_OR, SRC_ONE);           chk(st[ST_B], 1, "B or");
    status(0, ST_B, SOP_ANDN, SRC_ONE);         chk(st[ST_B], 0, "B andn");
    // wait bit: conditional words are ignored
    exp16 = acc_q;
    status(0, ST_W, SOP_SET, SRC_ONE);
    w = PE_NOP; w.cond = 1; w.acc_shift = 1; w.acc_src = ACC_CBIT; w.cbit = 1;
    apply(w, 5);
    chk(acc_q, exp16, "waiting processor ignores cond words");
    status(1, ST_W, SOP_SETN, SRC_ONE);         chk(st[ST_W], 1, "cond cannot clear W");
    w.cond = 0; apply(w, 1);
    chk(acc_q, {1'b1, exp16[15:1]}, "unconditional word executes");
    status(0, ST_W, SOP_SETN, SRC_ONE);         chk(st[ST_W], 0, "W cleared");
    // ringer
    chk(ring, 0, "silent");
    status(0, ST_R, SOP_SET, SRC_ONE);
    @(posedge clk); #1 chk(ring, 1, "ring high");
    @(posedge clk); #1 chk(ring, 0, "ring low");
    @(posedge clk); #1 chk(ring, 1, "ring high again");
    status(0, ST_R, SOP_SETN, SRC_ONE);
    @(posedge clk); #1 chk(ring, 0, "ring stopped");
    @(posedge clk); #1 chk(ring, 0, "ring stays stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
