// damp_ctrl: the DAMP node controller. It runs a program of ci_instr_t words
// (damp_pkg) from its program memory and broadcasts one processor control word
// per clock to every node; all processor instructions are encoded directly in
// that word, there is no decoding on the processors. Its only input from the
// processors is the per-node ringer detection, which it uses to branch and to
// build results bit by bit (binary search over a node's random constants,
// MIN-QUERY over objective values).
//
// Instructions: EXEC broadcasts its word for count+1 clocks (a 16-bit
// bit-serial operation is one EXEC with count 15). SETLOOP/LOOP give a counted
// loop. BRRING/BRQUIET branch on the ring state of node `count` (or of any
// node when `any` is set), SAMPLE shifts that state into `result`. These three
// first stall for RING_WAIT clocks, broadcasting the no-op word, so that the
// ringer detection has caught up with the last EXEC. HALT ends the program.
//
// From the source: a controller that sends the instruction stream to all
// nodes in parallel and detects ringers. The instruction set, program memory,
// stall and host interface are this design's own.
//
// Host interface: write the program with prog_we/prog_addr/prog_wdata while
// idle, pulse `start` (program starts at address 0); `busy` is high while it
// runs, `done` pulses for one clock after HALT. `cycles` counts the clocks of
// the last run, `stalls` the ring-wait stall clocks.
module damp_ctrl
  import damp_pkg::*;
#(
  parameter int unsigned NNODES     = 1024,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned RING_WAIT  = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  ci_instr_t                     prog_wdata,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic [31:0]                   result,
  output logic [NNODES-1:0]             ring_snap,
  output logic [31:0]                   cycles,
  output logic [31:0]                   stalls,
  output pe_ctrl_t                      ctrl,
  input  logic [NNODES-1:0]             ring_vec
);
  localparam int unsigned PC_W = $clog2(PROG_DEPTH);

  ci_instr_t       prog [PROG_DEPTH];
  logic [PC_W-1:0] pc;
  logic [15:0]     rep, lc;
  logic [$clog2(RING_WAIT+1)-1:0] wcnt;
  logic            run;
  ci_instr_t       ins;
  logic            cond, wait_done;

  assign ins       = prog[pc];
  localparam int unsigned IDX_W = (NNODES > 1) ? $clog2(NNODES) : 1;

  always_comb begin
    cond = 1'b0;
    if (ins.any)                     cond = |ring_vec;
    else if (ins.count < 16'(NNODES)) cond = ring_vec[ins.count[IDX_W-1:0]];
  end
  assign wait_done = (wcnt == ($clog2(RING_WAIT+1))'(RING_WAIT));
  assign busy      = run;
  assign ctrl      = (run && ins.op == CI_EXEC) ? ins.word : PE_NOP;

  always_ff @(posedge clk)
    if (prog_we && !run) prog[prog_addr] <= prog_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0; pc <= '0; rep <= '0; lc <= '0; wcnt <= '0;
      result <= '0; ring_snap <= '0; cycles <= '0; stalls <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1; pc <= '0; rep <= '0; wcnt <= '0;
          result <= '0; cycles <= '0; stalls <= '0;
        end
      end else begin
        cycles <= cycles + 1;
        unique case (ins.op)
          CI_EXEC: begin
            if (rep == ins.count) begin rep <= '0; pc <= pc + 1'b1; end
            else rep <= rep + 1'b1;
          end
          CI_SETLOOP: begin lc <= ins.count; pc <= pc + 1'b1; end
          CI_LOOP: begin
            if (lc != 0) begin lc <= lc - 1'b1; pc <= ins.target[PC_W-1:0]; end
            else pc <= pc + 1'b1;
          end
          CI_BRRING, CI_BRQUIET, CI_SAMPLE: begin
            if (!wait_done) begin
              wcnt   <= wcnt + 1'b1;
              stalls <= stalls + 1;
            end else begin
              wcnt <= '0;
              if (ins.op == CI_SAMPLE) begin
                result    <= {result[30:0], cond};
                ring_snap <= ring_vec;
                pc        <= pc + 1'b1;
              end else if ((ins.op == CI_BRRING) == cond) pc <= ins.target[PC_W-1:0];
              else pc <= pc + 1'b1;
            end
          end
          CI_HALT: begin run <= 1'b0; done <= 1'b1; end
          default: pc <= pc + 1'b1;
        endcase
      end
    end
  end

endmodule
