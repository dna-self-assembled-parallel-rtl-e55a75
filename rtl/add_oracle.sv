// add_oracle: the addition oracle. It holds one string of N tiles for every
// question "QA + QB = ?" with N-bit operands (2^(2N) strings); each string was
// assembled with its answer built in, so at run time nothing is computed, the
// oracle only finds the string whose question matches and reads its answer.
//
// Strings that failed to form during assembly are left out: bit {QB,QA} of
// FORMED says whether that string exists (default: all formed). A question
// whose string is missing gets no answer (`hit` low).
//
// Query sequence after `start` (operands sampled from qa/qb):
//   1 clock   clear every string's sum latches
//   N clocks  shift the operands into all strings at once, MSB first
//   1 clock   raise the input enable; the matching string reflects it as its
//             output enable and loads its sum bits; `hit` is captured
//   N clocks  shift the sum bits out of the bottom of every string; the
//             receiver ORs all strings' outputs (only the matching string
//             holds ones) and assembles `sum`, MSB first
// `done` pulses one clock later with `hit` and `sum` valid: 2N+3 clocks from
// the `start` clock to the `done` clock. `busy` is high in between.
//
// From the source: one string per question, serial query shift into all
// strings at once, IE/OE reflection, sum latches shifted down to the bottom of
// the string, incomplete assembly. This design's own choices: the sequencer,
// the clear step, and a wired-OR receiver in place of per-string ringers.
module add_oracle
  import oracle_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter logic [2**(2*N)-1:0] FORMED = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] qa,
  input  logic [N-1:0] qb,
  output logic         busy,
  output logic         done,
  output logic         hit,
  output logic [N-1:0] sum
);
  localparam int unsigned NSTR = 2**(2*N);

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_SHIFT, S_EVAL, S_OUT, S_DONE} state_e;
  state_e state;

  logic [N-1:0]          a_q, b_q;
  logic [$clog2(N)-1:0]  cnt;
  logic                  shift, ie, s_clr, s_shift;
  logic                  a_bit, b_bit;
  logic [NSTR-1:0]       str_hit, str_out;

  assign shift   = (state == S_SHIFT);
  assign ie      = (state == S_EVAL);
  assign s_clr   = (state == S_CLR);
  assign s_shift = (state == S_OUT);
  assign a_bit   = a_q[N-1];
  assign b_bit   = b_q[N-1];
  assign busy    = (state != S_IDLE);

  for (genvar q = 0; q < NSTR; q++) begin : g_str
    if (FORMED[q]) begin : g_formed
      add_string #(
        .N(N), .QA(q[N-1:0]), .QB(q[2*N-1:N])
      ) u_str (
        .clk, .rst_n, .shift, .a_in(a_bit), .b_in(b_bit), .ie, .s_clr, .s_shift,
        .hit(str_hit[q]), .s_out(str_out[q])
      );
    end else begin : g_missing
      assign str_hit[q] = 1'b0;
      assign str_out[q] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; a_q <= '0; b_q <= '0; cnt <= '0;
      hit <= 1'b0; sum <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_q <= qa; b_q <= qb; state <= S_CLR;
        end
        S_CLR: begin cnt <= '0; state <= S_SHIFT; end
        S_SHIFT: begin
          a_q <= a_q << 1; b_q <= b_q << 1;
          if (cnt == ($clog2(N))'(N-1)) begin cnt <= '0; state <= S_EVAL; end
          else cnt <= cnt + 1'b1;
        end
        S_EVAL: begin hit <= |str_hit; state <= S_OUT; end
        S_OUT: begin
          sum <= {sum[N-2:0], |str_out};
          if (cnt == ($clog2(N))'(N-1)) state <= S_DONE;
          else cnt <= cnt + 1'b1;
        end
        default: begin done <= 1'b1; state <= S_IDLE; end
      endcase
    end
  end

endmodule
