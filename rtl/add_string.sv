// add_string: one string of N addition tiles, the assembled instance
// "QA + QB = sum" of N-bit addition. Tile 0 (top of the string) holds the
// least significant bit. The tiles are chosen at elaboration by the carry
// rule: tile i is the truth-table line with carry-in f(i-1), operands QA[i]
// and QB[i], sum add_g(...) and carry-out add_f(...), with f(-1) = 0; only
// tiles whose carries fit can be neighbours, so the string can only be a
// correct sum. The final carry-out is not part of the answer: the sum is
// modulo 2^N.
//
// Run time: query bits enter tile 0 on `a_in`/`b_in` with `shift`, most
// significant bit first, so after N shifts tile i holds bit i. With `ie` high
// the input enable runs down the string and, if every tile matches, is
// reflected at the bottom as the output enable (`hit`, combinational); on that
// clock edge every tile loads its sum bit. `s_shift` then moves the sum bits
// down and out of the bottom at `s_out`, most significant bit first.
module add_string
  import oracle_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter logic [N-1:0] QA = '0,
  parameter logic [N-1:0] QB = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic a_in,
  input  logic b_in,
  input  logic ie,
  input  logic s_clr,
  input  logic s_shift,
  output logic hit,
  output logic s_out
);
  // assembly-time carries
  function automatic logic [N:0] carries();
    logic [N:0] c;
    c[0] = ADD_ALPHA;
    for (int i = 0; i < N; i++) c[i+1] = add_f(c[i], QA[i], QB[i]);
    return c;
  endfunction
  localparam logic [N:0] CARRY = carries();

  logic [N:0] a_c, b_c, ie_c, oe_c, s_c;

  assign a_c[0]  = a_in;
  assign b_c[0]  = b_in;
  assign ie_c[0] = ie;
  assign s_c[0]  = 1'b0;
  assign oe_c[N] = ie_c[N];   // reflection at the bottom of the string

  for (genvar i = 0; i < N; i++) begin : g_tile
    add_tile #(
      .A(QA[i]), .B(QB[i]), .S(add_g(CARRY[i], QA[i], QB[i]))
    ) u_tile (
      .clk, .rst_n, .shift,
      .a_in(a_c[i]), .b_in(b_c[i]), .a_out(a_c[i+1]), .b_out(b_c[i+1]),
      .ie_in(ie_c[i]), .ie_out(ie_c[i+1]),
      .oe_in(oe_c[i+1]), .oe_out(oe_c[i]),
      .s_clr, .s_shift, .s_in(s_c[i]), .s_out(s_c[i+1])
    );
  end

  assign hit   = oe_c[0];
  assign s_out = s_c[N];
endmodule
