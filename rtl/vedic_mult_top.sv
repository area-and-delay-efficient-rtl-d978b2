// vedic_mult_top: the arithmetic module, holding both 4x4 Vedic multipliers
// side by side.
//
// The combinational multiplier (vedic_4x4) answers within the same cycle
// and is the small, slow-path version; the pipelined multiplier
// (vedic_4x4_pipe) takes a new operand pair every clock and returns its
// product four register ranks later. The two share no signals: each has its
// own ports, so either can be used, or both compared on the same operands.
//
// Interface:
//   a, b  (4 bits) -> q (8 bits)            combinational product
//   clk, rst_n, ld, a1, b1 (4 bits) -> q_pipe (8 bits)   pipelined product
// Timing: q follows a and b combinationally; q_pipe as in vedic_4x4_pipe.
//
// Grouping the 2x2, the 4x4 and the pipelined 4x4 modules into one
// arithmetic module follows the source; putting the two multipliers side by
// side with separate ports is this design's choice.
module vedic_mult_top (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q,
  input  logic       ld,
  input  logic [3:0] a1,
  input  logic [3:0] b1,
  output logic [7:0] q_pipe
);
  vedic_4x4 u_comb (
    .a(a),
    .b(b),
    .q(q)
  );

  vedic_4x4_pipe u_pipe (
    .clk  (clk),
    .rst_n(rst_n),
    .ld   (ld),
    .a1   (a1),
    .b1   (b1),
    .q    (q_pipe)
  );
endmodule
