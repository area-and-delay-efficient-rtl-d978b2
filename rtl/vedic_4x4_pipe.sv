// vedic_4x4_pipe: 4-bit by 4-bit Vedic multiplier with pipeline registers.
//
// Each operand is split into a high and a low 2-bit half, and the four
// half-by-half products come from four 2x2 Urdhva Tiryakbhyam multipliers
// (vedic_2x2). They are lined up at their weights in 8-bit words and summed
// in a two-level adder tree. Registers sit between the steps, so a new
// operand pair can enter on every clock:
//
//   stage 0  a_reg, b_reg   <- a1, b1 when ld = 1, otherwise held
//   stage 1  temp1 = aL*bL, temp2 = (aH*bL)<<2,
//            temp3 = (aL*bH)<<2, temp4 = (aH*bH)<<4     (four 2x2 products)
//   stage 2  s1_reg = temp1 + temp2, s2_reg = temp3 + temp4
//   stage 3  q      = s1_reg + s2_reg
//
// Interface: clk; rst_n, asynchronous and active low, clears every register;
// ld, load enable of the operand registers; a1, b1 (4 bits, unsigned);
// q (8 bits), registered product.
// Timing: a pair present at a1/b1 with ld = 1 at a rising edge appears on q
// after the third rising edge that follows (four register ranks from pins to
// q). One result per clock. With ld = 0 the operand registers hold, and after
// three more edges q holds the product of the held pair.
//
// The register ranks (operand registers, the four product words, the two
// partial sums and the output register), the three adders and the port
// names clk, rst, ld, a1, b1 and q follow the source's structural view and
// waveform. Which product pairs share the first-level adder, the reset style
// and polarity are this design's choices.
module vedic_4x4_pipe (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld,
  input  logic [3:0] a1,
  input  logic [3:0] b1,
  output logic [7:0] q
);
  logic [3:0] a_reg, b_reg;
  logic [3:0] p_ll, p_hl, p_lh, p_hh;
  logic [7:0] temp1, temp2, temp3, temp4;
  logic [7:0] s1_reg, s2_reg;

  // Stage 0: operand registers with load enable.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg <= '0;
      b_reg <= '0;
    end else if (ld) begin
      a_reg <= a1;
      b_reg <= b1;
    end
  end

  // Four 2x2 Vedic partial products.
  vedic_2x2 u_ll (.a(a_reg[1:0]), .b(b_reg[1:0]), .q(p_ll));
  vedic_2x2 u_hl (.a(a_reg[3:2]), .b(b_reg[1:0]), .q(p_hl));
  vedic_2x2 u_lh (.a(a_reg[1:0]), .b(b_reg[3:2]), .q(p_lh));
  vedic_2x2 u_hh (.a(a_reg[3:2]), .b(b_reg[3:2]), .q(p_hh));

  // Stage 1: partial products at their weights.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      temp1 <= '0;
      temp2 <= '0;
      temp3 <= '0;
      temp4 <= '0;
    end else begin
      temp1 <= {4'b0, p_ll};
      temp2 <= {2'b0, p_hl, 2'b0};
      temp3 <= {2'b0, p_lh, 2'b0};
      temp4 <= {p_hh, 4'b0};
    end
  end

  // Stage 2: first adder level.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_reg <= '0;
      s2_reg <= '0;
    end else begin
      s1_reg <= temp1 + temp2;
      s2_reg <= temp3 + temp4;
    end
  end

  // Stage 3: second adder level and output register. The full product fits
  // in 8 bits (15*15 = 225), so the sum never overflows.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= s1_reg + s2_reg;
  end
endmodule
