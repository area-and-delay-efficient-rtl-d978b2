// vedic_4x4: combinational 4-bit by 4-bit Urdhva Tiryakbhyam multiplier
// (the multiplier without pipeline).
//
// Sixteen AND gates form every cross product a[i]&b[j]. The product is then
// built column by column, each column adding its cross products ("vertically
// and crosswise") and the carry word of the column before it:
//
//   column 0  a0b0                              -> q[0]          (AND only)
//   column 1  a1b0 a0b1                         -> half adder
//   column 2  a2b0 a1b1 a0b2        + carry(1b) -> column adder
//   column 3  a3b0 a2b1 a1b2 a0b3   + carry(2b) -> column adder
//   column 4  a3b1 a2b2 a1b3        + carry(2b) -> column adder
//   column 5  a3b2 a2b3             + carry(2b) -> column adder
//   column 6  a3b3                  + carry(2b) -> half adder, q[7] = OR
//
// Column 5 hands on a carry of at most 2, so column 6 totals at most 3: a
// half adder on a3b3 and the carry's low bit gives q[6], and q[7] is the OR of
// its carry and the carry's high bit (both can never be 1 together).
//
// Interface: a, b (4 bits, unsigned), q (8 bits) = a*b.
// Timing: purely combinational; the longest path runs through all six
// columns in turn.
//
// The arrangement follows the structural view of the unpipelined design:
// sixteen AND gates, a small adder at each end of the column chain and four
// column adders in a staircase between them. How each column adder is built
// inside is this design's choice.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);
  // pp[i][j] = a[i] & b[j]
  logic [3:0][3:0] pp;
  logic            c1;
  logic [2:0]      s2, s3, s4, s5;
  logic            c6;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        pp[i][j] = a[i] & b[j];
      end
    end
  end

  assign q[0] = pp[0][0];

  half_adder u_col1 (.a(pp[1][0]), .b(pp[0][1]), .s(q[1]), .c(c1));

  ut_column_adder #(.NPP(3), .CIN_W(1), .SUM_W(3)) u_col2 (
    .pp ({pp[2][0], pp[1][1], pp[0][2]}),
    .cin(c1),
    .sum(s2)
  );
  ut_column_adder #(.NPP(4), .CIN_W(2), .SUM_W(3)) u_col3 (
    .pp ({pp[3][0], pp[2][1], pp[1][2], pp[0][3]}),
    .cin(s2[2:1]),
    .sum(s3)
  );
  ut_column_adder #(.NPP(3), .CIN_W(2), .SUM_W(3)) u_col4 (
    .pp ({pp[3][1], pp[2][2], pp[1][3]}),
    .cin(s3[2:1]),
    .sum(s4)
  );
  ut_column_adder #(.NPP(2), .CIN_W(2), .SUM_W(3)) u_col5 (
    .pp ({pp[3][2], pp[2][3]}),
    .cin(s4[2:1]),
    .sum(s5)
  );

  assign q[2] = s2[0];
  assign q[3] = s3[0];
  assign q[4] = s4[0];
  assign q[5] = s5[0];

  half_adder u_col6 (.a(pp[3][3]), .b(s5[1]), .s(q[6]), .c(c6));
  assign q[7] = c6 | s5[2];
endmodule
