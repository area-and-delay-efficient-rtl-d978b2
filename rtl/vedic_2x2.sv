// vedic_2x2: 2-bit by 2-bit Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier, the smallest building block of the Vedic multipliers here.
//
// The product is formed column by column. Vertical: q[0] = a[0]&b[0].
// Crosswise: a[1]&b[0] and a[0]&b[1] are added in a half adder, giving q[1]
// and a carry. Vertical again: a[1]&b[1] plus that carry in a second half
// adder gives q[2] and q[3]. Four AND gates and two half adders in all.
//
// Interface: a, b (2 bits each, unsigned), q (4 bits) = a*b.
// Timing: purely combinational.
//
// The sutra and the use of a 2x2 module as the base block follow the
// source description; the gate-level arrangement (four ANDs, two half adders)
// is the usual binary form of the sutra and is this design's choice.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic cross_c;

  assign q[0] = a[0] & b[0];

  half_adder u_cross (
    .a(a[1] & b[0]),
    .b(a[0] & b[1]),
    .s(q[1]),
    .c(cross_c)
  );

  half_adder u_vert (
    .a(a[1] & b[1]),
    .b(cross_c),
    .s(q[2]),
    .c(q[3])
  );
endmodule
