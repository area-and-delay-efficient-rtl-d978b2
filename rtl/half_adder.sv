// half_adder: one-bit half adder, sum = a ^ b, carry = a & b.
// The basic cell of the Urdhva Tiryakbhyam (vertically and crosswise)
// multipliers in this directory: the 2x2 multiplier uses two of them, the
// combinational 4x4 multiplier uses one on its second product column and one
// on its last. Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
