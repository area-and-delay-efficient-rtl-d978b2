// ut_column_adder: adds up one column of an Urdhva Tiryakbhyam product.
//
// A column k of an n x n product collects the NPP one-bit cross products
// a[i]&b[j] with i+j = k, plus the carry word handed over from column k-1.
// The column total is sum = (number of ones in pp) + cin. Its bit 0 is
// product bit k; sum >> 1 is the carry word for column k+1.
//
// Parameters: NPP (cross products in the column), CIN_W (carry-in width),
// SUM_W (result width, wide enough for NPP + 2**CIN_W - 1).
// Timing: purely combinational.
module ut_column_adder #(
  parameter int unsigned NPP   = 3,
  parameter int unsigned CIN_W = 1,
  parameter int unsigned SUM_W = 3
) (
  input  logic [NPP-1:0]   pp,
  input  logic [CIN_W-1:0] cin,
  output logic [SUM_W-1:0] sum
);
  always_comb begin
    sum = SUM_W'(cin);
    for (int unsigned i = 0; i < NPP; i++) begin
      sum = sum + SUM_W'(pp[i]);
    end
  end
endmodule
