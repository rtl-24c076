// sum_mod4: adds two radix-4 digits modulo 4 (a 2-bit adder whose carry-out
// is dropped). It is the cell of the bank index generator tree.
// Combinational.
module sum_mod4 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] y
);
  assign y = a + b;
endmodule
