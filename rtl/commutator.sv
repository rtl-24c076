// commutator: routes the four PE ports A..D (s,t,u,v) to the four memory
// banks and back.
//
// The bank of port A is M, the bank index of address s. The other ports sit
// at a fixed offset from A, which depends on where the two symbol bits fall
// relative to the radix-4 digits of the address:
//  - symbol on a digit boundary (the "power-of-4" column of the published
//    commutator table): ports A,B,C,D go to banks M, M+1, M+2, M+3;
//  - symbol straddling two digits (the "first stage of non-power-of-4"
//    column): ports A,B,C,D go to banks M, M+2, M+1, M+3 (all mod 4).
// Both columns and all four M rows agree with that table. The same module
// serves as Commutator_write (TO_BANKS=1: bank[map(p)] = port[p]; used for
// write data and for the bank word addresses) and as Commutator_read
// (TO_BANKS=0: port[p] = bank[map(p)]). Combinational; the payload width W
// is a parameter.
module commutator #(
  parameter int unsigned W        = 32,
  parameter bit          TO_BANKS = 1'b1
) (
  input  logic [1:0]   bank_m,     // M1 M0: bank of port A
  input  logic         straddle,   // symbol straddles two radix-4 digits
  input  logic [W-1:0] din  [4],
  output logic [W-1:0] dout [4]
);
  logic [1:0] map [4];

  always_comb begin
    map[0] = bank_m;
    map[1] = bank_m + (straddle ? 2'd2 : 2'd1);
    map[2] = bank_m + (straddle ? 2'd1 : 2'd2);
    map[3] = bank_m + 2'd3;
  end

  always_comb begin
    for (int p = 0; p < 4; p++) dout[p] = '0;
    for (int p = 0; p < 4; p++) begin
      if (TO_BANKS) dout[map[p]] = din[p];
      else          dout[p]      = din[map[p]];
    end
  end
endmodule
