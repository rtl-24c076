// bank_index_gen: memory bank index of a 13-bit data address.
//
// The conflict-free four-bank partition gives each address the bank
//     M = (sum of its radix-4 digits) mod 4
// and keeps it at word address[12:2] inside that bank. The 13-bit address
// has seven radix-4 digits, the top one being the single bit A12. The sum
// is a three-level tree of Sum_Mod4 cells: {A11A10}+{A9A8}, {A7A6}+{A5A4},
// {A3A2}+{A1A0}; then {0,A12}+first and second+third; then the final sum,
// giving M1M0, as in the published bank index generator. Combinational.
module bank_index_gen
  import fft_pkg::*;
(
  input  logic [ADDR_W-1:0] addr,
  output logic [1:0]        bank      // M1 M0
);
  logic [1:0] l1_a, l1_b, l1_c, l2_a, l2_b;

  sum_mod4 u_l1a (.a(addr[11:10]), .b(addr[9:8]), .y(l1_a));
  sum_mod4 u_l1b (.a(addr[7:6]),   .b(addr[5:4]), .y(l1_b));
  sum_mod4 u_l1c (.a(addr[3:2]),   .b(addr[1:0]), .y(l1_c));
  sum_mod4 u_l2a (.a({1'b0, addr[12]}), .b(l1_a), .y(l2_a));
  sum_mod4 u_l2b (.a(l1_b),        .b(l1_c),      .y(l2_b));
  sum_mod4 u_l3  (.a(l2_a),        .b(l2_b),      .y(bank));
endmodule
