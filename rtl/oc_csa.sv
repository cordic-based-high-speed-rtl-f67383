// Carry-save adder (3:2) with an overflow-correcting full adder at the MSD.
//
// Bits 0..N-2 are plain full adders; the carry of bit i becomes bit i+1 of the
// carry vector and bit 0 of the carry vector is the free slot cin (used for
// the +1 of a two's complement negation). At the MSD the full adder's own
// carry is kept as the MSD of the carry vector, and the sum MSD becomes
// sum ^ msd_carry ^ carry_from_second_msd (two extra XORs). The value
// carry + sum is unchanged mod 2^N, and each output vector stays a two's
// complement number that can be shifted right with sign extension. This MSD
// adder is the longest path of the sine/cosine datapath. Combinational.
module oc_csa #(
  parameter int N = 19
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N-1:0] carry,
  output logic [N-1:0] sum
);

  logic [N-1:0] s, co;
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (c & (a ^ b));

  assign carry = {co[N-1], co[N-3:0], cin};
  assign sum   = {s[N-1] ^ co[N-1] ^ co[N-2], s[N-2:0]};

endmodule
