// rectangle_sbox -- the 4-bit RECTANGLE S-box, in bit-sliced form.
//
// Input bit x[i] is the bit of row i in one column of the state (x[0] is the
// row-0 bit, the least significant bit of the S-box input); y[i] is the
// matching output bit. The S-box is computed with the twelve-step sequence of
// NOT / AND / OR / XOR operations that defines RECTANGLE's bit-slice
// implementation, which yields the table
//   in : 0 1 2 3 4 5 6 7 8 9 A B C D E F
//   out: 6 5 C A 1 E 7 9 B 0 3 D 8 F 4 2
// Purely combinational; no clock.
module rectangle_sbox (
  input  logic [3:0] x,
  output logic [3:0] y
);

  logic t1, t2, t3, t5, t6, t8, t9, t11;

  always_comb begin
    t1   = ~x[1];
    t2   = x[0] & t1;
    t3   = x[2] ^ x[3];
    y[0] = t2 ^ t3;
    t5   = x[3] | t1;
    t6   = x[0] ^ t5;
    y[1] = x[2] ^ t6;
    t8   = x[1] ^ x[2];
    t9   = t3 & t6;
    y[3] = t8 ^ t9;
    t11  = y[0] | t8;
    y[2] = t6 ^ t11;
  end

endmodule
