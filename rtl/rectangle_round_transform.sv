// rectangle_round_transform -- one RECTANGLE round on the full 64-bit state.
//
// AddRoundKey XORs the cipher state with the round subkey (the top four rows
// of the key register); SubColumn then sends all 16 columns through 16 S-boxes
// in parallel, and ShiftRow rotates rows 1-3. The AddRoundKey result is also
// brought out on 'whitened': after the 25th round the same XOR with K_25 is
// the final key whitening, so that output is the ciphertext.
// Purely combinational: one call per clock cycle in rectangle_top.
module rectangle_round_transform
  import rectangle_pkg::*;
(
  input  state_t state,
  input  state_t subkey,
  output state_t whitened,
  output state_t next_state
);

  state_t substituted;

  assign whitened = state ^ subkey;

  rectangle_sub_column #(.NCOLS(ROW_W)) u_sub_column (
    .din (whitened),
    .dout(substituted)
  );

  rectangle_shift_row u_shift_row (
    .din (substituted),
    .dout(next_state)
  );

endmodule
