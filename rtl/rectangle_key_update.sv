// rectangle_key_update -- one step of the RECTANGLE-80 key schedule.
//
// The 80-bit key state is five 16-bit rows. One step:
//   1. the four rightmost columns (0..3) of rows 0..3 go through four S-boxes;
//      row 4 and columns 4..15 pass unchanged;
//   2. a one-round generalised Feistel transform on the rows:
//        row0' = (row0 <<< 8) ^ row1      row1' = row2      row2' = row3
//        row3' = (row3 <<< 12) ^ row4     row4' = row0
//   3. the round constant rc is XORed into the five rightmost bits of row 0.
// The top four rows of the key state are the current round subkey.
// Purely combinational.
//
// Step 2 takes row 3, not row 0, as the source of the 12-bit rotation. This
// is what the cipher's datapath drawing shows and what reproduces the known
// RECTANGLE-80 test vectors; a formula that rotates row 0 instead would give
// a different cipher.
module rectangle_key_update
  import rectangle_pkg::*;
(
  input  key_t key,
  input  rc_t  rc,
  output key_t key_next
);

  state_t top_in, top_sub;
  key_t   sub;

  assign top_in = state_t'(key[3:0]);

  rectangle_sub_column #(.NCOLS(4)) u_sub_column (
    .din (top_in),
    .dout(top_sub)
  );

  always_comb begin
    sub[3:0] = top_sub;
    sub[4]   = key[4];

    key_next[0] = rol(sub[0], 8) ^ sub[1];
    key_next[1] = sub[2];
    key_next[2] = sub[3];
    key_next[3] = rol(sub[3], 12) ^ sub[4];
    key_next[4] = sub[0];

    key_next[0][RC_W-1:0] = key_next[0][RC_W-1:0] ^ rc;
  end

endmodule
