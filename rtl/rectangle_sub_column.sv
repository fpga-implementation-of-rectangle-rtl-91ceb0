// rectangle_sub_column -- SubColumn layer: S-boxes applied to state columns.
//
// The 4 x 16 array is read column by column: column j is the 4-bit word
// {row3[j], row2[j], row1[j], row0[j]} (row 0 is the low bit). The S-box
// (rectangle_sbox) replaces columns 0 .. NCOLS-1 and the remaining columns
// pass through unchanged. The round transformation uses NCOLS = 16 (all 64
// bits through 16 parallel S-boxes); the key schedule uses NCOLS = 4 on the
// top four rows of the key state (its four rightmost columns).
// Purely combinational.
module rectangle_sub_column
  import rectangle_pkg::*;
#(
  parameter int unsigned NCOLS = 16
) (
  input  state_t din,
  output state_t dout
);

  for (genvar j = 0; j < ROW_W; j++) begin : g_col
    if (j < NCOLS) begin : g_sbox
      logic [3:0] col_in, col_out;
      assign col_in = {din[3][j], din[2][j], din[1][j], din[0][j]};
      rectangle_sbox u_sbox (.x(col_in), .y(col_out));
      assign dout[0][j] = col_out[0];
      assign dout[1][j] = col_out[1];
      assign dout[2][j] = col_out[2];
      assign dout[3][j] = col_out[3];
    end else begin : g_pass
      assign dout[0][j] = din[0][j];
      assign dout[1][j] = din[1][j];
      assign dout[2][j] = din[2][j];
      assign dout[3][j] = din[3][j];
    end
  end

endmodule
