// rectangle_shift_row -- ShiftRow (P) layer of RECTANGLE.
//
// Rotates each 16-bit row left: row 0 by 0, row 1 by 1, row 2 by 12 and
// row 3 by 13 bit positions. Only wiring; purely combinational.
module rectangle_shift_row
  import rectangle_pkg::*;
(
  input  state_t din,
  output state_t dout
);

  assign dout[0] = din[0];
  assign dout[1] = rol(din[1], 1);
  assign dout[2] = rol(din[2], 12);
  assign dout[3] = rol(din[3], 13);

endmodule
