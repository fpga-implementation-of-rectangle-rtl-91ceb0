// rectangle_pkg -- types and constants shared by the RECTANGLE-80 encryption core.
//
// RECTANGLE keeps its 64-bit cipher state as a 4 x 16 array of bits and its
// 80-bit key state as a 5 x 16 array. Both are held here as packed arrays of
// 16-bit rows, row 0 in the least significant 16 bits, so that the flat
// 64-bit word w63..w0 has w15..w0 in row 0 and w63..w48 in row 3 and bit j of
// a row is column j. The round count (25) and the round-constant LFSR's start
// value (RC_0 = 0x01) come from the cipher definition; RC_DONE is the value
// the LFSR reaches one step after RC_24, which this design uses as its
// "finished" marker instead of a separate counter.
package rectangle_pkg;

  localparam int unsigned ROW_W      = 16;  // bits per row (columns)
  localparam int unsigned STATE_ROWS = 4;   // 64-bit block
  localparam int unsigned KEY_ROWS   = 5;   // 80-bit key
  localparam int unsigned BLOCK_W    = STATE_ROWS * ROW_W;
  localparam int unsigned KEY_W      = KEY_ROWS * ROW_W;
  localparam int unsigned ROUNDS     = 25;
  localparam int unsigned RC_W       = 5;

  typedef logic [ROW_W-1:0]                  row_t;
  typedef logic [STATE_ROWS-1:0][ROW_W-1:0]  state_t;  // also a 64-bit round subkey
  typedef logic [KEY_ROWS-1:0][ROW_W-1:0]    key_t;
  typedef logic [RC_W-1:0]                   rc_t;

  localparam rc_t RC_INIT = 5'h01;  // RC_0
  localparam rc_t RC_DONE = 5'h1A;  // LFSR value after RC_24 (never a round constant)

  // Left rotation of one 16-bit row.
  function automatic row_t rol(input row_t r, input int unsigned n);
    return row_t'((r << n) | (r >> (ROW_W - n)));
  endfunction

endpackage
