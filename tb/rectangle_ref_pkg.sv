// rectangle_ref_pkg -- reference model of RECTANGLE-80 for the testbenches.
//
// Written independently of the RTL: it works on flat bit vectors with explicit
// bit-index arithmetic (bit 16*r + c is row r, column c), takes the S-box from
// its lookup table rather than the Boolean formula, and takes the round
// constants from their published list rather than from an LFSR.
package rectangle_ref_pkg;

  localparam logic [3:0] SBOX_LUT [16] = '{
    4'h6, 4'h5, 4'hC, 4'hA, 4'h1, 4'hE, 4'h7, 4'h9,
    4'hB, 4'h0, 4'h3, 4'hD, 4'h8, 4'hF, 4'h4, 4'h2
  };

  localparam logic [4:0] RC_LIST [25] = '{
    5'h01, 5'h02, 5'h04, 5'h09, 5'h12, 5'h05, 5'h0B, 5'h16, 5'h0C, 5'h19,
    5'h13, 5'h07, 5'h0F, 5'h1F, 5'h1E, 5'h1C, 5'h18, 5'h11, 5'h03, 5'h06,
    5'h0D, 5'h1B, 5'h17, 5'h0E, 5'h1D
  };

  // S-box on columns 0..ncols-1 of the four lowest rows of v (other bits kept).
  function automatic logic [79:0] ref_sub(input logic [79:0] v, input int ncols);
    logic [79:0] r = v;
    for (int c = 0; c < ncols; c++) begin
      logic [3:0] i, o;
      for (int b = 0; b < 4; b++) i[b] = v[16*b + c];
      o = SBOX_LUT[i];
      for (int b = 0; b < 4; b++) r[16*b + c] = o[b];
    end
    return r;
  endfunction

  // Row r rotated left by n: output column c takes input column (c - n) mod 16.
  function automatic logic [15:0] ref_row_rol(input logic [79:0] v, input int row, input int n);
    logic [15:0] r;
    for (int c = 0; c < 16; c++) r[c] = v[16*row + ((c - n + 16) % 16)];
    return r;
  endfunction

  function automatic logic [63:0] ref_shift_row(input logic [63:0] v);
    logic [79:0] w = {16'h0, v};
    return {ref_row_rol(w, 3, 13), ref_row_rol(w, 2, 12), ref_row_rol(w, 1, 1), ref_row_rol(w, 0, 0)};
  endfunction

  function automatic logic [63:0] ref_round(input logic [63:0] st, input logic [63:0] sk);
    logic [79:0] s = ref_sub({16'h0, st ^ sk}, 16);
    return ref_shift_row(s[63:0]);
  endfunction

  function automatic logic [79:0] ref_key_step(input logic [79:0] k, input logic [4:0] rc);
    logic [79:0] s = ref_sub(k, 4);
    logic [15:0] n0, n3;
    n0 = ref_row_rol(s, 0, 8) ^ s[31:16];
    n0[4:0] ^= rc;
    n3 = ref_row_rol(s, 3, 12) ^ s[79:64];
    return {s[15:0], n3, s[63:48], s[47:32], n0};
  endfunction

  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [79:0] key);
    logic [63:0] st = pt;
    logic [79:0] k = key;
    for (int i = 0; i < 25; i++) begin
      st = ref_round(st, k[63:0]);
      k  = ref_key_step(k, RC_LIST[i]);
    end
    return st ^ k[63:0];
  endfunction

endpackage
