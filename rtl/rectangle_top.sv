// rectangle_top -- round-iterative RECTANGLE-80 encryption core.
//
// Encrypts a 64-bit plaintext under an 80-bit key in 25 rounds, one round per
// clock cycle, with a 64-bit datapath. Two registers carry the work: the
// 64-bit cipher state and the 80-bit key state, each behind a 2:1 multiplexer
// that selects the external input (Read, 'load' = 1) or the next-round value
// (Iteration, 'load' = 0). Every cycle the round transformation
// (AddRoundKey with the top four key rows, 16 parallel S-boxes, ShiftRow)
// and the key-schedule step (4 S-boxes, row Feistel, round constant) run
// side by side. A 5-bit LFSR gives the round constants and marks completion.
// The ciphertext is the AddRoundKey output itself: after 25 rounds the key
// register holds K_25, and state ^ K_25 is the final whitening.
//
// Interface: clk; load, plaintext[63:0], key[79:0]; ciphertext[63:0], done.
// Register count is 64 + 80 + 5 = 149 flip-flops; there is no reset pin.
// Timing: hold 'load' high for at least one rising edge with plaintext and
// key valid. 'done' goes high 25 rising edges after the last load edge, and
// 'ciphertext' is valid while 'done' is high; the core then holds its result
// until the next load. Raising 'load' during a run restarts it.
// Bit order: plaintext[15:0] is row 0 of the state, key[15:0] row 0 of the
// key state.
module rectangle_top
  import rectangle_pkg::*;
(
  input  logic               clk,
  input  logic               load,
  input  logic [BLOCK_W-1:0] plaintext,
  input  logic [KEY_W-1:0]   key,
  output logic [BLOCK_W-1:0] ciphertext,
  output logic               done
);

  state_t state_q, whitened, state_next;
  key_t   key_q, key_next;
  rc_t    rc;

  rectangle_round_counter u_round_counter (
    .clk (clk),
    .load(load),
    .rc  (rc),
    .done(done)
  );

  rectangle_load_register #(.WIDTH(BLOCK_W)) u_state_reg (
    .clk   (clk),
    .load  (load),
    .en    (!done),
    .load_d(plaintext),
    .iter_d(state_next),
    .q     (state_q)
  );

  rectangle_load_register #(.WIDTH(KEY_W)) u_key_reg (
    .clk   (clk),
    .load  (load),
    .en    (!done),
    .load_d(key),
    .iter_d(key_next),
    .q     (key_q)
  );

  rectangle_round_transform u_round (
    .state     (state_q),
    .subkey    (state_t'(key_q[3:0])),
    .whitened  (whitened),
    .next_state(state_next)
  );

  rectangle_key_update u_key_update (
    .key     (key_q),
    .rc      (rc),
    .key_next(key_next)
  );

  assign ciphertext = whitened;

  // Once finished, the core keeps its result until the next load.
  a_done_holds : assert property (@(posedge clk) done && !load |=> done && $stable(ciphertext));

endmodule
