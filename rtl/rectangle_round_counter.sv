// rectangle_round_counter -- round-constant LFSR, doubling as the round counter.
//
// A 5-bit LFSR (rc4..rc0) -> (rc3, rc2, rc1, rc0, rc4 ^ rc2) produces the round
// constants RC_0 = 0x01, RC_1 = 0x02, ..., RC_24 = 0x1D. Loading sets it to
// RC_0; each enabled clock advances it one step. The value it reaches after
// RC_24 (0x1A) does not occur among the 25 constants, so 'done' is decoded
// from the LFSR itself and no separate round counter is needed. Once 'done'
// is high the LFSR holds until the next load.
// Timing: 'rc' is the constant for the round being computed in the current
// cycle; 'done' rises ROUNDS clock edges after the load edge.
module rectangle_round_counter
  import rectangle_pkg::*;
(
  input  logic clk,
  input  logic load,   // 1: start a new run (RC_0)
  output rc_t  rc,
  output logic done
);

  rc_t rc_q;

  assign rc   = rc_q;
  assign done = (rc_q == RC_DONE);

  always_ff @(posedge clk) begin
    if (load)
      rc_q <= RC_INIT;
    else if (!done)
      rc_q <= {rc_q[3:0], rc_q[4] ^ rc_q[2]};
  end

  // After a load the counter must start from RC_0.
  a_load_init : assert property (@(posedge clk) load |=> rc_q == RC_INIT);

endmodule
