// tb_rectangle_round_transform -- one full round (AddRoundKey, SubColumn,
// ShiftRow) and the whitened output, random state and subkey.
module tb_rectangle_round_transform;
  import rectangle_pkg::*;
  import rectangle_ref_pkg::*;

  state_t state, subkey, whitened, next_state;
  int checks = 0, failures = 0;

  rectangle_round_transform dut (
    .state(state), .subkey(subkey), .whitened(whitened), .next_state(next_state)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [63:0] s, input logic [63:0] k);
    state = s;
    subkey = k;
    #1;
    checks += 2;
    if (whitened !== (s ^ k)) begin
      failures++;
      $display("FAIL whitened s=%h k=%h got=%h", s, k, whitened);
    end
    if (next_state !== ref_round(s, k)) begin
      failures++;
      $display("FAIL round s=%h k=%h got=%h exp=%h", s, k, next_state, ref_round(s, k));
    end
  endtask

  initial begin
    // All-zero state and key: every column becomes S(0) = 6 (rows 1 and 2
    // all ones, rows 0 and 3 zero); rotation leaves rows of all ones alone.
    check_one(64'h0, 64'h0);
    checks++;
    if (next_state !== 64'h0000_FFFF_FFFF_0000) begin
      failures++;
      $display("FAIL zero round got=%h", next_state);
    end
    for (int i = 0; i < 500; i++) check_one({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
