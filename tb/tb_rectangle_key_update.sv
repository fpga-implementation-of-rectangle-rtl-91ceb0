// tb_rectangle_key_update -- one key-schedule step on random keys and
// constants, then a chain of 25 steps from the all-zero key.
module tb_rectangle_key_update;
  import rectangle_pkg::*;
  import rectangle_ref_pkg::*;

  key_t key, key_next;
  rc_t  rc;
  int checks = 0, failures = 0;

  rectangle_key_update dut (.key(key), .rc(rc), .key_next(key_next));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [79:0] k, input logic [4:0] c);
    key = k;
    rc = c;
    #1;
    checks++;
    if (key_next !== ref_key_step(k, c)) begin
      failures++;
      $display("FAIL k=%h rc=%h got=%h exp=%h", k, c, key_next, ref_key_step(k, c));
    end
  endtask

  initial begin
    logic [79:0] k;
    for (int i = 0; i < 500; i++) check_one(80'({$urandom, $urandom, $urandom}), 5'($urandom));
    k = '0;
    for (int i = 0; i < 25; i++) begin
      check_one(k, RC_LIST[i]);
      k = key_next;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
