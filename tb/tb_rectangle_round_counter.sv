// tb_rectangle_round_counter -- the LFSR must step through the 25 published
// round constants after a load, raise 'done' exactly 25 clocks after the load
// edge, hold there, and restart on a new load.
module tb_rectangle_round_counter;
  import rectangle_pkg::*;
  import rectangle_ref_pkg::*;

  logic clk = 0, load = 0, done;
  rc_t  rc;
  int checks = 0, failures = 0;

  rectangle_round_counter dut (.clk(clk), .load(load), .rc(rc), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once(input int restart_after);
    load = 1;
    @(posedge clk);
    #1 load = 0;
    for (int i = 0; i < 25; i++) begin
      checks += 2;
      if (rc !== RC_LIST[i]) begin
        failures++;
        $display("FAIL round %0d rc=%h exp=%h", i, rc, RC_LIST[i]);
      end
      if (done) begin
        failures++;
        $display("FAIL done early at round %0d", i);
      end
      if (i == restart_after) return;
      @(posedge clk);
      #1;
    end
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL done not set after 25 rounds, rc=%h", rc);
    end
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (!done || rc !== RC_DONE) begin
      failures++;
      $display("FAIL counter did not hold at the end, rc=%h", rc);
    end
  endtask

  initial begin
    @(posedge clk);
    #1;
    run_once(-1);
    run_once(7);   // abandoned after 7 rounds
    run_once(-1);  // a new load restarts from RC_0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
