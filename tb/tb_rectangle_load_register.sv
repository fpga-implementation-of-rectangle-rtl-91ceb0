// tb_rectangle_load_register -- Read has priority over Iteration, Iteration
// needs 'en', and the register holds otherwise. Random stimulus against a
// model register, at the 80-bit key width and the default 64-bit width.
module tb_rectangle_load_register;

  logic clk = 0, load, en;
  logic [79:0] load_d, iter_d, q80, m80;
  logic [63:0] q64, m64;
  int checks = 0, failures = 0;
  int n_load = 0, n_iter = 0, n_hold = 0;

  rectangle_load_register #(.WIDTH(80)) dut80 (
    .clk(clk), .load(load), .en(en), .load_d(load_d), .iter_d(iter_d), .q(q80)
  );
  rectangle_load_register dut64 (
    .clk(clk), .load(load), .en(en), .load_d(load_d[63:0]), .iter_d(iter_d[63:0]), .q(q64)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1; en = 0;
    load_d = '0; iter_d = '0;
    @(posedge clk);
    m80 = '0; m64 = '0;
    for (int i = 0; i < 500; i++) begin
      #1;
      load   = ($urandom % 4) == 0;
      en     = $urandom % 2;
      load_d = 80'({$urandom, $urandom, $urandom});
      iter_d = 80'({$urandom, $urandom, $urandom});
      @(posedge clk);
      if (load) begin
        m80 = load_d; m64 = load_d[63:0]; n_load++;
      end else if (en) begin
        m80 = iter_d; m64 = iter_d[63:0]; n_iter++;
      end else begin
        n_hold++;
      end
      #1;
      checks += 2;
      if (q80 !== m80) begin failures++; $display("FAIL q80=%h exp=%h", q80, m80); end
      if (q64 !== m64) begin failures++; $display("FAIL q64=%h exp=%h", q64, m64); end
    end
    checks++;
    if (n_load == 0 || n_iter == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL not every mode exercised: load=%0d iter=%0d hold=%0d", n_load, n_iter, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
