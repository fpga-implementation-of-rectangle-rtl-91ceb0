// tb_rectangle_sub_column -- SubColumn layer with all 16 columns (round
// function) and with 4 columns (key schedule), random and corner inputs,
// against the table-based reference.
module tb_rectangle_sub_column;
  import rectangle_pkg::*;
  import rectangle_ref_pkg::*;

  state_t din, dout16, dout4;
  int checks = 0, failures = 0;

  rectangle_sub_column dut16 (.din(din), .dout(dout16));
  rectangle_sub_column #(.NCOLS(4)) dut4 (.din(din), .dout(dout4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [63:0] v);
    logic [79:0] e16, e4;
    din = v;
    #1;
    e16 = ref_sub({16'h0, v}, 16);
    e4  = ref_sub({16'h0, v}, 4);
    checks += 2;
    if (dout16 !== e16[63:0]) begin
      failures++;
      $display("FAIL 16 cols in=%h out=%h exp=%h", v, dout16, e16[63:0]);
    end
    if (dout4 !== e4[63:0]) begin
      failures++;
      $display("FAIL 4 cols in=%h out=%h exp=%h", v, dout4, e4[63:0]);
    end
  endtask

  initial begin
    check_one(64'h0);
    check_one('1);
    for (int i = 0; i < 16; i++) check_one(64'h1 << (16 * (i % 4) + i));
    for (int i = 0; i < 500; i++) check_one({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
