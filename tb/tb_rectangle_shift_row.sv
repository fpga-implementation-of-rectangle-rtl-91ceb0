// tb_rectangle_shift_row -- ShiftRow layer against the reference, with single
// bits walked through every position and random words.
module tb_rectangle_shift_row;
  import rectangle_pkg::*;
  import rectangle_ref_pkg::*;

  state_t din, dout;
  int checks = 0, failures = 0;

  rectangle_shift_row dut (.din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [63:0] v);
    din = v;
    #1;
    checks++;
    if (dout !== ref_shift_row(v)) begin
      failures++;
      $display("FAIL in=%h out=%h exp=%h", v, dout, ref_shift_row(v));
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) check_one(64'h1 << i);
    for (int i = 0; i < 200; i++) check_one({$urandom, $urandom});
    // Spot checks written out by hand: row 1 bit 15 -> bit 0 (rotate by 1),
    // row 2 bit 0 -> bit 12, row 3 bit 3 -> bit 0 (rotate by 13).
    din = 64'h0000_0000_8000_0000; #1; checks++;
    if (dout !== 64'h0000_0000_0001_0000) begin failures++; $display("FAIL row1 wrap"); end
    din = 64'h0000_0001_0000_0000; #1; checks++;
    if (dout !== 64'h0000_1000_0000_0000) begin failures++; $display("FAIL row2"); end
    din = 64'h0008_0000_0000_0000; #1; checks++;
    if (dout !== 64'h0001_0000_0000_0000) begin failures++; $display("FAIL row3"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
