// tb_rectangle_sbox -- exhaustive check of the bit-sliced S-box against the
// S-box lookup table (all 16 inputs).
module tb_rectangle_sbox;
  import rectangle_ref_pkg::*;

  logic [3:0] x, y;
  int checks = 0, failures = 0;

  rectangle_sbox dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (y !== SBOX_LUT[i]) begin
        failures++;
        $display("FAIL sbox(%h) = %h, expected %h", x, y, SBOX_LUT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
