// tb_aes_inv_sbox: exhaustive check of the inverse S-box: every entry is
// the pre-image of the reference forward S-box.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_inv_sbox dut (.a, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = sbox(8'(i));
      #1;
      checks++;
      if (y !== 8'(i)) begin
        failures++;
        $display("FAIL inv_sbox(%02h) = %02h, expected %02h", a, y, i);
      end
    end
    a = 8'h63; #1; checks++; if (y !== 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
