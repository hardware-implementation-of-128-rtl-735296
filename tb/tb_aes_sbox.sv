// tb_aes_sbox: exhaustive check of the forward S-box against the reference
// model, plus three entries of the published table.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] in, input logic [7:0] exp);
    a = in;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", in, y, exp);
    end
  endtask

  initial begin
    check(8'h00, 8'h63);
    check(8'h53, 8'hED);
    check(8'hFF, 8'h16);
    for (int i = 0; i < 256; i++) check(8'(i), sbox(8'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
