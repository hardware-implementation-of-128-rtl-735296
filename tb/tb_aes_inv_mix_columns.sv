// tb_aes_inv_mix_columns: random states against the reference (0E 0B 0D
// 09) matrix product, and the published column example run backwards.
module tb_aes_inv_mix_columns;
  import aes_ref_pkg::*;
  blk_t d, q;
  int checks = 0, failures = 0;

  aes_inv_mix_columns dut (.d, .q);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input blk_t in, input blk_t exp);
    d = in;
    #1;
    checks++;
    if (q !== exp) begin failures++; $display("FAIL invmix %h -> %h, expected %h", in, q, exp); end
  endtask

  initial begin
    chk(128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, 128'hdb135345_f20a225c_01010101_c6c6c6c6);
    for (int n = 0; n < 300; n++) begin
      automatic blk_t r = rand_blk();
      chk(r, mix_columns(r, 1'b1));
      chk(mix_columns(r, 1'b0), r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
