// tb_aes_mix_columns: published MixColumns column examples and random
// states against the reference matrix product.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  blk_t d, q;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.d, .q);

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
    if (q !== exp) begin failures++; $display("FAIL mix %h -> %h, expected %h", in, q, exp); end
  endtask

  initial begin
    chk(128'hdb135345_f20a225c_01010101_c6c6c6c6, 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6);
    chk(128'hd4d4d4d5_2d26314c_00000000_ffffffff, 128'hd5d5d7d6_4d7ebdf8_00000000_ffffffff);
    for (int n = 0; n < 300; n++) begin
      automatic blk_t r = rand_blk();
      chk(r, mix_columns(r, 1'b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
