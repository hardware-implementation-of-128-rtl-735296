// tb_aes_shift_rows: the registered ShiftRows and InvShiftRows against the
// reference model, a few byte positions spelled out, one-cycle latency and
// hold while en is low.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic en;
  blk_t d, q, qi;
  int checks = 0, failures = 0;

  aes_shift_rows #(.INVERSE(1'b0)) dut     (.clk, .en, .d, .q);
  aes_shift_rows #(.INVERSE(1'b1)) dut_inv (.clk, .en, .d, .q(qi));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    blk_t held, heldi;
    // bytes numbered 00..0f from the top: ShiftRows moves byte 5 to byte 1
    en = 1'b1;
    d = 128'h000102030405060708090a0b0c0d0e0f;
    @(negedge clk);
    chk(q  === 128'h00050a0f04090e03080d02070c01060b, "ShiftRows byte map");
    chk(qi === 128'h000d0a0704010e0b0805020f0c090603, "InvShiftRows byte map");
    for (int n = 0; n < 100; n++) begin
      d = rand_blk();
      @(negedge clk);
      chk(q === shift_rows(d, 1'b0), "ShiftRows random");
      chk(qi === shift_rows(d, 1'b1), "InvShiftRows random");
    end
    held = q; heldi = qi;
    en = 1'b0;
    d = rand_blk();
    repeat (3) @(negedge clk);
    chk(q === held && qi === heldi, "hold while en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
