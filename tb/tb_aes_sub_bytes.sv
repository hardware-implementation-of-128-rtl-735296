// tb_aes_sub_bytes: random states through SubBytes and InvSubBytes,
// compared with the reference model; the two instances must also undo
// each other.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  blk_t d, q, qi, qq;
  int checks = 0, failures = 0;

  aes_sub_bytes #(.INVERSE(1'b0)) dut     (.d(d), .q(q));
  aes_sub_bytes #(.INVERSE(1'b1)) dut_inv (.d(d), .q(qi));
  aes_sub_bytes #(.INVERSE(1'b1)) dut_rt  (.d(q), .q(qq));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      d = (n == 0) ? 128'h0 : rand_blk();
      #1;
      checks += 3;
      if (q !== sub_bytes(d, 1'b0)) begin failures++; $display("FAIL sub %h -> %h", d, q); end
      if (qi !== sub_bytes(d, 1'b1)) begin failures++; $display("FAIL invsub %h -> %h", d, qi); end
      if (qq !== d) begin failures++; $display("FAIL round trip %h", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
