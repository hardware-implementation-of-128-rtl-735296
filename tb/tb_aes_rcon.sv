// tb_aes_rcon: both round-constant tables against the printed values, and
// 00 outside rounds 1..10.
module tb_aes_rcon;
  logic [3:0] round;
  logic [7:0] rc, irc;
  int checks = 0, failures = 0;
  logic [7:0] exp_rc [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1B, 8'h36};

  aes_rcon #(.INVERSE(1'b0)) dut     (.round, .rc);
  aes_rcon #(.INVERSE(1'b1)) dut_inv (.round, .rc(irc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 16; j++) begin
      round = 4'(j);
      #1;
      checks += 2;
      if (j >= 1 && j <= 10) begin
        if (rc !== exp_rc[j - 1]) begin failures++; $display("FAIL RC[%0d] = %02h", j, rc); end
        if (irc !== exp_rc[10 - j]) begin failures++; $display("FAIL IRC[%0d] = %02h", j, irc); end
      end else begin
        if (rc !== 8'h00) begin failures++; $display("FAIL RC[%0d] = %02h", j, rc); end
        if (irc !== 8'h00) begin failures++; $display("FAIL IRC[%0d] = %02h", j, irc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
