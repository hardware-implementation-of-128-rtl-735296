// tb_aes_decrypt: published AES-128 vectors run backwards and random
// blocks/keys against the reference inverse cipher, given round key 10 as
// the key, with done rising 40 cycles after the start edge.
module tb_aes_decrypt;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // a real falling edge for the asynchronous reset
  logic start = 1'b0;
  blk_t ciphertext, last_key, plaintext;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_decrypt dut (.clk, .rst_n, .start, .ciphertext, .last_key, .plaintext, .busy, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input blk_t ct, input blk_t key, input blk_t exp);
    int cyc = 0;
    ciphertext = ct;
    last_key = expand(key)[10];
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    ciphertext = rand_blk();
    last_key = rand_blk();
    while (!done && cyc < 200) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    checks += 2;
    if (cyc != 40) begin failures++; $display("FAIL latency %0d", cyc); end
    if (plaintext !== exp) begin failures++; $display("FAIL %h -> %h expected %h", ct, plaintext, exp); end
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    run(128'h3925841d02dc09fbdc118597196a0b32, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3243f6a8885a308d313198a2e0370734);
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f,
        128'h00112233445566778899aabbccddeeff);
    for (int n = 0; n < 30; n++) begin
      automatic blk_t c = rand_blk(), k = rand_blk();
      run(c, k, decrypt(c, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
