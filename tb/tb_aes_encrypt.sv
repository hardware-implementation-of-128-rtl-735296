// tb_aes_encrypt: published AES-128 vectors and random blocks/keys against
// the reference model, with done rising 40 cycles after the start edge.
module tb_aes_encrypt;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // a real falling edge for the asynchronous reset
  logic start = 1'b0;
  blk_t plaintext, main_key, ciphertext, final_key;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_encrypt dut (.clk, .rst_n, .start, .plaintext, .main_key, .ciphertext, .final_key, .busy, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input blk_t pt, input blk_t key, input blk_t exp);
    int cyc = 0;
    plaintext = pt;
    main_key = key;
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    plaintext = rand_blk();
    main_key = rand_blk();
    while (!done && cyc < 200) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    checks += 3;
    if (cyc != 40) begin failures++; $display("FAIL latency %0d", cyc); end
    if (ciphertext !== exp) begin failures++; $display("FAIL %h -> %h expected %h", pt, ciphertext, exp); end
    if (final_key !== expand(key)[10]) begin failures++; $display("FAIL final key"); end
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int n = 0; n < 30; n++) begin
      automatic blk_t p = rand_blk(), k = rand_blk();
      run(p, k, encrypt(p, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
