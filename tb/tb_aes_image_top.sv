// tb_aes_image_top: end-to-end image test of the whole engine at its only
// configuration.
//
// A 32 x 32 8-bit grey-scale test image (a gradient with a bright disc) is
// generated here, cut into 64 blocks of 16 pixels and encrypted block by
// block; each ciphertext is compared with the reference model. Every
// ciphertext is handed to the decryption core (with the last round key the
// encryption core produced) while the encryption core works on the next
// block, and the recovered pixels must equal the original image. The test
// also checks the 40-cycle latency of every block, that the whole image
// takes under 1.25 ms at 441.5 MHz, that a start pulse
// during a block is ignored, that both gated clocks are stopped while their
// core is idle, that MixColumns is bypassed with its input isolated in the
// last round of each block, and that the cipher image's histogram is spread
// out. Each of these mechanisms is counted and must occur.
module tb_aes_image_top;
  import aes_ref_pkg::*;
  localparam int W = 32, H = 32, NBLK = W * H / 16;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // a real falling edge for the asynchronous reset
  logic enc_start = 1'b0, dec_start = 1'b0;
  blk_t enc_plaintext, enc_key, enc_ciphertext, enc_final_key;
  blk_t dec_ciphertext, dec_key, dec_plaintext;
  logic enc_busy, enc_done, dec_busy, dec_done;
  int checks = 0, failures = 0;

  logic [7:0] image  [W * H];
  logic [7:0] cipher [W * H];
  logic [7:0] plain  [W * H];

  aes_image_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_enc_gated = 0, n_dec_gated = 0, n_bypass_isolated = 0, n_both_busy = 0;
  int n_ignored_start = 0, n_total_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    n_total_cycles++;
    if (!dut.enc_gclk) n_enc_gated++;
    if (!dut.dec_gclk) n_dec_gated++;
    if (dut.u_enc.ctrl.p3 && !dut.u_enc.ctrl.p4 && dut.u_enc.u_mix.d == '0) n_bypass_isolated++;
    if (enc_busy && dec_busy) n_both_busy++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic blk_t get_blk(input int b);
    blk_t v;
    for (int i = 0; i < 16; i++) v[127 - 8 * i -: 8] = image[16 * b + i];
    return v;
  endfunction

  // decryption side: runs one block behind the encryption
  int dec_blocks = 0;
  task automatic decrypt_block(input int b, input blk_t ct, input blk_t key);
    int cyc = 0;
    dec_ciphertext = ct;
    dec_key = key;
    dec_start = 1'b1;
    @(posedge clk);
    #1;
    dec_start = 1'b0;
    while (!dec_done && cyc < 200) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    chk(cyc == 40, $sformatf("decryption latency %0d", cyc));
    for (int i = 0; i < 16; i++) plain[16 * b + i] = dec_plaintext[127 - 8 * i -: 8];
    dec_blocks++;
  endtask

  initial begin
    blk_t key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    blk_t rk10 = expand(key)[10];
    int hist [256];
    int distinct = 0, maxbin = 0, orig_distinct = 0;
    int ohist [256];

    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int dx = x - 16, dy = y - 12;
        image[y * W + x] = (dx * dx + dy * dy < 64) ? 8'hF0 : 8'(x * 4 + y);
      end

    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    chk(!enc_busy && !dec_busy, "idle after reset");

    for (int b = 0; b < NBLK; b++) begin
      automatic int cyc = 0;
      automatic blk_t pt = get_blk(b);
      enc_plaintext = pt;
      enc_key = key;
      enc_start = 1'b1;
      @(posedge clk);
      #1;
      enc_start = 1'b0;
      fork
        begin
          while (!enc_done && cyc < 200) begin
            @(posedge clk);
            #1;
            cyc++;
            if (b == 5 && cyc == 17) begin
              // a start in the middle of a block must be ignored
              enc_start = 1'b1;
              enc_plaintext = ~pt;
              n_ignored_start++;
            end else begin
              enc_start = 1'b0;
            end
          end
        end
        if (b > 0) begin
          automatic blk_t prev;
          for (int i = 0; i < 16; i++) prev[127 - 8 * i -: 8] = cipher[16 * (b - 1) + i];
          decrypt_block(b - 1, prev, rk10);
        end
      join
      chk(cyc == 40, $sformatf("encryption latency %0d, block %0d", cyc, b));
      chk(enc_ciphertext === encrypt(pt, key), $sformatf("ciphertext of block %0d", b));
      chk(enc_final_key === rk10, "final key");
      for (int i = 0; i < 16; i++) cipher[16 * b + i] = enc_ciphertext[127 - 8 * i -: 8];
      // leave the encryption core idle for a few cycles now and then
      if (b % 8 == 7) repeat (5) @(posedge clk);
      #1;
    end
    begin
      blk_t last;
      for (int i = 0; i < 16; i++) last[127 - 8 * i -: 8] = cipher[16 * (NBLK - 1) + i];
      decrypt_block(NBLK - 1, last, enc_final_key);
    end

    // image round trip
    begin
      int bad = 0;
      for (int i = 0; i < W * H; i++) if (plain[i] !== image[i]) bad++;
      chk(bad == 0, $sformatf("%0d pixels differ after decryption", bad));
      chk(dec_blocks == NBLK, "all blocks decrypted");
    end

    // histograms
    for (int v = 0; v < 256; v++) begin hist[v] = 0; ohist[v] = 0; end
    for (int i = 0; i < W * H; i++) begin hist[cipher[i]]++; ohist[image[i]]++; end
    for (int v = 0; v < 256; v++) begin
      if (hist[v] != 0) distinct++;
      if (ohist[v] != 0) orig_distinct++;
      if (hist[v] > maxbin) maxbin = hist[v];
    end
    $display("histogram: original %0d grey levels, cipher %0d levels, largest cipher bin %0d",
             orig_distinct, distinct, maxbin);
    chk(distinct >= 200 && maxbin <= 16, "cipher histogram spread out");

    $display("image %0dx%0d: %0d blocks, %0d cycles (enc clock gated %0d, dec clock gated %0d, both busy %0d)",
             W, H, NBLK, n_total_cycles, n_enc_gated, n_dec_gated, n_both_busy);
    $display("mechanisms: bypass+isolation %0d, ignored start %0d", n_bypass_isolated, n_ignored_start);
    // the whole image must take well under 1.25 ms at 441.5 MHz
    $display("image time at 441.5 MHz: %0.2f us", real'(n_total_cycles) / 441.5);
    chk(real'(n_total_cycles) / 441.5e6 < 1.25e-3, "image encrypted within 1.25 ms at 441.5 MHz");
    chk(n_total_cycles < 64 * 41 + 200, "about 41 cycles per block");
    chk(n_enc_gated > 0, "encryption clock gated at least once");
    chk(n_dec_gated > 0, "decryption clock gated at least once");
    chk(n_both_busy > 0, "both cores busy together");
    chk(n_bypass_isolated >= NBLK, "MixColumns bypassed and isolated in every last round");
    chk(n_ignored_start == 1, "start during a block issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
