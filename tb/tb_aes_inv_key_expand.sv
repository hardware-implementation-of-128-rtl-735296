// tb_aes_inv_key_expand: the reverse key schedule driven by the control
// unit from round key 10; in round r (phase 3) key_out must equal
// InvMixColumns(round key 10-r) for r < 10 and the cipher key in round 10.
module tb_aes_inv_key_expand;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // a real falling edge for the asynchronous reset
  logic start = 1'b0;
  ctrl_t ctrl;
  logic busy, done;
  blk_t last_key, key_out;
  int checks = 0, failures = 0;

  aes_ctrl u_ctrl (.clk, .rst_n, .start, .ctrl, .busy, .done);
  aes_inv_key_expand dut (.clk, .ctrl, .last_key, .key_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input blk_t key);
    rk_t rk = expand(key);
    int r = 0;
    last_key = rk[10];
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    last_key = rand_blk();
    while (!done) begin
      if (ctrl.p5) begin
        blk_t exp;
        r++;
        exp = (ctrl.round == 4'd10) ? rk[0] : mix_columns(rk[10 - ctrl.round], 1'b1);
        checks++;
        if (key_out !== exp) begin
          failures++;
          $display("FAIL round %0d key_out %h expected %h", ctrl.round, key_out, exp);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (r != 10) failures++;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int n = 0; n < 20; n++) run(rand_blk());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
