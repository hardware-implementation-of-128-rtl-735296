// tb_aes_key_expand: the pipelined key expansion driven by the control
// unit; every round key, sampled in phase 3, against the reference key
// schedule, and the final key against the published value for the
// 2b7e1516... key.
module tb_aes_key_expand;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // a real falling edge for the asynchronous reset
  logic start = 1'b0;
  ctrl_t ctrl;
  logic busy, done;
  blk_t main_key, round_key, final_key;
  int checks = 0, failures = 0;

  aes_ctrl u_ctrl (.clk, .rst_n, .start, .ctrl, .busy, .done);
  aes_key_expand dut (.clk, .ctrl, .main_key, .round_key, .final_key);

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
    main_key = key;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    main_key = rand_blk();  // key is only sampled on the load edge
    while (!done) begin
      if (ctrl.p5) begin
        r++;
        checks++;
        if (round_key !== rk[ctrl.round]) begin
          failures++;
          $display("FAIL round %0d key %h expected %h", ctrl.round, round_key, rk[ctrl.round]);
        end
      end
      @(negedge clk);
    end
    checks += 2;
    if (r != 10) failures++;
    if (final_key !== rk[10]) begin failures++; $display("FAIL final key %h", final_key); end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (final_key !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    for (int n = 0; n < 20; n++) run(rand_blk());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
