// tb_aes_ctrl: the control unit's schedule: done 40 edges after the start edge,
// each phase strobe once per round, MixColumns bypass only in round 10,
// Outkey strobe only at the end, a start while busy ignored, strobes quiet
// while idle.
module tb_aes_ctrl;
  import aes_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // a real falling edge for the asynchronous reset
  logic start = 1'b0;
  ctrl_t ctrl;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_ctrl dut (.clk, .rst_n, .start, .ctrl, .busy, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 3; blk++) begin
      automatic int cyc = 0, n1 = 0, n2 = 0, n3 = 0, n5 = 0, n7 = 0, n8 = 0, n9 = 0, n10 = 0, nbypass = 0;
      @(negedge clk);
      chk(!busy && ctrl.p1 == 0 && ctrl.p5 == 0 && ctrl.p7 == 0, "idle strobes quiet");
      start = 1'b1;
      #1;
      chk(ctrl.p0 && ctrl.p7 && !ctrl.p6, "load strobes");
      @(negedge clk);
      start = (blk == 1);  // hold start high: must not restart
      while (!done) begin
        cyc++;
        chk($onehot0({ctrl.p1, ctrl.p2, ctrl.p3, ctrl.p5}), "one data phase at a time");
        chk(ctrl.p0 == 0, "no reload while busy");
        n1 += ctrl.p1; n2 += ctrl.p2; n3 += ctrl.p3; n5 += ctrl.p5;
        n7 += ctrl.p7; n8 += ctrl.p8; n9 += ctrl.p9; n10 += ctrl.p10;
        if (ctrl.p5 && !ctrl.p4) begin
          nbypass++;
          chk(ctrl.round == 4'd10, "bypass only in round 10");
        end
        if (ctrl.p1) chk(ctrl.phase == 4'b0001, "phase 0 one-hot");
        if (ctrl.p5) chk(ctrl.phase == 4'b1000, "phase 3 one-hot");
        if (ctrl.p10) chk(ctrl.round == 4'd10 && ctrl.p5, "Outkey in round 10 phase 3");
        @(negedge clk);
        if (cyc > 100) break;
      end
      start = 1'b0;
      chk(cyc == 40, $sformatf("done after start edge + 40 cycles (got %0d)", cyc));
      chk(n1 == 10 && n2 == 10 && n3 == 10 && n5 == 10, "one strobe per round");
      chk(n7 == 10 && n8 == 10 && n9 == 10 && n10 == 1, "key strobes");
      chk(nbypass == 1, "one bypass");
      chk(busy, "busy during done");
      @(negedge clk);
      chk(!busy && !done, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
