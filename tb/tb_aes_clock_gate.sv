// tb_aes_clock_gate: the gated clock follows clk only in cycles whose
// enable was high before the rising edge, and an enable glitch while clk is
// high does not reach the gated clock.
module tb_aes_clock_gate;
  logic clk = 1'b0;
  logic en = 1'b0;
  logic gclk;
  int checks = 0, failures = 0;
  int gedges = 0;

  aes_clock_gate dut (.clk, .en, .gclk);

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int exp_edges = 0;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      en = 1'($urandom);
      if (en) exp_edges++;
      @(posedge clk);
      #1;
      chk(gclk === en, "gclk high exactly when enabled");
      // glitch on en during the high phase
      en = ~en;
      #1;
      chk(gclk === ~en, "glitch blocked while clk high");
      en = ~en;
      @(negedge clk);
      #1;
      chk(gclk === 1'b0, "gclk low while clk low");
    end
    chk(gedges == exp_edges, "gated edge count");
    $display("gated edges %0d of 200", gedges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
