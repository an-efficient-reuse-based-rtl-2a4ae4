// tb_kasumi_clkdiv3 - checks the divide-by-three divider: tick every third
// cycle while running, phase held while stopped, and restart at phase 0 on
// sync, against a simple counter model.
module tb_kasumi_clkdiv3;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, run = 1'b0;
  logic [1:0] phase;
  logic tick;
  int model = 0;
  int checks = 0, failures = 0, ticks = 0;

  kasumi_clkdiv3 dut (.clk(clk), .rst_n(rst_n), .sync(sync), .run(run),
                      .phase(phase), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (phase != 2'(model) || tick != (run && model == 2)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: phase %0d tick %0b, expected %0d", n, phase, tick, model);
      end
      if (tick) ticks++;
      // Next inputs: mostly running, occasional stall or resync.
      sync = ($urandom % 23) == 0;
      run  = (n < 300) ? 1'b1 : (($urandom % 7) != 0);
      @(posedge clk);
      if (sync)     model = 0;
      else if (run) model = (model + 1) % 3;
    end
    // In the first 300 cycles run is always high: close to a tick every three cycles.
    checks++;
    if (ticks < 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
