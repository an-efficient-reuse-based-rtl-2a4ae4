// tb_kasumi_ctrl - checks the 12-state controller: the step/first sequence of
// the four round pairs, the done pulse exactly 12 edges after an accepted
// start, ready only in IDLE and S11, and back-to-back starts taken in S11.
module tb_kasumi_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic ready, load, busy, first, done;
  logic [1:0] step;
  int checks = 0, failures = 0;
  int pos = -1;            // model: cycles since the accepted start (-1 idle)
  int back_to_back = 0, from_idle = 0, dones = 0;

  kasumi_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .ready(ready), .load(load),
                   .busy(busy), .step(step), .first(first), .done(done));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%t %s: got %0b expected %0b (pos %0d)", $time, what, got, exp, pos);
    end
  endtask

  logic done_exp = 1'b0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      start = ($urandom % 4) == 0;
      #1;
      expect_eq(busy, pos >= 0, "busy");
      expect_eq(ready, pos < 0 || pos == 11, "ready");
      expect_eq(load, start && (pos < 0 || pos == 11), "load");
      expect_eq(first, pos == 0, "first");
      expect_eq(done, done_exp, "done");
      if (pos >= 0) begin
        checks++;
        if (step != 2'(pos % 3)) failures++;
      end
      if (load && pos == 11) back_to_back++;
      if (load && pos < 0) from_idle++;
      if (done) dones++;
      @(posedge clk);
      done_exp = (pos == 11);
      if (load)           pos = 0;
      else if (pos == 11) pos = -1;
      else if (pos >= 0)  pos++;
      @(negedge clk);
    end
    checks += 3;
    if (back_to_back == 0) failures++;
    if (from_idle == 0) failures++;
    if (dones == 0) failures++;
    $display("back-to-back starts %0d, starts from idle %0d, done pulses %0d", back_to_back, from_idle, dones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
