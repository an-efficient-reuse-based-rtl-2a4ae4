// tb_kasumi_fi_dp - streams a new random operand pair into both ports of the
// dual-port FI on every cycle and checks each result one cycle later against
// the reference FI, confirming both the function and the one-cycle latency.
module tb_kasumi_fi_dp;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  logic [15:0] a_in, a_ki, b_in, b_ki, a_out, b_out;
  logic [15:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  kasumi_fi_dp dut (.clk(clk), .a_in(a_in), .a_ki(a_ki), .b_in(b_in), .b_ki(b_ki),
                    .a_out(a_out), .b_out(b_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_tables();
    a_in = '0; a_ki = '0; b_in = '0; b_ki = '0;
    @(posedge clk);
    #1;
    for (int n = 0; n < 5000; n++) begin
      a_in = 16'($urandom); a_ki = 16'($urandom);
      b_in = 16'($urandom); b_ki = 16'($urandom);
      if (n == 0) begin b_in = a_in; b_ki = a_ki; end  // both ports on one operand
      exp_a = fi(a_in, a_ki);
      exp_b = fi(b_in, b_ki);
      @(posedge clk);
      #1;
      checks += 2;
      if (a_out !== exp_a) begin
        failures++;
        if (failures < 10) $display("port A: FI(%h,%h) = %h, expected %h", a_in, a_ki, a_out, exp_a);
      end
      if (b_out !== exp_b) begin
        failures++;
        if (failures < 10) $display("port B: FI(%h,%h) = %h, expected %h", b_in, b_ki, b_out, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
