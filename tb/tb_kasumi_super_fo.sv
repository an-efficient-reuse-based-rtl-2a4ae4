// tb_kasumi_super_fo - runs random round pairs back to back through superFO
// (three steps each) and checks, in the first cycle of the following pair,
// li = FO_odd(x) xor r and z = FO_even(li) against the reference model. This
// also confirms the three-cycle rate: a new pair enters in the very cycle
// in which the previous pair's last FI results are consumed.
module tb_kasumi_super_fo;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic        clk = 1'b0;
  logic [1:0]  step;
  logic [31:0] x, r, li, z;
  fo_keys_t    fo_odd, fo_even;
  logic [31:0] exp_li, exp_z;
  logic [15:0] ko [3], ki [3];
  int checks = 0, failures = 0;

  kasumi_super_fo dut (.clk(clk), .step(step), .x(x), .r(r), .fo_odd(fo_odd),
                       .fo_even(fo_even), .li(li), .z(z));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_tables();
    step = 2'd0;
    x = '0; r = '0; fo_odd = '0; fo_even = '0;
    @(posedge clk);
    #1;
    for (int n = 0; n <= 2000; n++) begin
      if (n > 0) begin
        checks += 2;
        if (li !== exp_li) begin
          failures++;
          if (failures < 10) $display("pair %0d: li %h expected %h", n, li, exp_li);
        end
        if (z !== exp_z) begin
          failures++;
          if (failures < 10) $display("pair %0d: z %h expected %h", n, z, exp_z);
        end
      end
      if (n == 2000) break;
      x = $urandom;
      r = $urandom;
      fo_odd  = {$urandom, $urandom, $urandom};
      fo_even = {$urandom, $urandom, $urandom};
      ko = '{fo_odd.ko1, fo_odd.ko2, fo_odd.ko3};
      ki = '{fo_odd.ki1, fo_odd.ki2, fo_odd.ki3};
      exp_li = fo(x, ko, ki) ^ r;
      ko = '{fo_even.ko1, fo_even.ko2, fo_even.ko3};
      ki = '{fo_even.ki1, fo_even.ki2, fo_even.ki3};
      exp_z = fo(exp_li, ko, ki);
      for (int s = 0; s < 3; s++) begin
        step = 2'(s);
        @(posedge clk);
        #1;
        if (s == 0) begin x = ~x; r = ~r; end  // x and r are only read in step 0
      end
      step = 2'd0;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
