// tb_kasumi_key_sched - loads keys and steps the scheduler with adv pulses
// spaced three cycles apart, as in the core. For each of the four round pairs
// it checks that rk_odd/rk_even equal the reference keys of rounds 2p+1 and
// 2p+2, that they hold while adv is low, and that after four advances the
// scheduler is back at rounds 1 and 2 (key reuse without reload).
module tb_kasumi_key_sched;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic         clk = 1'b0;
  logic         load = 1'b0, adv = 1'b0;
  logic [127:0] key;
  round_keys_t  rk_odd, rk_even;
  int checks = 0, failures = 0;

  kasumi_key_sched dut (.clk(clk), .load(load), .key(key), .adv(adv),
                        .rk_odd(rk_odd), .rk_even(rk_even));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_set(input round_keys_t rk, input logic [127:0] kk, input int rnd);
    ref_rk_t e;
    e = round_keys(kk, rnd);
    checks++;
    if (rk.kl1 !== e.kl[0] || rk.kl2 !== e.kl[1] ||
        rk.fo.ko1 !== e.ko[0] || rk.fo.ko2 !== e.ko[1] || rk.fo.ko3 !== e.ko[2] ||
        rk.fo.ki1 !== e.ki[0] || rk.fo.ki2 !== e.ki[1] || rk.fo.ki3 !== e.ki[2]) begin
      failures++;
      if (failures < 10) $display("round %0d keys wrong (key %h)", rnd + 1, kk);
    end
  endtask

  initial begin
    for (int n = 0; n < 50; n++) begin
      key = (n == 0) ? KAT_KEY : {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk) load = 1'b1;
      @(negedge clk) load = 1'b0;
      key = ~key;  // the input may change once loaded
      for (int rep = 0; rep < 2; rep++) begin
        for (int p = 0; p < 4; p++) begin
          for (int c = 0; c < 3; c++) begin
            check_set(rk_odd, ~key, 2*p);
            check_set(rk_even, ~key, 2*p + 1);
            adv = (c == 2);
            @(negedge clk);
            adv = 1'b0;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
