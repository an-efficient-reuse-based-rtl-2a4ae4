// tb_kasumi_datapath - drives the two-round datapath the way the controller
// and key scheduler do (first/step sequence, round keys of rounds 2p+1 and
// 2p+2 during pair p) and checks the ciphertext in the cycle after the 12th
// processing cycle against the reference KASUMI, starting with the 3GPP
// known-answer vector. Blocks alternate between back-to-back issue (the next
// block's first cycle overlaps the previous block's result cycle) and gaps.
module tb_kasumi_datapath;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic        clk = 1'b0;
  logic        load = 1'b0, first = 1'b0;
  logic [1:0]  step = 2'd0;
  logic [63:0] pt, ct;
  round_keys_t rk_odd, rk_even;
  int checks = 0, failures = 0;

  kasumi_datapath dut (.clk(clk), .load(load), .pt(pt), .first(first), .step(step),
                       .rk_odd(rk_odd), .rk_even(rk_even), .ct(ct));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic round_keys_t to_rk(input ref_rk_t e);
    round_keys_t rk;
    rk.kl1 = e.kl[0]; rk.kl2 = e.kl[1];
    rk.fo.ko1 = e.ko[0]; rk.fo.ko2 = e.ko[1]; rk.fo.ko3 = e.ko[2];
    rk.fo.ki1 = e.ki[0]; rk.fo.ki2 = e.ki[1]; rk.fo.ki3 = e.ki[2];
    return rk;
  endfunction

  logic [127:0] key, next_key;
  logic [63:0]  exp_ct, prev_exp, next_pt;
  logic         pending = 1'b0;
  bit           overlap;

  task automatic check_ct(input int n, input logic [63:0] e);
    checks++;
    if (ct !== e) begin
      failures++;
      if (failures < 10) $display("block %0d: ct %h expected %h", n, ct, e);
    end
  endtask

  initial begin
    load_tables();
    @(posedge clk);
    #1;
    next_key = KAT_KEY;
    next_pt  = KAT_PT;
    // Separate load cycle for the first block.
    pt = next_pt;
    load = 1'b1;
    @(posedge clk);
    #1;
    load = 1'b0;
    for (int n = 0; n < 500; n++) begin
      key    = next_key;
      prev_exp = exp_ct;
      exp_ct = (n == 0) ? KAT_CT : kasumi(key, pt);
      next_key = {$urandom, $urandom, $urandom, $urandom};
      next_pt  = {$urandom, $urandom};
      overlap  = (n % 3) != 2;
      for (int s = 0; s < 12; s++) begin
        first   = (s == 0);
        step    = 2'(s % 3);
        rk_odd  = to_rk(round_keys(key, 2*(s/3)));
        rk_even = to_rk(round_keys(key, 2*(s/3) + 1));
        load    = (s == 11) && overlap;
        pt      = load ? next_pt : ~pt;
        #1;
        // In S0 of a back-to-back block the previous result is on ct.
        if (s == 0 && pending) check_ct(n - 1, prev_exp);
        @(posedge clk);
        #1;
        load = 1'b0;
      end
      pending = overlap;
      if (!overlap) begin
        // Result cycle with the datapath otherwise idle, then a gap.
        first   = 1'b0;
        step    = 2'd0;
        rk_odd  = ~rk_odd;          // the scheduler has moved on
        rk_even = ~rk_even;
        #1;
        check_ct(n, exp_ct);
        repeat (1 + n % 4) @(posedge clk);
        #1;
        pt = next_pt;
        load = 1'b1;
        @(posedge clk);
        #1;
        load = 1'b0;
      end
      pt = next_pt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
