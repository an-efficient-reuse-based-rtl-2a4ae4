// tb_kasumi_top - end-to-end test of the KASUMI core at its default
// configuration. It first encrypts the 3GPP known-answer vector, then streams
// random keys and plaintexts with a valid/ready style driver (start_i is held
// until accepted, with random gaps). A scoreboard checks every ciphertext
// against the reference model, that done_o comes exactly 12 edges after the
// accepting edge, and that back-to-back blocks complete every 12 cycles. It
// counts each mechanism of the design and fails if one never occurred:
// back-to-back acceptance in the last state, acceptance from idle, start
// requests held off while busy, key changes between consecutive blocks, and
// key-scheduler ticks from the divide-by-three divider (four per block).
module tb_kasumi_top;
  import kasumi_ref_pkg::*;

  localparam int LATENCY = 12;
  localparam int NBLOCKS = 400;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start_i = 1'b0;
  logic [127:0] key_i = '0;
  logic [63:0]  pt_i = '0;
  logic         ready_o, done_o;
  logic [63:0]  ct_o;

  kasumi_top dut (.clk(clk), .rst_n(rst_n), .start_i(start_i), .key_i(key_i), .pt_i(pt_i),
                  .ready_o(ready_o), .done_o(done_o), .ct_o(ct_o));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int accepted = 0, completed = 0;
  int n_back_to_back = 0, n_from_idle = 0, n_held_off = 0, n_key_change = 0, n_ticks = 0;
  int n_stream_pairs = 0;
  int last_done = -100;
  logic [127:0] last_key = '0;
  logic [63:0]  exp_q [$];
  int           t_q [$];

  initial begin
    #((NBLOCKS * 20 + 200) * 10 * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", cycle, what);
    end
  endtask

  // Monitor and scoreboard, sampled just before each rising edge.
  always @(negedge clk) if (rst_n) begin
    if (done_o) begin
      check(exp_q.size() > 0, "done without a block in flight");
      if (exp_q.size() > 0) begin
        logic [63:0] e;
        int t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        check(ct_o == e, $sformatf("ciphertext %h, expected %h", ct_o, e));
        check(cycle - t == LATENCY, $sformatf("latency %0d, expected %0d", cycle - t, LATENCY));
        if (cycle - last_done == LATENCY) n_stream_pairs++;
        check(cycle - last_done >= LATENCY, "blocks closer than 12 cycles");
        last_done = cycle;
        completed++;
      end
    end
    if (dut.key_adv) n_ticks++;
    if (start_i && !ready_o) n_held_off++;
    if (start_i && ready_o) begin
      exp_q.push_back(accepted == 0 ? KAT_CT : kasumi(key_i, pt_i));
      if (accepted == 0) check(kasumi(key_i, pt_i) == KAT_CT, "reference model fails the known answer");
      t_q.push_back(cycle + 1);
      if (dut.u_ctrl.busy) n_back_to_back++;
      else                 n_from_idle++;
      if (accepted > 0 && key_i != last_key) n_key_change++;
      last_key = key_i;
      accepted++;
    end
  end

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    load_tables();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Known-answer block on its own.
    @(negedge clk);
    key_i = KAT_KEY;
    pt_i  = KAT_PT;
    start_i = 1'b1;
    @(negedge clk);
    start_i = 1'b0;
    repeat (LATENCY + 2) @(negedge clk);
    // Random traffic.
    while (accepted < NBLOCKS) begin
      if (!start_i || ready_o) begin
        // Previous request (if any) was taken at the last edge: new request.
        if ($urandom % 5 != 0) begin
          start_i = 1'b1;
          pt_i = {$urandom, $urandom};
          if ($urandom % 3 != 0) key_i = {$urandom, $urandom, $urandom, $urandom};
        end else begin
          start_i = 1'b0;
        end
      end
      @(negedge clk);
    end
    start_i = 1'b0;
    repeat (LATENCY + 3) @(negedge clk);

    check(completed == accepted, $sformatf("%0d blocks accepted, %0d completed", accepted, completed));
    check(n_ticks == 4 * accepted, $sformatf("%0d divider ticks for %0d blocks", n_ticks, accepted));
    check(n_back_to_back > 0, "no back-to-back acceptance");
    check(n_from_idle > 0, "no acceptance from idle");
    check(n_held_off > 0, "no start held off while busy");
    check(n_key_change > 0, "no key change between blocks");
    check(n_stream_pairs > 0, "no blocks completed 12 cycles apart");
    $display("blocks %0d: back-to-back %0d, from idle %0d, held-off cycles %0d, key changes %0d, key-scheduler ticks %0d, 12-cycle completions %0d",
             accepted, n_back_to_back, n_from_idle, n_held_off, n_key_change, n_ticks, n_stream_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
