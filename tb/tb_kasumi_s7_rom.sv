// tb_kasumi_s7_rom - checks the dual-port S7 ROM, in both clock-edge
// variants. Every address is read through both ports (port B reads the
// complement address). The table is checked against properties of the KASUMI
// S7 box that do not depend on the stored file: it must be a permutation of
// 0..127, its difference table must have no entry above 2 (S7 is almost
// perfect nonlinear), and its first and last entries are 54 and 3. The
// test also checks that each variant changes its outputs only on its own edge.
module tb_kasumi_s7_rom;
  localparam int N = 7;
  localparam int D = 128;

  logic clk = 1'b0;
  logic [N-1:0] addr_a, addr_b;
  logic [N-1:0] pa, pb, na, nb;
  logic [N-1:0] tab [D];
  logic [N-1:0] tab_b [D];   // port B, read at the complement address
  logic [N-1:0] pa_hold, na_hold;
  int checks = 0, failures = 0;

  kasumi_s7_rom #(.NEG_EDGE(1'b0)) dut_pos (.clk(clk), .addr_a(addr_a), .addr_b(addr_b),
                                             .data_a(pa), .data_b(pb));
  kasumi_s7_rom #(.NEG_EDGE(1'b1)) dut_neg (.clk(clk), .addr_a(addr_a), .addr_b(addr_b),
                                             .data_a(na), .data_b(nb));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    int seen [D];
    int ddt [D];
    int worst;
    addr_a = '0;
    addr_b = '1;
    @(posedge clk);
    for (int a = 0; a < D; a++) begin
      // Drive shortly after the rising edge; the falling-edge copy reads at
      // mid-cycle, the rising-edge copy at the next rising edge.
      #1;
      addr_a = N'(a);
      addr_b = ~N'(a);
      pa_hold = pa;
      @(negedge clk);
      #1;
      check(pa == pa_hold, "rising-edge ROM changed at the falling edge");
      tab[a] = na;
      tab_b[a] = nb;
      na_hold = na;
      @(posedge clk);
      #1;
      check(pa == tab[a], "rising-edge port A differs from falling-edge copy");
      check(pb == nb, "rising-edge port B differs from falling-edge copy");
      check(na == na_hold, "falling-edge ROM changed at the rising edge");
      @(negedge clk);
      @(posedge clk);
    end
    for (int a = 0; a < D; a++) check(tab_b[a] == tab[D-1-a], "port B differs from port A");
    foreach (seen[i]) seen[i] = 0;
    foreach (tab[i]) seen[tab[i]]++;
    foreach (seen[i]) check(seen[i] == 1, "table is not a permutation");
    worst = 0;
    for (int d = 1; d < D; d++) begin
      foreach (ddt[i]) ddt[i] = 0;
      for (int x = 0; x < D; x++) ddt[tab[x] ^ tab[x ^ d]]++;
      foreach (ddt[i]) if (ddt[i] > worst) worst = ddt[i];
    end
    check(worst == 2, "difference table maximum is not 2");
    check(tab[0] == N'(54) && tab[D-1] == N'(3), "first/last entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
