// tb_kasumi_fl - checks the FL function against the reference model with
// random operands and a few corner values.
module tb_kasumi_fl;
  import kasumi_ref_pkg::*;

  logic [31:0] x, y, exp_y;
  logic [15:0] kl1, kl2;
  logic [15:0] kl [2];
  int checks = 0, failures = 0;

  kasumi_fl dut (.x(x), .kl1(kl1), .kl2(kl2), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      if (n < 4) begin
        x   = (n[0]) ? '1 : '0;
        kl1 = (n[1]) ? '1 : '0;
        kl2 = 16'h8001;
      end else begin
        x   = $urandom;
        kl1 = 16'($urandom);
        kl2 = 16'($urandom);
      end
      kl[0] = kl1;
      kl[1] = kl2;
      #1;
      exp_y = fl(x, kl);
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FL mismatch x=%h kl=%h/%h got %h exp %h", x, kl1, kl2, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
