// tb_kasumi_round_keys - checks one round-key generator against the key
// schedule of the reference model. The inputs are the key words rotated left
// by i words (as the key scheduler supplies them for round i+1), so every
// round's key set is checked for many random keys.
module tb_kasumi_round_keys;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic [127:0] key, k, kp;
  round_keys_t  rk;
  ref_rk_t      e;
  int checks = 0, failures = 0;

  kasumi_round_keys dut (.k(k), .kp(kp), .rk(rk));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      if (n == 0) key = KAT_KEY;
      for (int i = 0; i < 8; i++) begin
        k  = (key << (16*i)) | (key >> (128 - 16*i));
        kp = ((key ^ 128'h0123456789ABCDEFFEDCBA9876543210) << (16*i))
           | ((key ^ 128'h0123456789ABCDEFFEDCBA9876543210) >> (128 - 16*i));
        #1;
        e = round_keys(key, i);
        checks++;
        if (rk.kl1 !== e.kl[0] || rk.kl2 !== e.kl[1] ||
            rk.fo.ko1 !== e.ko[0] || rk.fo.ko2 !== e.ko[1] || rk.fo.ko3 !== e.ko[2] ||
            rk.fo.ki1 !== e.ki[0] || rk.fo.ki2 !== e.ki[1] || rk.fo.ki3 !== e.ki[2]) begin
          failures++;
          if (failures < 10) $display("round %0d keys wrong for key %h", i + 1, key);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
