// kasumi_fl - the KASUMI FL function (combinational).
//
// The 32-bit input is split into a left half L (bits 31:16) and a right half
// R. With the two subkeys KL1 and KL2 of the round:
//   R' = R xor ROL1(L and KL1)
//   L' = L xor ROL1(R' or KL2)
// and the output is L' || R'. Only AND, OR, XOR and fixed rotations are used,
// so the block is a thin layer of LUT logic. The datapath uses two copies,
// one at the start of the odd round and one at the end of the even round.
module kasumi_fl
  import kasumi_pkg::*;
(
  input  logic [31:0] x,
  input  word_t       kl1,
  input  word_t       kl2,
  output logic [31:0] y
);

  word_t l_in, r_in, r_out, l_out;

  always_comb begin
    l_in  = x[31:16];
    r_in  = x[15:0];
    r_out = r_in ^ rol16(l_in & kl1, 1);
    l_out = l_in ^ rol16(r_out | kl2, 1);
    y     = {l_out, r_out};
  end

endmodule
