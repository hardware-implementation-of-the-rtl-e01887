// kasumi_fl: the KASUMI FL function (purely combinational).
//
// The 32-bit input is split into halves L (bits 31:16) and R (bits 15:0):
//   R' = R xor ROL1(L and KL1)
//   L' = L xor ROL1(R' or KL2)
// and the output is L' || R'. Only a 16-bit AND, a 16-bit OR, two one-bit
// left rotations and two XORs are needed, which is the point made about FL
// being cheap in hardware. Interface: din/kl1/kl2 in, dout out, no clock.
//
// The structure follows the FL diagram of the design; nothing here is a
// local choice.
module kasumi_fl
  import kasumi_pkg::*;
(
  input  word32_t din,
  input  word16_t kl1,
  input  word16_t kl2,
  output word32_t dout
);
  word16_t l, r, r_new, l_new;

  always_comb begin
    l     = din[31:16];
    r     = din[15:0];
    r_new = r ^ rol16(l & kl1, 1);
    l_new = l ^ rol16(r_new | kl2, 1);
    dout  = {l_new, r_new};
  end
endmodule
