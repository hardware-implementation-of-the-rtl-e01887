// kasumi_fi: the KASUMI FI function (purely combinational).
//
// FI is the non-linear part of KASUMI and holds the two S-boxes. The 16-bit
// input is split into a 9-bit and a 7-bit part which pass through S9 and S7
// in an unbalanced four-step Feistel network; the subkey KI is split into a
// 7-bit part (KI[15:9]) and a 9-bit part (KI[8:0]) that are mixed in between
// the second and third step:
//   L1 = R0            R1 = S9(L0) xor ZE(R0)
//   L2 = R1 xor KI[8:0] R2 = S7(L1) xor TR(R1) xor KI[15:9]
//   L3 = R2            R3 = S9(L2) xor ZE(R2)
//   L4 = S7(L3) xor TR(R3), R4 = R3, output = L4 || R4
// (ZE zero-extends 7 to 9 bits, TR keeps the low 7 of 9 bits.) The structure
// is the standard 3GPP one; the S-box tables live in kasumi_pkg.
//
// The design only names FI and its S-boxes; their definition here is the
// standard 3GPP one, written as table lookups (a local choice).
module kasumi_fi
  import kasumi_pkg::*;
(
  input  word16_t din,
  input  word16_t ki,
  output word16_t dout
);
  logic [8:0] l0, r1, l2, r3;
  logic [6:0] r0, l1, r2, l3, l4;

  always_comb begin
    l0   = din[15:7];
    r0   = din[6:0];
    r1   = s9(l0) ^ {2'b00, r0};
    l1   = r0;
    r2   = s7(l1) ^ r1[6:0] ^ ki[15:9];
    l2   = r1 ^ ki[8:0];
    r3   = s9(l2) ^ {2'b00, r2};
    l3   = r2;
    l4   = s7(l3) ^ r3[6:0];
    dout = {l4, r3};
  end
endmodule
