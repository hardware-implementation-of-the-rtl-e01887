// kasumi_fo: the KASUMI FO function, single-cycle combinational version
// (used by the one-round iterative core).
//
// FO is a three-step Feistel network over 16-bit halves built from three FI
// blocks and six XORs. With L0 || R0 the input, for j = 1..3:
//   Rj = FI(L(j-1) xor KOj, KIj) xor R(j-1),  Lj = R(j-1)
// and the output is L3 || R3. Interface: din, ko1..ko3, ki1..ki3 in, dout out.
// Inside the one-round core, FO and FL feed each other through multiplexers
// (FL->FO in odd rounds, FO->FL in even rounds), so lint reports the nets
// here as part of a combinational cycle. That cycle is never active: only
// one direction is selected at a time (see kasumi_t1).
//
// The structure follows the FO diagram of the design.
module kasumi_fo
  import kasumi_pkg::*;
(
  input  word32_t din,
  input  word16_t ko1, ko2, ko3,
  input  word16_t ki1, ki2, ki3,
  output word32_t dout
);
  word16_t l0, r0, r1, r2, r3;
  word16_t fi1_o, fi2_o, fi3_o;

  assign l0 = din[31:16];
  assign r0 = din[15:0];

  kasumi_fi u_fi1 (.din(l0 ^ ko1), .ki(ki1), .dout(fi1_o));
  assign r1 = fi1_o ^ r0;
  kasumi_fi u_fi2 (.din(r0 ^ ko2), .ki(ki2), .dout(fi2_o));
  assign r2 = fi2_o ^ r1;
  kasumi_fi u_fi3 (.din(r1 ^ ko3), .ki(ki3), .dout(fi3_o));
  assign r3 = fi3_o ^ r2;

  assign dout = {r2, r3};
endmodule
