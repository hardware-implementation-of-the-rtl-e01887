// kasumi_fo_pipe: the KASUMI FO function cut into three pipeline steps for
// the high-performance (4-stage) KASUMI core.
//
// FO is the longest path of a round, so each of its three FI steps gets its
// own register: FO_reg0 holds {R0, R1} after FI1, FO_reg1 holds {R1, R2}
// after FI2 and FO_reg2 holds {R2, R3} after FI3, which is the FO result.
// The subkeys must follow the data: KO1/KI1 are used in the cycle din is
// presented, KO2/KI2 one cycle later and KO3/KI3 two cycles later, exactly
// as the delayed outputs of the pipelined key schedule provide them.
// Latency: dout is valid three clock edges after din. No stall, no reset is
// needed (the enclosing core tracks which stages hold valid data).
//
// Three FO registers are part of the design; placing one after each FI step
// is a local choice that matches the key-schedule delays of the design.
module kasumi_fo_pipe
  import kasumi_pkg::*;
(
  input  logic    clk,
  input  word32_t din,
  input  word16_t ko1, ki1,   // stage 0 subkeys (same cycle as din)
  input  word16_t ko2, ki2,   // stage 1 subkeys (one cycle later)
  input  word16_t ko3, ki3,   // stage 2 subkeys (two cycles later)
  output word32_t dout
);
  word32_t fo_reg0, fo_reg1, fo_reg2;
  word16_t fi1_o, fi2_o, fi3_o;

  kasumi_fi u_fi1 (.din(din[31:16] ^ ko1), .ki(ki1), .dout(fi1_o));
  kasumi_fi u_fi2 (.din(fo_reg0[31:16] ^ ko2), .ki(ki2), .dout(fi2_o));
  kasumi_fi u_fi3 (.din(fo_reg1[31:16] ^ ko3), .ki(ki3), .dout(fi3_o));

  always_ff @(posedge clk) begin
    fo_reg0 <= {din[15:0], fi1_o ^ din[15:0]};
    fo_reg1 <= {fo_reg0[15:0], fi2_o ^ fo_reg0[15:0]};
    fo_reg2 <= {fo_reg1[15:0], fi3_o ^ fo_reg1[15:0]};
  end

  assign dout = fo_reg2;
endmodule
