// kasumi_t2: high-performance KASUMI core ("Type 2"): one round circuit cut
// into a four-stage pipeline, so four independent blocks (four messages,
// each with its own key) are encrypted at the same time.
//
// Stage 0 holds Reg A / Reg B. The FO function, the slowest part of a round,
// gets three pipeline registers (kasumi_fo_pipe, FO_reg0..2); the two halves
// travel alongside in A_Preg0..2 / B_Preg0..2. Since FL sits before FO in
// odd rounds and after it in even rounds, and a single FL would be needed in
// stage 0 and stage 3 at once by different blocks, there are two FL blocks:
// FL1 in stage 0 (odd rounds) and FL2 in stage 3 (even rounds). As in the
// one-round core the halves are not swapped:
//   odd round : To_B = B xor FO(FL1(A)),  To_A = A
//   even round: To_A = A xor FL2(FO(B)),  To_B = B
// and To_A/To_B return to Reg A/Reg B through MUX A/MUX B.
// Each stage carries a valid bit, the 0-based round number and a tag, so
// blocks may enter whenever the loop position arriving at stage 0 is free;
// blocks loaded in four consecutive cycles run in lock-step. Subkeys come
// from kasumi_keysched, whose ring is loaded with in_key as the block enters.
//
// Interface: in_valid/in_ready/in_data/in_key/in_tag; in_ready is low only in
// a cycle where a block still in flight returns to stage 0. out_valid (no
// back-pressure) with out_data/out_tag is combinational from stage 3 in the
// block's last round. Timing: accepted in cycle t -> out_valid in cycle t+32;
// four blocks per 32 cycles when kept full. Encryption only.
//
// The stage split, the two FL blocks and the A/B pipeline registers follow
// the design; the valid/round/tag control and the handshake are local choices.
module kasumi_t2
  import kasumi_pkg::*;
#(
  parameter int unsigned TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  block_t           in_data,
  input  key_t             in_key,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output block_t           out_data,
  output logic [TAG_W-1:0] out_tag
);
  typedef struct packed {
    logic             v;
    logic [2:0]       rnd;
    logic [TAG_W-1:0] tag;
    word32_t          a;
    word32_t          b;
  } stage_t;

  stage_t  s0, s1, s2, s3;
  logic    accept, done3, odd0, odd3;
  word16_t kl1_s0, kl2_s0, ko1_s0, ki1_s0, ko2_s1, ki2_s1;
  word16_t ko3_s2, ki3_s2, kl1_s3, kl2_s3;
  word32_t fl1_out, fo_in, fo_out, fl2_out, to_a, to_b;

  assign done3    = s3.v && (s3.rnd == 3'd7);
  assign in_ready = !(s3.v && !done3);
  assign accept   = in_valid && in_ready;
  assign odd0     = (s0.rnd[0] == 1'b0);
  assign odd3     = (s3.rnd[0] == 1'b0);

  kasumi_keysched u_ks (
    .clk(clk), .load(accept), .key_in(in_key),
    .round_s0(s0.rnd), .round_s1(s1.rnd), .round_s2(s2.rnd), .round_s3(s3.rnd),
    .kl1_s0(kl1_s0), .kl2_s0(kl2_s0), .ko1_s0(ko1_s0), .ki1_s0(ki1_s0),
    .ko2_s1(ko2_s1), .ki2_s1(ki2_s1), .ko3_s2(ko3_s2), .ki3_s2(ki3_s2),
    .kl1_s3(kl1_s3), .kl2_s3(kl2_s3)
  );

  // Stage 0: FL1 (odd rounds) and MUX FO.
  kasumi_fl u_fl1 (.din(s0.a), .kl1(kl1_s0), .kl2(kl2_s0), .dout(fl1_out));
  assign fo_in = odd0 ? fl1_out : s0.b;

  // Stages 0..3: FO with FO_reg0..2.
  kasumi_fo_pipe u_fo (
    .clk(clk), .din(fo_in),
    .ko1(ko1_s0), .ki1(ki1_s0), .ko2(ko2_s1), .ki2(ki2_s1),
    .ko3(ko3_s2), .ki3(ki3_s2), .dout(fo_out)
  );

  // Stage 3: DEMUX FO, FL2 (even rounds) and the round XORs.
  kasumi_fl u_fl2 (.din(fo_out), .kl1(kl1_s3), .kl2(kl2_s3), .dout(fl2_out));
  assign to_a = odd3 ? s3.a : (s3.a ^ fl2_out);
  assign to_b = odd3 ? (s3.b ^ fo_out) : s3.b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= '0;
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      // MUX A / MUX B in front of Reg A / Reg B
      if (accept)
        s0 <= '{v: 1'b1, rnd: 3'd0, tag: in_tag, a: in_data[63:32], b: in_data[31:0]};
      else if (s3.v && !done3)
        s0 <= '{v: 1'b1, rnd: s3.rnd + 3'd1, tag: s3.tag, a: to_a, b: to_b};
      else
        s0 <= '0;
      s1 <= s0;   // A_Preg0 / B_Preg0
      s2 <= s1;   // A_Preg1 / B_Preg1
      s3 <= s2;   // A_Preg2 / B_Preg2
    end
  end

  assign out_valid = done3;
  assign out_data  = {to_a, to_b};
  assign out_tag   = s3.tag;
endmodule
