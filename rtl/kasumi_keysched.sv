// kasumi_keysched: key scheduling for the four-stage pipelined KASUMI core.
//
// Up to four blocks, each with its own 128-bit key, circulate in the core's
// four-stage round loop. Their keys are kept in one ring of 32 16-bit words
// (4 x 128 = 512 bits), arranged as eight rows KAj KBj KCj KDj (j = 1..8),
// one column per pipeline slot. Every clock the ring moves up by one word
// (KAj <- KBj <- KCj <- KDj <- KA(j+1), KD8 <- KA1), so after four clocks -
// one pass round the loop, i.e. one round - every key has moved one row up.
// When a block enters stage 0 its key is written into column A (KA1 = K1 ...
// KA8 = K8); from then on column A always holds K(i), K(i+1), ... of the
// block in stage 0 during its round i, and fixed taps deliver each subkey
// exactly when the stage that needs it holds that block:
//   stage 0 (FL1 of odd rounds, FI1): KL1 = KA1<<<1, KL2 = KA3^C,
//                                     KO1 = KA2<<<5, KI1 = KA5^C
//   stage 1 (FI2):                    KO2 = KD5<<<8, KI2 = KD3^C
//   stage 2 (FI3):                    KO3 = KC6<<<13, KI3 = KC7^C
//   stage 3 (FL2 of even rounds):     KL1 = KB8<<<1, KL2 = KB2^C
// The ring taps, the rotations and the per-stage delays (none, 1, 2 and 3
// clocks) are those of the pipelined key-schedule structure. The constant
// C(j) in K'j = Kj xor C(j) is chosen here from the round number of the block
// in that stage (round_sN, 0-based) instead of from a separately rotating
// constant register; this keeps the constants right even when the four slots
// are in different rounds. Outputs are combinational from the ring.
//
// The ring, its rotation and tap positions follow the design; the constant
// selection by round number and writing the key at block entry are local.
module kasumi_keysched
  import kasumi_pkg::*;
(
  input  logic       clk,
  input  logic       load,          // a block enters stage 0 at this edge
  input  key_t       key_in,
  input  logic [2:0] round_s0,
  input  logic [2:0] round_s1,
  input  logic [2:0] round_s2,
  input  logic [2:0] round_s3,
  output word16_t    kl1_s0, kl2_s0, ko1_s0, ki1_s0,
  output word16_t    ko2_s1, ki2_s1,
  output word16_t    ko3_s2, ki3_s2,
  output word16_t    kl1_s3, kl2_s3
);
  // ring[4*(j-1) + col], col 0..3 = A..D
  word16_t ring [32];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 32; p++) begin
      if (load && (p % 4 == 0)) ring[p] <= key_word(key_in, p / 4);
      else                      ring[p] <= ring[(p + 1) % 32];
    end
  end

  function automatic word16_t cst(input logic [2:0] rnd, input int unsigned off);
    return KS_C[(int'(rnd) + off) % 8];
  endfunction

  always_comb begin
    kl1_s0 = rol16(ring[0], 1);                     // KA1
    ko1_s0 = rol16(ring[4], 5);                     // KA2
    kl2_s0 = ring[8]  ^ cst(round_s0, 2);           // KA3
    ki1_s0 = ring[16] ^ cst(round_s0, 4);           // KA5
    ki2_s1 = ring[11] ^ cst(round_s1, 3);           // KD3
    ko2_s1 = rol16(ring[19], 8);                    // KD5
    ko3_s2 = rol16(ring[22], 13);                   // KC6
    ki3_s2 = ring[26] ^ cst(round_s2, 7);           // KC7
    kl1_s3 = rol16(ring[29], 1);                    // KB8
    kl2_s3 = ring[5]  ^ cst(round_s3, 2);           // KB2
  end
endmodule
