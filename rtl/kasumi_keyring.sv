// kasumi_keyring: round-key generator for the one-round iterative KASUMI core.
//
// KASUMI's key schedule is regular: the subkeys of round i are the key words
// K(i..i+7 mod 8), some rotated left by a fixed amount, some XORed with the
// constants C(i..i+7 mod 8) (K'j = Kj xor Cj). So the key is held as a ring of
// eight 16-bit words, with the constants in a parallel ring, and both rings
// rotate by one word per round. Fixed taps then give the subkeys of the
// current round with no adders or barrel shifters:
//   KL1 = K0<<<1  KL2 = K'2   KO1 = K1<<<5  KO2 = K5<<<8  KO3 = K6<<<13
//   KI1 = K'4     KI2 = K'3   KI3 = K'7      (ring positions, 0 = round word)
// Interface: load copies key into the ring (round 1 next); advance rotates
// to the next round. rk always shows the subkeys for the current ring state.
//
// The design does not describe the low-power core's key schedule; this
// rotating ring is a local choice modelled on the pipelined key schedule.
module kasumi_keyring
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  logic        advance,
  input  key_t        key,
  output round_keys_t rk
);
  word16_t kr [8];
  word16_t cr [8];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int j = 0; j < 8; j++) begin
        kr[j] <= key_word(key, j);
        cr[j] <= KS_C[j];
      end
    end else if (advance) begin
      for (int j = 0; j < 8; j++) begin
        kr[j] <= kr[(j + 1) % 8];
        cr[j] <= cr[(j + 1) % 8];
      end
    end
  end

  always_comb begin
    rk.kl1 = rol16(kr[0], 1);
    rk.kl2 = kr[2] ^ cr[2];
    rk.ko1 = rol16(kr[1], 5);
    rk.ko2 = rol16(kr[5], 8);
    rk.ko3 = rol16(kr[6], 13);
    rk.ki1 = kr[4] ^ cr[4];
    rk.ki2 = kr[3] ^ cr[3];
    rk.ki3 = kr[7] ^ cr[7];
  end
endmodule
