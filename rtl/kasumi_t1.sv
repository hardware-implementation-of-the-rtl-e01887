// kasumi_t1: low-power KASUMI core ("Type 1"): one round circuit used eight
// times, one round per clock.
//
// The block is held in two 32-bit registers, Reg A (left half) and Reg B
// (right half). Instead of swapping halves after every round, the round
// direction alternates:
//   odd round  (1,3,5,7): Reg B <= Reg B xor FO(FL(Reg A))
//   even round (2,4,6,8): Reg A <= Reg A xor FL(FO(Reg B))
// so after eight rounds Reg A || Reg B is the ciphertext with no final swap.
// A single FL and a single FO instance serve both orders: the multiplexers
// in front of them (MUX FL, MUX FO) and the demultiplexed results select the
// odd or even datapath. Because FL may feed FO and FO may feed FL depending on
// the round, a static tool sees a combinational cycle FL -> FO -> FL; it is a
// false path, only one direction is ever selected. Subkeys come from a key
// ring that rotates once per round (kasumi_keyring).
//
// Interface: in_valid/in_ready accept a 64-bit block and its 128-bit key;
// out_valid is a one-cycle pulse with out_data holding the result.
// Timing: a block accepted in cycle t runs its rounds in cycles t+1..t+8 and
// appears with out_valid in cycle t+9; in_ready is high again in that cycle,
// so back-to-back blocks take 9 cycles each. Encryption only.
//
// Registers, multiplexers and the odd/even datapaths follow the design; the
// handshake, the round counter and the key ring are local choices.
module kasumi_t1
  import kasumi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t in_data,
  input  key_t   in_key,
  output logic   out_valid,
  output block_t out_data
);
  word32_t     reg_a, reg_b;
  logic        busy;
  logic [2:0]  round;        // 0-based: 0 is round 1 (odd)
  logic        odd;
  round_keys_t rk;

  word32_t fl_in, fl_out, fo_in, fo_out, to_a, to_b;

  assign in_ready = !busy;
  assign odd      = (round[0] == 1'b0);

  kasumi_keyring u_keys (
    .clk(clk), .load(in_valid && in_ready), .advance(busy), .key(in_key), .rk(rk)
  );

  // MUX FL / MUX FO: odd rounds run A -> FL -> FO, even rounds B -> FO -> FL.
  always_comb begin
    fl_in = odd ? reg_a  : fo_out;
    fo_in = odd ? fl_out : reg_b;
  end

  kasumi_fl u_fl (.din(fl_in), .kl1(rk.kl1), .kl2(rk.kl2), .dout(fl_out));
  kasumi_fo u_fo (.din(fo_in), .ko1(rk.ko1), .ko2(rk.ko2), .ko3(rk.ko3),
                  .ki1(rk.ki1), .ki2(rk.ki2), .ki3(rk.ki3), .dout(fo_out));

  // DEMUX FL / DEMUX FO and the two round XORs.
  assign to_a = reg_a ^ fl_out;
  assign to_b = reg_b ^ fo_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      round     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        busy  <= 1'b1;
        round <= '0;
      end else if (busy) begin
        round <= round + 3'd1;
        if (round == 3'd7) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
      end
    end
  end

  // Reg A / Reg B with MUX A / MUX B (0: new block, 1: round result).
  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      reg_a <= in_data[63:32];
      reg_b <= in_data[31:0];
    end else if (busy) begin
      if (odd) reg_b <= to_b;   // write_enB
      else     reg_a <= to_a;   // write_enA
    end
  end

  assign out_data = {reg_a, reg_b};

  // A result is announced for exactly one cycle per accepted block.
  a_out_pulse: assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid);
endmodule
