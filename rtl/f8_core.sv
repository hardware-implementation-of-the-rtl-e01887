// f8_core: 3GPP f8 confidentiality unit for four messages at once, built
// around the four-stage pipelined KASUMI core.
//
// f8 runs KASUMI in a modified output-feedback mode. For each message:
//   A    = KASUMI[CK xor KM](COUNT || BEARER || DIRECTION || 0...0)
//   KS0  = 0,  KSn = KASUMI[CK](A xor BLKCNT xor KS(n-1)),  BLKCNT = n-1
// and the keystream blocks KS1, KS2, ... are XORed with the message. The
// pipelined core has four loop positions, so the four channels each occupy
// one: first the four initial A values are computed (one block per channel,
// issued in consecutive cycles), then every channel's keystream blocks follow
// in lock-step, one per channel per 32 cycles. When a channel's block leaves
// the core, its successor (A xor BLKCNT xor KASUMI_OUT) is formed and
// re-issued in the same cycle, so the loop never idles. Each channel has an
// A register, a 7-bit block counter and one keystream register; because the
// next block is formed straight from the core output, that one register
// serves both as the previous-keystream store and as the keystream register
// that the output XOR reads.
//
// Message data are in external buffers addressed {channel, block}: when a
// keystream block is ready the input block is read (read_en/raddr, data one
// cycle later on ibs), and the next cycle the output block
// OBS = IBS xor KS is written (write_en/waddr/obs). Bits after the last
// message bit (LENGTH not a multiple of 64) are written as 0. Message bit 1
// is bit 63 of block 0.
//
// Interface: set the per-channel configuration, pulse start while idle.
// length = 0 leaves a channel unused. done pulses when every output block
// has been written; ks_done pulses for each keystream block produced;
// blkcnt_out shows each channel's block counter.
// Timing: about 32 * (1 + ceil(max length / 64)) + 3 cycles per job.
//
// CORE_TYPE = 1 builds the same unit around the one-round (low-power) core
// instead: the core holds one block at a time, so channels are served one
// after another, each keystream block taking 9 cycles; the control is the
// same, a register remembers which channel's block is in the core.
//
// The per-channel registers, BLKCNT XOR, previous-keystream XOR and
// IBS xor KS output follow the design; buffer addressing, same-cycle
// re-issue, zeroing past the message end and the handshake are local choices.
module f8_core
  import kasumi_pkg::*;
#(
  parameter int unsigned CORE_TYPE = 2,    // 2: pipelined core, 1: one-round core
  parameter int unsigned NCH     = 4,      // pipeline slots = channels
  parameter int unsigned MAX_BITS = F8_MAX_BITS,  // longest f8 message
  parameter int unsigned BLK_W   = $clog2((MAX_BITS + 63) / 64),
  parameter int unsigned LEN_W   = $clog2(MAX_BITS + 1),
  parameter int unsigned ADDR_W  = $clog2(NCH) + BLK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // job control
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              ks_done,
  output logic [BLK_W-1:0]  blkcnt_out [NCH],   // block counter of each channel
  // per-channel configuration
  input  key_t              ck        [NCH],
  input  logic [31:0]       count     [NCH],
  input  logic [4:0]        bearer    [NCH],
  input  logic              direction [NCH],
  input  logic [LEN_W-1:0]  length    [NCH],
  // input buffer (IBS)
  output logic              read_en,
  output logic [ADDR_W-1:0] raddr,
  input  block_t            ibs,
  // output buffer (OBS)
  output logic              write_en,
  output logic [ADDR_W-1:0] waddr,
  output block_t            obs
);
  localparam int unsigned CH_W = (NCH > 1) ? $clog2(NCH) : 1;

  // KASUMI core handshake
  logic            k_in_valid, k_in_ready, k_out_valid;
  block_t          k_in_data, k_out_data;
  key_t            k_in_key;
  logic [CH_W-1:0] k_in_tag, k_out_tag;

  // per-channel state
  block_t          a_reg   [NCH];   // A reg0..3
  block_t          ks_reg  [NCH];   // KS_reg0..3 / KS_tmp_reg0..3
  logic [BLK_W-1:0] blkcnt [NCH];   // BLKCNT0..3: index of the block in flight
  logic [NCH-1:0]  have_a;          // A value computed
  logic [NCH-1:0]  active;          // channel still has blocks to produce

  logic [CH_W:0]   init_ptr;        // next channel whose A block is issued
  logic            init_phase;

  // one pending buffer write (read issued last cycle)
  logic             wp_v;
  logic [CH_W-1:0]  wp_ch;
  logic [BLK_W-1:0] wp_blk;
  block_t           wp_mask;

  // decode of the block leaving the core
  logic            o_is_a, o_is_ks, o_last, o_more;
  logic [CH_W-1:0] o_ch;
  logic [LEN_W:0]  o_bits_left;
  logic [BLK_W-1:0] blk_next;

  always_comb begin
    o_ch        = k_out_tag;
    o_is_a      = k_out_valid && !have_a[o_ch];
    o_is_ks     = k_out_valid && have_a[o_ch];
    o_bits_left = (LEN_W+1)'(length[o_ch]) - (LEN_W+1)'({blkcnt[o_ch], 6'b0});
    o_last      = (o_bits_left <= 64);
    o_more      = o_is_a || (o_is_ks && !o_last);
    blk_next    = blkcnt[o_ch] + BLK_W'(1);
  end

  // Issue: MUX A selects the initial IV (KASUMI_IN) or the feedback path;
  // BLKCNT and the previous keystream (MUX B: 0 for the first block) are XORed.
  always_comb begin
    k_in_valid = 1'b0;
    k_in_data  = '0;
    k_in_key   = '0;
    k_in_tag   = '0;
    if (o_more) begin
      k_in_valid = 1'b1;
      k_in_tag   = o_ch;
      k_in_key   = ck[o_ch];
      if (o_is_a)
        k_in_data = k_out_data;                                  // A xor 0 xor 0
      else
        k_in_data = a_reg[o_ch] ^ {{(64-BLK_W){1'b0}}, blk_next} ^ k_out_data;
    end else if (init_phase && (init_ptr < (CH_W+1)'(NCH))) begin
      k_in_tag = CH_W'(init_ptr);
      if (length[k_in_tag] != '0 && k_in_ready) begin
        k_in_valid = 1'b1;
        k_in_key   = ck[k_in_tag] ^ F8_KM;
        k_in_data  = {count[k_in_tag], bearer[k_in_tag], direction[k_in_tag], 26'b0};
      end
    end
  end

  if (CORE_TYPE == 1) begin : g_core_t1
    // One block at a time: remember whose block is in the core.
    logic [CH_W-1:0] tag_q;
    kasumi_t1 u_kasumi (
      .clk(clk), .rst_n(rst_n),
      .in_valid(k_in_valid), .in_ready(k_in_ready),
      .in_data(k_in_data), .in_key(k_in_key),
      .out_valid(k_out_valid), .out_data(k_out_data)
    );
    always_ff @(posedge clk) if (k_in_valid && k_in_ready) tag_q <= k_in_tag;
    assign k_out_tag = tag_q;
  end else begin : g_core_t2
    kasumi_t2 #(.TAG_W(CH_W)) u_kasumi (
      .clk(clk), .rst_n(rst_n),
      .in_valid(k_in_valid), .in_ready(k_in_ready),
      .in_data(k_in_data), .in_key(k_in_key), .in_tag(k_in_tag),
      .out_valid(k_out_valid), .out_data(k_out_data), .out_tag(k_out_tag)
    );
  end

  // Buffer read for the keystream block leaving the core.
  assign read_en = o_is_ks;
  assign raddr   = ADDR_W'({o_ch, blkcnt[o_ch]});
  assign ks_done = o_is_ks;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_a     <= '0;
      active     <= '0;
      init_ptr   <= '0;
      init_phase <= 1'b0;
      busy       <= 1'b0;
      done       <= 1'b0;
      wp_v       <= 1'b0;
      for (int c = 0; c < NCH; c++) blkcnt[c] <= '0;
    end else begin
      done <= 1'b0;
      wp_v <= 1'b0;
      if (start && !busy) begin
        busy       <= 1'b1;
        init_phase <= 1'b1;
        init_ptr   <= '0;
        have_a     <= '0;
        for (int c = 0; c < NCH; c++) begin
          active[c] <= (length[c] != '0);
          blkcnt[c] <= '0;
        end
      end else if (busy) begin
        // advance past a channel once its A block is issued (or it is unused)
        if (init_phase && !o_more && (length[CH_W'(init_ptr)] == '0 || k_in_ready)) begin
          if (init_ptr == (CH_W+1)'(NCH - 1)) init_phase <= 1'b0;
          init_ptr <= init_ptr + 1'b1;
        end
        if (o_is_a) begin
          a_reg[o_ch]  <= k_out_data;
          have_a[o_ch] <= 1'b1;
        end
        if (o_is_ks) begin
          ks_reg[o_ch] <= k_out_data;
          wp_v         <= 1'b1;
          wp_ch        <= o_ch;
          wp_blk       <= blkcnt[o_ch];
          wp_mask      <= o_last ? ~({64{1'b1}} >> o_bits_left[6:0]) : '1;
          if (o_last) active[o_ch] <= 1'b0;
          else        blkcnt[o_ch] <= blk_next;
        end
        if (!init_phase && active == '0 && !wp_v && !o_is_ks) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // The block counters are visible outside (BLKCNT0..3_out): during a job
  // they give the block each channel has reached, and after it the index of
  // each channel's last block.
  always_comb for (int c = 0; c < NCH; c++) blkcnt_out[c] = blkcnt[c];

  // Output write: OBS = IBS xor KS_reg, one cycle after the read.
  assign write_en = wp_v;
  assign waddr    = ADDR_W'({wp_ch, wp_blk});
  assign obs      = (ibs ^ ks_reg[wp_ch]) & wp_mask;

  // The control never offers a block the core cannot take.
  a_issue_ready: assert property (@(posedge clk) disable iff (!rst_n)
    k_in_valid |-> k_in_ready);
endmodule
