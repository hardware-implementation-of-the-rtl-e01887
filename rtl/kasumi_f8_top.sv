// kasumi_f8_top: KASUMI / f8 crypto device.
//
// Two independent engines sit side by side:
//  * the f8 engine for high message rates: f8_core (four-channel f8 control
//    around the four-stage pipelined KASUMI core) with an input message
//    buffer and an output message buffer. A host writes plaintext words into
//    the input buffer at {channel, block}, configures the four channels,
//    pulses f8_start and, after f8_done, reads the result from the output
//    buffer at the same addresses. In the original board these host ports
//    sit behind a 33 MHz PCI interface, which is not part of this RTL.
//  * the low-power one-round KASUMI core (kasumi_t1) with its own
//    block/key handshake, for single-block use.
// All ports are synchronous to clk; rst_n is an active-low asynchronous
// reset for the control state (data registers and memories are not reset).
// Static tools report a combinational loop through the low-power core's
// shared FL and FO blocks; it is a false path, see kasumi_t1.
//
// Which blocks exist follows the design; the host port arrangement is a
// local choice standing in for the PCI side.
module kasumi_f8_top
  import kasumi_pkg::*;
#(
  parameter int unsigned NCH      = 4,
  parameter int unsigned MAX_BITS = F8_MAX_BITS,
  parameter int unsigned BLK_W    = $clog2((MAX_BITS + 63) / 64),
  parameter int unsigned LEN_W    = $clog2(MAX_BITS + 1),
  parameter int unsigned ADDR_W   = $clog2(NCH) + BLK_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side of the input buffer
  input  logic              host_wr_en,
  input  logic [ADDR_W-1:0] host_wr_addr,
  input  block_t            host_wr_data,
  // host side of the output buffer
  input  logic              host_rd_en,
  input  logic [ADDR_W-1:0] host_rd_addr,
  output block_t            host_rd_data,
  // f8 job control and channel configuration
  input  logic              f8_start,
  output logic              f8_busy,
  output logic              f8_done,
  output logic              f8_ks_done,
  output logic [BLK_W-1:0]  f8_blkcnt    [NCH],
  input  key_t              f8_ck        [NCH],
  input  logic [31:0]       f8_count     [NCH],
  input  logic [4:0]        f8_bearer    [NCH],
  input  logic              f8_direction [NCH],
  input  logic [LEN_W-1:0]  f8_length    [NCH],
  // low-power KASUMI core
  input  logic              t1_in_valid,
  output logic              t1_in_ready,
  input  block_t            t1_in_data,
  input  key_t              t1_in_key,
  output logic              t1_out_valid,
  output block_t            t1_out_data
);
  logic              rd_en, wr_en;
  logic [ADDR_W-1:0] raddr, waddr;
  block_t            ibs, obs;

  f8_buffer #(.ADDR_W(ADDR_W), .DATA_W(64)) u_inbuf (
    .clk(clk), .we(host_wr_en), .waddr(host_wr_addr), .wdata(host_wr_data),
    .re(rd_en), .raddr(raddr), .rdata(ibs)
  );

  f8_core #(.NCH(NCH), .MAX_BITS(MAX_BITS), .BLK_W(BLK_W), .LEN_W(LEN_W), .ADDR_W(ADDR_W)) u_f8 (
    .clk(clk), .rst_n(rst_n),
    .start(f8_start), .busy(f8_busy), .done(f8_done), .ks_done(f8_ks_done),
    .blkcnt_out(f8_blkcnt),
    .ck(f8_ck), .count(f8_count), .bearer(f8_bearer), .direction(f8_direction),
    .length(f8_length),
    .read_en(rd_en), .raddr(raddr), .ibs(ibs),
    .write_en(wr_en), .waddr(waddr), .obs(obs)
  );

  f8_buffer #(.ADDR_W(ADDR_W), .DATA_W(64)) u_outbuf (
    .clk(clk), .we(wr_en), .waddr(waddr), .wdata(obs),
    .re(host_rd_en), .raddr(host_rd_addr), .rdata(host_rd_data)
  );

  kasumi_t1 u_t1 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(t1_in_valid), .in_ready(t1_in_ready),
    .in_data(t1_in_data), .in_key(t1_in_key),
    .out_valid(t1_out_valid), .out_data(t1_out_data)
  );
endmodule
