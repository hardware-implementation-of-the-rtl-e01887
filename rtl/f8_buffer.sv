// f8_buffer: message buffer of the f8 unit (one for input, one for output).
//
// A simple dual-port memory of DEPTH 64-bit words: one synchronous write
// port and one synchronous read port (read data appears the clock after
// re/raddr). Each of the four f8 channels owns a region of 128 words, enough
// for the longest f8 message of 5114 bits (80 words). The memory has no
// reset; only words that have been written are ever read.
//
// The design only names its input/output buffers; size and ports are local
// choices.
module f8_buffer #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 64
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
