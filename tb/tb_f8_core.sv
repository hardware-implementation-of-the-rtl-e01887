// tb_f8_core: the four-channel f8 unit with behavioural message buffers.
// Job 1: channel 0 carries the published f8 test message (CK
// 2BD6459F82C5B300952C49104881FF48, COUNT 72A4F20F, BEARER 0C, DIRECTION 1,
// 798 bits; its first 64-bit block 7EC61272743BF161 must encrypt to
// D1E2DE70EEF86C69), channel 1 a random length, channel 2 an exact multiple
// of 64 bits and channel 3 is left unused. Job 2 uses four random lengths,
// one of them the 5114-bit maximum, and job 3 decrypts job 2's output.
// Every written word is compared with the reference f8, the number of
// writes per channel and the final block counters are checked, and so is the job length in cycles.
module tb_f8_core;
  import kasumi_ref_pkg::*;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, ks_done;
  logic [127:0] ck [NCH];
  logic [31:0] count [NCH];
  logic [4:0] bearer [NCH];
  logic direction [NCH];
  logic [12:0] length [NCH];
  logic [6:0] blkcnt [NCH];
  logic read_en, write_en;
  logic [8:0] raddr, waddr;
  logic [63:0] ibs, obs;
  logic [63:0] ibuf [512];
  logic [63:0] obuf [512];
  int nwr [NCH];
  int checks = 0, failures = 0, cyc = 0, n_ks = 0;

  always #5 clk = ~clk;

  f8_core dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .ks_done(ks_done), .blkcnt_out(blkcnt), .ck(ck), .count(count), .bearer(bearer), .direction(direction),
    .length(length), .read_en(read_en), .raddr(raddr), .ibs(ibs),
    .write_en(write_en), .waddr(waddr), .obs(obs));

  always @(posedge clk) begin
    cyc++;
    if (read_en) ibs <= ibuf[raddr];
    if (write_en) begin
      obuf[waddr] <= obs;
      nwr[waddr[8:7]]++;
    end
    if (ks_done) n_ks++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_and_check(input bit decrypt_check);
    int t0, nb, nbmax;
    logic [63:0] a, ks, mask, e;
    nbmax = 0;
    foreach (nwr[c]) nwr[c] = 0;
    foreach (obuf[i]) obuf[i] = 64'hDEAD_BEEF_DEAD_BEEF;
    for (int c = 0; c < NCH; c++) begin
      nb = (int'(length[c]) + 63) / 64;
      if (nb > nbmax) nbmax = nb;
    end
    @(negedge clk);
    start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    $display("job: longest message %0d blocks, %0d cycles", nbmax, cyc - t0);
    checks++;
    if (cyc - t0 > 32 * (nbmax + 1) + 8) begin
      failures++;
      $display("FAIL job took %0d cycles for %0d blocks", cyc - t0, nbmax);
    end
    for (int c = 0; c < NCH; c++) begin
      nb = (int'(length[c]) + 63) / 64;
      checks++;
      if (nwr[c] != nb) begin failures++; $display("FAIL ch%0d wrote %0d of %0d", c, nwr[c], nb); end
      checks++;
      if (int'(blkcnt[c]) != (nb > 0 ? nb - 1 : 0)) begin
        failures++; $display("FAIL ch%0d block counter %0d after %0d blocks", c, blkcnt[c], nb);
      end
      a  = kasumi_ref({count[c], bearer[c], direction[c], 26'b0}, ck[c] ^ {16{8'h55}});
      ks = '0;
      for (int n = 0; n < nb; n++) begin
        ks = kasumi_ref(a ^ 64'(n) ^ ks, ck[c]);
        mask = (int'(length[c]) - 64 * n >= 64) ? '1 : ~({64{1'b1}} >> (int'(length[c]) - 64 * n));
        e = (ibuf[c * 128 + n] ^ ks) & mask;
        checks++;
        if (obuf[c * 128 + n] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL ch%0d blk%0d got %h exp %h", c, n, obuf[c*128+n], e);
        end
      end
    end
  endtask

  initial begin
    start = 0;
    foreach (ibuf[i]) ibuf[i] = {$urandom, $urandom};
    for (int c = 0; c < NCH; c++) begin
      ck[c] = {$urandom, $urandom, $urandom, $urandom};
      count[c] = $urandom; bearer[c] = 5'($urandom); direction[c] = 1'($urandom);
    end
    ck[0] = 128'h2BD6459F82C5B300952C49104881FF48;
    count[0] = 32'h72A4F20F; bearer[0] = 5'h0C; direction[0] = 1'b1;
    ibuf[0] = 64'h7EC61272743BF161;
    length[0] = 13'd798;
    length[1] = 13'($urandom_range(1, 1200));
    length[2] = 13'd640;
    length[3] = 13'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_and_check(0);
    checks++;
    if (obuf[0] !== 64'hD1E2DE70EEF86C69) begin failures++; $display("FAIL test vector %h", obuf[0]); end
    // job 2: random lengths, one maximal
    length[0] = 13'd5114;
    for (int c = 1; c < NCH; c++) length[c] = 13'($urandom_range(1, 5114));
    length[2] = 13'd5114;
    for (int c = 0; c < NCH; c++) count[c] = $urandom;
    run_and_check(0);
    // job 3: decrypt job 2's output back to the plaintext
    begin
      logic [63:0] plain [512];
      plain = ibuf;
      ibuf = obuf;
      run_and_check(1);
      for (int c = 0; c < NCH; c++)
        for (int n = 0; n < (int'(length[c]) + 63) / 64; n++) begin
          logic [63:0] m;
          m = (int'(length[c]) - 64 * n >= 64) ? '1 : ~({64{1'b1}} >> (int'(length[c]) - 64 * n));
          checks++;
          if (obuf[c * 128 + n] !== (plain[c * 128 + n] & m)) failures++;
        end
    end
    $display("keystream blocks produced: %0d", n_ks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
