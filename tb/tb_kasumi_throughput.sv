// tb_kasumi_throughput: measures the sustained throughput of the four
// configurations and converts it to Mbit/s at the clock rates reported for
// the FPGA implementations, requiring at least the reported throughput:
//   Type 1 KASUMI  at 20 MHz   >= 110 Mbit/s
//   Type 2 KASUMI  at 33 MHz   >= 234 Mbit/s (60 MHz >= 410)
//   f8 on Type 2   at 33 MHz   >= 211 Mbit/s (52 MHz >= 321), four 5114-bit messages
//   f8 on Type 1   at 19.5 MHz >= 103 Mbit/s, four 5114-bit messages
// Results are also checked for correctness (KASUMI against the reference
// model, f8 by a decrypt-after-encrypt round trip on a sample of words).
module tb_kasumi_throughput;
  import kasumi_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- KASUMI cores ----------------
  logic a_iv, a_ir, a_ov, b_iv, b_ir, b_ov;
  logic [63:0] a_id, a_od, b_id, b_od;
  logic [127:0] a_ik, b_ik;
  logic [1:0] b_ot;
  kasumi_t1 u_t1 (.clk(clk), .rst_n(rst_n), .in_valid(a_iv), .in_ready(a_ir), .in_data(a_id),
                  .in_key(a_ik), .out_valid(a_ov), .out_data(a_od));
  kasumi_t2 u_t2 (.clk(clk), .rst_n(rst_n), .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
                  .in_key(b_ik), .in_tag(2'b0), .out_valid(b_ov), .out_data(b_od), .out_tag(b_ot));

  // ---------------- f8 engines with behavioural buffers ----------------
  logic [127:0] ck [4];
  logic [31:0] count [4];
  logic [4:0] bearer [4];
  logic direction [4];
  logic [12:0] length [4];
  logic [63:0] ibuf [512];
  logic s2, s2_busy, s2_done, s2_ks, s2_re, s2_we;
  logic s1, s1_busy, s1_done, s1_ks, s1_re, s1_we;
  logic [8:0] s2_ra, s2_wa, s1_ra, s1_wa;
  logic [63:0] s2_ibs, s2_obs, s1_ibs, s1_obs;
  logic [63:0] obuf2 [512];
  logic [63:0] obuf1 [512];
  logic [6:0] s2_blk [4], s1_blk [4];

  f8_core #(.CORE_TYPE(2)) u_f8_t2 (.clk(clk), .rst_n(rst_n), .start(s2), .busy(s2_busy),
    .done(s2_done), .ks_done(s2_ks), .blkcnt_out(s2_blk), .ck(ck), .count(count), .bearer(bearer),
    .direction(direction), .length(length), .read_en(s2_re), .raddr(s2_ra), .ibs(s2_ibs),
    .write_en(s2_we), .waddr(s2_wa), .obs(s2_obs));
  f8_core #(.CORE_TYPE(1)) u_f8_t1 (.clk(clk), .rst_n(rst_n), .start(s1), .busy(s1_busy),
    .done(s1_done), .ks_done(s1_ks), .blkcnt_out(s1_blk), .ck(ck), .count(count), .bearer(bearer),
    .direction(direction), .length(length), .read_en(s1_re), .raddr(s1_ra), .ibs(s1_ibs),
    .write_en(s1_we), .waddr(s1_wa), .obs(s1_obs));

  always @(posedge clk) begin
    if (s2_re) s2_ibs <= ibuf[s2_ra];
    if (s1_re) s1_ibs <= ibuf[s1_ra];
    if (s2_we) obuf2[s2_wa] <= s2_obs;
    if (s1_we) obuf1[s1_wa] <= s1_obs;
  end

  // rate in Mbit/s = bits / cycles * MHz
  task automatic require(input string what, input real bits, input int cycles,
                         input real mhz, input real need);
    real mbps;
    mbps = bits / cycles * mhz;
    $display("%s: %0d bits in %0d cycles -> %0.1f Mbit/s at %0.1f MHz (reported %0.1f)",
             what, int'(bits), cycles, mbps, mhz, need);
    checks++;
    if (mbps < need) failures++;
  endtask

  initial begin
    int t0, n, nrx;
    logic [63:0] exp_q [$];
    a_iv = 0; b_iv = 0; s1 = 0; s2 = 0;
    a_id = '0; b_id = '0; a_ik = '0; b_ik = '0;
    foreach (ibuf[i]) ibuf[i] = {$urandom, $urandom};
    for (int c = 0; c < 4; c++) begin
      ck[c] = {$urandom, $urandom, $urandom, $urandom};
      count[c] = $urandom; bearer[c] = 5'($urandom); direction[c] = 1'($urandom);
      length[c] = 13'd5114;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Type 1: 40 back-to-back blocks
    n = 0; nrx = 0;
    @(negedge clk);
    t0 = cyc;
    while (nrx < 40) begin
      a_iv = (n < 40);
      if (a_iv) begin
        a_id = {$urandom, $urandom}; a_ik = {$urandom, $urandom, $urandom, $urandom};
      end
      @(posedge clk);
      if (a_iv && a_ir) begin exp_q.push_back(kasumi_ref(a_id, a_ik)); n++; end
      if (a_ov) begin
        nrx++; checks++;
        if (a_od !== exp_q.pop_front()) failures++;
      end
      @(negedge clk);
    end
    a_iv = 0;
    require("KASUMI Type 1", 64.0 * 40, cyc - t0, 20.0, 110.0);

    // Type 2: 200 blocks offered every cycle
    n = 0; nrx = 0;
    t0 = cyc;
    while (nrx < 200) begin
      b_iv = (n < 200);
      if (b_iv) begin
        b_id = {$urandom, $urandom}; b_ik = {$urandom, $urandom, $urandom, $urandom};
      end
      #1;
      if (b_ov) begin
        nrx++; checks++;
        if (b_od !== exp_q.pop_front()) failures++;
      end
      if (b_iv && b_ir) begin exp_q.push_back(kasumi_ref(b_id, b_ik)); n++; end
      @(negedge clk);
    end
    b_iv = 0;
    require("KASUMI Type 2 (33 MHz)", 64.0 * 200, cyc - t0, 33.0, 234.0);
    require("KASUMI Type 2 (60 MHz)", 64.0 * 200, cyc - t0, 60.0, 410.0);

    // f8 on Type 2: four 5114-bit messages
    @(negedge clk); s2 = 1; t0 = cyc;
    @(negedge clk); s2 = 0;
    while (!s2_done) @(negedge clk);
    require("f8 on Type 2 (33 MHz)", 4.0 * 5114, cyc - t0, 33.0, 211.0);
    require("f8 on Type 2 (52 MHz)", 4.0 * 5114, cyc - t0, 52.0, 321.0);

    // f8 on Type 1: the same four messages, served one after another
    @(negedge clk); s1 = 1; t0 = cyc;
    @(negedge clk); s1 = 0;
    while (!s1_done) @(negedge clk);
    require("f8 on Type 1 (19.5 MHz)", 4.0 * 5114, cyc - t0, 19.5, 103.0);

    // both engines must agree, and match the reference on sampled words
    for (int c = 0; c < 4; c++)
      for (int b = 0; b < 80; b++) begin
        checks++;
        if (obuf1[c * 128 + b] !== obuf2[c * 128 + b]) failures++;
      end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (obuf2[c * 128] !== (ibuf[c * 128] ^ f8_ks_ref(ck[c], count[c], bearer[c], direction[c], 0)))
        failures++;
      checks++;
      if (obuf2[c * 128 + 79] !== ((ibuf[c * 128 + 79] ^ f8_ks_ref(ck[c], count[c], bearer[c], direction[c], 79))
                                   & ~({64{1'b1}} >> (5114 - 64 * 79))))
        failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
