// tb_kasumi_f8_top: end-to-end test of the whole device at its default size.
// A host model writes four messages into the input buffer (one of the
// maximum 5114 bits, one of the published f8 test, one with a partial last
// block, or an unused channel), starts the f8 engine, reads the output
// buffer back and compares it with the reference f8; a second job decrypts
// the first job's output. Meanwhile the low-power KASUMI core encrypts
// blocks (the published KASUMI test vector and random ones) on its own
// port. Each mechanism - keystream generation in all four slots, partial
// last blocks, an unused channel, a maximum-length message, an encrypt/
// decrypt round trip, low-power core blocks - is counted and must occur.
module tb_kasumi_f8_top;
  import kasumi_ref_pkg::*;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0;
  logic host_wr_en, host_rd_en;
  logic [8:0] host_wr_addr, host_rd_addr;
  logic [63:0] host_wr_data, host_rd_data;
  logic f8_start, f8_busy, f8_done, f8_ks_done;
  logic [127:0] f8_ck [NCH];
  logic [31:0] f8_count [NCH];
  logic [4:0] f8_bearer [NCH];
  logic f8_direction [NCH];
  logic [12:0] f8_length [NCH];
  logic [6:0] f8_blkcnt [NCH];
  logic t1_in_valid, t1_in_ready, t1_out_valid;
  logic [63:0] t1_in_data, t1_out_data;
  logic [127:0] t1_in_key;

  logic [63:0] msg [512];
  logic [63:0] res [512];
  int checks = 0, failures = 0;
  int n_ks = 0, n_partial = 0, n_idle = 0, n_max = 0, n_roundtrip = 0, n_t1 = 0, n_slots4 = 0;
  bit f8_running = 0;

  always #5 clk = ~clk;

  kasumi_f8_top dut (.clk(clk), .rst_n(rst_n),
    .host_wr_en(host_wr_en), .host_wr_addr(host_wr_addr), .host_wr_data(host_wr_data),
    .host_rd_en(host_rd_en), .host_rd_addr(host_rd_addr), .host_rd_data(host_rd_data),
    .f8_start(f8_start), .f8_busy(f8_busy), .f8_done(f8_done), .f8_ks_done(f8_ks_done),
    .f8_blkcnt(f8_blkcnt),
    .f8_ck(f8_ck), .f8_count(f8_count), .f8_bearer(f8_bearer), .f8_direction(f8_direction),
    .f8_length(f8_length),
    .t1_in_valid(t1_in_valid), .t1_in_ready(t1_in_ready), .t1_in_data(t1_in_data),
    .t1_in_key(t1_in_key), .t1_out_valid(t1_out_valid), .t1_out_data(t1_out_data));

  // keystream blocks, and cycles with four channels' blocks within 4 cycles
  int ks_hist [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (f8_ks_done) begin
      n_ks++;
      ks_hist.push_back(cyc);
      if (ks_hist.size() > 4) void'(ks_hist.pop_front());
      if (ks_hist.size() == 4 && ks_hist[3] - ks_hist[0] == 3) n_slots4++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write_all();
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      host_wr_en = 1; host_wr_addr = 9'(i); host_wr_data = msg[i];
    end
    @(negedge clk); host_wr_en = 0;
  endtask

  task automatic host_read_all();
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      host_rd_en = 1; host_rd_addr = 9'(i);
      @(posedge clk); #1;
      res[i] = host_rd_data;
    end
    host_rd_en = 0;
  endtask

  function automatic logic [63:0] mask_of(int len, int n);
    return (len - 64 * n >= 64) ? '1 : ~({64{1'b1}} >> (len - 64 * n));
  endfunction

  task automatic f8_job();
    logic [63:0] a, ks;
    int nb;
    host_write_all();
    @(negedge clk); f8_start = 1;
    @(negedge clk); f8_start = 0;
    while (!f8_done) @(negedge clk);
    host_read_all();
    for (int c = 0; c < NCH; c++) begin
      nb = (int'(f8_length[c]) + 63) / 64;
      if (nb == 0) n_idle++;
      if (f8_length[c] == 13'd5114) n_max++;
      checks++;
      if (int'(f8_blkcnt[c]) != (nb > 0 ? nb - 1 : 0)) begin
        failures++; $display("FAIL ch%0d block counter %0d", c, f8_blkcnt[c]);
      end
      a  = kasumi_ref({f8_count[c], f8_bearer[c], f8_direction[c], 26'b0}, f8_ck[c] ^ {16{8'h55}});
      ks = '0;
      for (int n = 0; n < nb; n++) begin
        ks = kasumi_ref(a ^ 64'(n) ^ ks, f8_ck[c]);
        if (mask_of(f8_length[c], n) != '1) n_partial++;
        checks++;
        if (res[c * 128 + n] !== ((msg[c * 128 + n] ^ ks) & mask_of(f8_length[c], n))) begin
          failures++;
          if (failures < 10) $display("FAIL f8 ch%0d blk%0d", c, n);
        end
      end
    end
  endtask

  // low-power core driver, runs alongside the f8 jobs
  initial begin
    logic [63:0] d, e;
    logic [127:0] k;
    t1_in_valid = 0; t1_in_data = '0; t1_in_key = '0;
    wait (rst_n);
    for (int i = 0; i < 60; i++) begin
      if (i == 0) begin d = 64'hEA024714AD5C4D84; k = 128'h2BD6459F82C5B300952C49104881FF48; end
      else begin d = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom}; end
      e = kasumi_ref(d, k);
      @(negedge clk);
      t1_in_valid = 1; t1_in_data = d; t1_in_key = k;
      while (!t1_in_ready) @(negedge clk);
      @(negedge clk); t1_in_valid = 0;
      while (!t1_out_valid) @(negedge clk);
      checks++; n_t1++;
      if (t1_out_data !== e) begin failures++; $display("FAIL t1 %h exp %h", t1_out_data, e); end
      if (i == 0 && t1_out_data !== 64'hDF1F9B251C0BF45F) failures++;
    end
  end

  initial begin
    host_wr_en = 0; host_rd_en = 0; host_wr_addr = '0; host_rd_addr = '0; host_wr_data = '0;
    f8_start = 0;
    foreach (msg[i]) msg[i] = {$urandom, $urandom};
    for (int c = 0; c < NCH; c++) begin
      f8_ck[c] = {$urandom, $urandom, $urandom, $urandom};
      f8_count[c] = $urandom; f8_bearer[c] = 5'($urandom); f8_direction[c] = 1'($urandom);
    end
    f8_ck[1] = 128'h2BD6459F82C5B300952C49104881FF48;
    f8_count[1] = 32'h72A4F20F; f8_bearer[1] = 5'h0C; f8_direction[1] = 1'b1;
    msg[128] = 64'h7EC61272743BF161;
    f8_length[0] = 13'd5114;
    f8_length[1] = 13'd798;
    f8_length[2] = 13'($urandom_range(1, 5114));
    f8_length[3] = 13'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    f8_job();
    checks++;
    if (res[128] !== 64'hD1E2DE70EEF86C69) begin failures++; $display("FAIL f8 test vector"); end
    // second job: decrypt the first job's output, all four channels in use
    begin
      logic [63:0] plain [512];
      plain = msg;
      msg = res;
      f8_length[3] = 13'd0;
      f8_job();
      for (int c = 0; c < NCH; c++)
        for (int n = 0; n < (int'(f8_length[c]) + 63) / 64; n++) begin
          checks++; n_roundtrip++;
          if (res[c * 128 + n] !== (plain[c * 128 + n] & mask_of(f8_length[c], n))) failures++;
        end
    end
    // third job: four active channels of different lengths
    for (int c = 0; c < NCH; c++) f8_length[c] = 13'($urandom_range(1, 5114));
    f8_job();
    while (n_t1 < 60) @(posedge clk);
    $display("mechanisms: keystream=%0d four-slot-passes=%0d partial=%0d idle=%0d max=%0d roundtrip=%0d t1=%0d",
             n_ks, n_slots4, n_partial, n_idle, n_max, n_roundtrip, n_t1);
    if (n_ks == 0) failures++;
    if (n_slots4 == 0) failures++;
    if (n_partial == 0) failures++;
    if (n_idle == 0) failures++;
    if (n_max == 0) failures++;
    if (n_roundtrip == 0) failures++;
    if (n_t1 == 0) failures++;
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
