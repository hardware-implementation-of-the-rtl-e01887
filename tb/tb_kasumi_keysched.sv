// tb_kasumi_keysched: loads four different keys in four consecutive cycles
// (one per pipeline slot), then four new keys exactly 32 cycles later as the
// first blocks leave, and checks every tap in every cycle against the
// reference key schedule for the block and round that occupy that stage.
module tb_kasumi_keysched;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;
  logic clk = 0;
  logic load;
  logic [127:0] key_in;
  logic [2:0] r0, r1, r2, r3;
  logic [15:0] kl1_s0, kl2_s0, ko1_s0, ki1_s0, ko2_s1, ki2_s1, ko3_s2, ki3_s2, kl1_s3, kl2_s3;
  logic [127:0] keys [72];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kasumi_keysched dut (.clk(clk), .load(load), .key_in(key_in),
    .round_s0(r0), .round_s1(r1), .round_s2(r2), .round_s3(r3),
    .kl1_s0(kl1_s0), .kl2_s0(kl2_s0), .ko1_s0(ko1_s0), .ki1_s0(ki1_s0),
    .ko2_s1(ko2_s1), .ki2_s1(ki2_s1), .ko3_s2(ko3_s2), .ki3_s2(ki3_s2),
    .kl1_s3(kl1_s3), .kl2_s3(kl2_s3));

  function automatic bit is_entry(int c);
    return (c % 32) < 4 && c < 68;
  endfunction

  // block occupying stage k in cycle t: entered in cycle e, now in round rnd
  function automatic bit occ(int t, int k, output int e, output int rnd);
    int m;
    m = t - 1 - k;
    if (m < 0) return 0;
    e   = (m / 32) * 32 + (m % 4);
    rnd = (m % 32) / 4;
    return e < 68;
  endfunction

  task automatic cmp(input logic [15:0] got, input logic [15:0] exp_v, input string what, input int t);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d %s got %h exp %h", t, what, got, exp_v);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, e1, e2, e3, q0, q1, q2, q3;
    bit o0, o1, o2, o3;
    logic [127:0] sk;
    foreach (keys[i]) keys[i] = {$urandom, $urandom, $urandom, $urandom};
    for (int t = 0; t < 100; t++) begin
      o0 = occ(t, 0, e0, q0); o1 = occ(t, 1, e1, q1);
      o2 = occ(t, 2, e2, q2); o3 = occ(t, 3, e3, q3);
      r0 = o0 ? 3'(q0) : '0; r1 = o1 ? 3'(q1) : '0;
      r2 = o2 ? 3'(q2) : '0; r3 = o3 ? 3'(q3) : '0;
      load   = is_entry(t);
      key_in = keys[t < 72 ? t : 0];
      #1;
      if (o0) begin
        sk = subkeys_ref(keys[e0], q0);
        cmp(kl1_s0, sk[127:112], "KL1 s0", t); cmp(kl2_s0, sk[111:96], "KL2 s0", t);
        cmp(ko1_s0, sk[95:80], "KO1", t);      cmp(ki1_s0, sk[47:32], "KI1", t);
      end
      if (o1) begin
        sk = subkeys_ref(keys[e1], q1);
        cmp(ko2_s1, sk[79:64], "KO2", t); cmp(ki2_s1, sk[31:16], "KI2", t);
      end
      if (o2) begin
        sk = subkeys_ref(keys[e2], q2);
        cmp(ko3_s2, sk[63:48], "KO3", t); cmp(ki3_s2, sk[15:0], "KI3", t);
      end
      if (o3) begin
        sk = subkeys_ref(keys[e3], q3);
        cmp(kl1_s3, sk[127:112], "KL1 s3", t); cmp(kl2_s3, sk[111:96], "KL2 s3", t);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
