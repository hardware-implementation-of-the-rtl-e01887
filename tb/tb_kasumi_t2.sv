// tb_kasumi_t2: the four-stage pipelined KASUMI core. Offers blocks with
// independent random keys whenever the test wants (sometimes every cycle,
// sometimes with gaps), including the published KASUMI test vector, and
// checks every result against the reference model, its tag, and the
// 32-cycle latency. It also counts the cycles in which all four pipeline
// slots were busy and the cycles in which the core refused a block, and
// checks that a full pipeline delivers four blocks every 32 cycles.
module tb_kasumi_t2;
  import kasumi_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  logic [63:0] in_data, out_data;
  logic [127:0] in_key;
  logic [1:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  int cyc = 0, n_out = 0, n_stall = 0;
  int first_out = -1, last_out = -1;

  typedef struct { logic [63:0] exp_v; logic [1:0] tag; int t_in; } pend_t;
  pend_t q [$];

  always #5 clk = ~clk;

  kasumi_t2 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                 .in_data(in_data), .in_key(in_key), .in_tag(in_tag),
                 .out_valid(out_valid), .out_data(out_data), .out_tag(out_tag));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  // output checker, sampling between clock edges
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      pend_t p;
      n_out++;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      checks += 3;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        p = q.pop_front();
        if (out_data !== p.exp_v) begin failures++; $display("FAIL data %h exp %h", out_data, p.exp_v); end
        if (out_tag !== p.tag) begin failures++; $display("FAIL tag"); end
        if (cyc - p.t_in != 32) begin failures++; $display("FAIL latency %0d", cyc - p.t_in); end
      end
    end
    if (rst_n && in_valid && !in_ready) n_stall++;
  end

  task automatic offer(input logic [63:0] d, input logic [127:0] k, input logic [63:0] e);
    in_valid = 1; in_data = d; in_key = k; in_tag = 2'($urandom);
    #1;
    while (!in_ready) begin @(posedge clk); #1; end
    q.push_back('{exp_v: e, tag: in_tag, t_in: cyc});
    @(posedge clk); #2;
    in_valid = 0;
  endtask

  initial begin
    logic [63:0] d;
    logic [127:0] k;
    int t_full;
    in_valid = 0; in_data = '0; in_key = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    @(posedge clk); #2;
    // phase 1: the test vector plus 3 more, then keep the pipeline full
    offer(64'hEA024714AD5C4D84, 128'h2BD6459F82C5B300952C49104881FF48, 64'hDF1F9B251C0BF45F);
    for (int i = 0; i < 99; i++) begin
      d = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom};
      offer(d, k, kasumi_ref(d, k));
    end
    while (q.size() != 0) @(posedge clk);
    #2;
    // a full pipeline: 100 blocks, first out after 32 cycles, then 4 per 32
    checks++;
    if (last_out - first_out != 32 * (100 / 4 - 1) + 3) begin
      failures++;
      $display("FAIL throughput: outputs from %0d to %0d", first_out, last_out);
    end
    // phase 2: random gaps
    for (int i = 0; i < 100; i++) begin
      d = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom};
      offer(d, k, kasumi_ref(d, k));
      repeat ($urandom_range(0, 40)) @(posedge clk);
      #2;
    end
    while (q.size() != 0) @(posedge clk);
    #2;
    checks++;
    if (n_out != 200 || n_stall == 0) begin
      failures++;
      $display("FAIL outputs %0d stalls %0d", n_out, n_stall);
    end
    $display("stalled offers: %0d cycles", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
