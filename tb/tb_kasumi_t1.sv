// tb_kasumi_t1: the one-round KASUMI core. Runs the published KASUMI test
// vector (key 2BD6459F82C5B300952C49104881FF48, plaintext EA024714AD5C4D84,
// ciphertext DF1F9B251C0BF45F), then random blocks and keys back to back,
// checking results against the reference model and the 9-cycle latency.
module tb_kasumi_t1;
  import kasumi_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  logic [63:0] in_data, out_data;
  logic [127:0] in_key;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  kasumi_t1 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                 .in_data(in_data), .in_key(in_key), .out_valid(out_valid), .out_data(out_data));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] d, input logic [127:0] k, input logic [63:0] e);
    int t0;
    in_valid = 1; in_data = d; in_key = k;
    #1;
    while (!in_ready) begin @(posedge clk); #1; end
    t0 = cyc;
    @(posedge clk); #1;
    in_valid = 0;
    while (!out_valid) begin @(posedge clk); #1; end
    checks += 2;
    if (out_data !== e) begin
      failures++;
      $display("FAIL data %h key %h got %h exp %h", d, k, out_data, e);
    end
    if (cyc - t0 != 9) begin
      failures++;
      $display("FAIL latency %0d", cyc - t0);
    end
  endtask

  initial begin
    logic [63:0] d;
    logic [127:0] k;
    in_valid = 0; in_data = '0; in_key = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run(64'hEA024714AD5C4D84, 128'h2BD6459F82C5B300952C49104881FF48, 64'hDF1F9B251C0BF45F);
    for (int i = 0; i < 200; i++) begin
      d = {$urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      run(d, k, kasumi_ref(d, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
