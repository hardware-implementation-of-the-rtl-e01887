// tb_kasumi_fo_pipe: streams a new random FO input every clock, supplies the
// three subkey pairs with the delays the pipeline expects (0, 1 and 2
// cycles), and checks that each result appears exactly 3 clocks later.
module tb_kasumi_fo_pipe;
  import kasumi_ref_pkg::*;
  localparam int N = 500;
  logic clk = 0;
  logic [31:0] din, dout;
  logic [15:0] ko1, ki1, ko2, ki2, ko3, ki3;
  logic [31:0] vin [N];
  logic [15:0] vko [N][3];
  logic [15:0] vki [N][3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kasumi_fo_pipe dut (.clk(clk), .din(din), .ko1(ko1), .ki1(ki1), .ko2(ko2), .ki2(ki2),
                      .ko3(ko3), .ki3(ki3), .dout(dout));

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      vin[i] = $urandom;
      for (int j = 0; j < 3; j++) begin vko[i][j] = 16'($urandom); vki[i][j] = 16'($urandom); end
    end
    for (int t = 0; t < N + 3; t++) begin
      // cycle t: vector t in stage 0, t-1 in stage 1, t-2 in stage 2
      din = (t < N) ? vin[t] : '0;
      ko1 = (t < N) ? vko[t][0] : '0;
      ki1 = (t < N) ? vki[t][0] : '0;
      ko2 = (t >= 1 && t - 1 < N) ? vko[t-1][1] : '0;
      ki2 = (t >= 1 && t - 1 < N) ? vki[t-1][1] : '0;
      ko3 = (t >= 2 && t - 2 < N) ? vko[t-2][2] : '0;
      ki3 = (t >= 2 && t - 2 < N) ? vki[t-2][2] : '0;
      #1;
      if (t >= 3) begin
        checks++;
        if (dout !== fo_ref(vin[t-3], vko[t-3], vki[t-3])) begin
          failures++;
          if (failures < 10) $display("FAIL vector %0d got %h", t - 3, dout);
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
