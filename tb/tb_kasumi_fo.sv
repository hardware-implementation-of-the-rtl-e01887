// tb_kasumi_fo: random-vector check of the combinational FO function against
// the reference model.
module tb_kasumi_fo;
  import kasumi_ref_pkg::*;
  logic [31:0] din, dout;
  logic [15:0] ko [3];
  logic [15:0] ki [3];
  int checks = 0, failures = 0;

  kasumi_fo dut (.din(din), .ko1(ko[0]), .ko2(ko[1]), .ko3(ko[2]),
                 .ki1(ki[0]), .ki2(ki[1]), .ki3(ki[2]), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      din = $urandom;
      foreach (ko[j]) begin ko[j] = 16'($urandom); ki[j] = 16'($urandom); end
      #1;
      checks++;
      if (dout !== fo_ref(din, ko, ki)) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h got %h exp %h", din, dout, fo_ref(din, ko, ki));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
