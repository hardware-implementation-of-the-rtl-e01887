// tb_kasumi_fi: checks that the S7 and S9 tables are permutations, then
// compares the FI function with the reference model on random vectors and on
// all 65536 inputs for one fixed subkey.
module tb_kasumi_fi;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;
  logic [15:0] din, ki, dout;
  int checks = 0, failures = 0;
  bit seen7 [128];
  bit seen9 [512];

  kasumi_fi dut (.din(din), .ki(ki), .dout(dout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (S7_TABLE[i]) seen7[S7_TABLE[i]] = 1'b1;
    foreach (S9_TABLE[i]) seen9[S9_TABLE[i]] = 1'b1;
    foreach (seen7[i]) begin checks++; if (!seen7[i]) failures++; end
    foreach (seen9[i]) begin checks++; if (!seen9[i]) failures++; end
    ki = 16'hA5C3;
    for (int v = 0; v < 65536; v++) begin
      din = 16'(v); #1;
      checks++;
      if (dout !== fi_ref(din, ki)) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h ki=%h got %h exp %h", din, ki, dout, fi_ref(din, ki));
      end
    end
    for (int i = 0; i < 5000; i++) begin
      din = 16'($urandom); ki = 16'($urandom); #1;
      checks++;
      if (dout !== fi_ref(din, ki)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
