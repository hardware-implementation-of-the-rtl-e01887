// tb_kasumi_fl: random-vector check of the FL function against the
// reference model, plus two hand-worked vectors (all-zero key keeps R and L
// unchanged except for the OR term; all-ones KL1 rotates L into R).
module tb_kasumi_fl;
  import kasumi_ref_pkg::*;
  logic [31:0] din, dout, exp_v;
  logic [15:0] kl1, kl2;
  int checks = 0, failures = 0;

  kasumi_fl dut (.din(din), .kl1(kl1), .kl2(kl2), .dout(dout));

  task automatic check(input logic [31:0] e);
    checks++;
    if (dout !== e) begin
      failures++;
      $display("FAIL din=%h kl1=%h kl2=%h got %h exp %h", din, kl1, kl2, dout, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // L=8001, KL1=FFFF: R' = R ^ ROL1(8001) = 0000 ^ 0003 ; KL2=0: L' = 8001 ^ ROL1(0003)=8001^0006
    din = 32'h8001_0000; kl1 = 16'hFFFF; kl2 = 16'h0000; #1;
    check(32'h8007_0003);
    // zero key: R'=R, L' = L ^ ROL1(R)
    din = 32'h1234_8000; kl1 = 16'h0000; kl2 = 16'h0000; #1;
    check(32'h1235_8000);
    for (int i = 0; i < 2000; i++) begin
      din = $urandom; kl1 = 16'($urandom); kl2 = 16'($urandom); #1;
      check(fl_ref(din, kl1, kl2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
