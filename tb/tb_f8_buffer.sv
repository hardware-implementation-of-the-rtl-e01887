// tb_f8_buffer: writes random words to random addresses of the buffer while
// reading others, and checks that read data appear one clock after the read
// request and hold while re is low.
module tb_f8_buffer;
  logic clk = 0;
  logic we, re;
  logic [8:0] waddr, raddr;
  logic [63:0] wdata, rdata, model [512], last;
  bit written [512];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  f8_buffer dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 1; waddr = 9'(i); wdata = {$urandom, $urandom}; model[i] = wdata; written[i] = 1;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 9'($urandom); wdata = {$urandom, $urandom};
      re = 1'($urandom); raddr = 9'($urandom);
      if (re) last = model[raddr];
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== last) begin
        failures++;
        if (failures < 10) $display("FAIL read %h exp %h", rdata, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
