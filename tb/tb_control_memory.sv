// tb_control_memory - fills the whole 256 x 30 control memory with random
// words, reads all back, rewrites random addresses with reads in between,
// and checks a read of an address in the cycle it is written returns the
// old word.
module tb_control_memory;
  logic        clk = 0, we;
  logic [7:0]  waddr, raddr;
  logic [29:0] wdata, rdata;
  logic [29:0] ref_mem [256];
  int checks = 0, failures = 0;

  control_memory #(.ADDR_W(8), .WIDTH(30)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(posedge clk); #1;
    for (int a = 0; a < 256; a++) begin
      we = 1; waddr = 8'(a); wdata = 30'($urandom); ref_mem[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int a = 0; a < 256; a++) begin
      raddr = 8'(a); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("a %0d: %h vs %h", a, rdata, ref_mem[a]); end
    end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); waddr = 8'($urandom); wdata = 30'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 8'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) failures++; // old word before the edge
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== ref_mem[raddr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
