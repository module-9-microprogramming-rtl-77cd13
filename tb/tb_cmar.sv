// tb_cmar - random load_map / load_branch / reset requests against a
// reference model of the control memory address register: reset 0, map
// address first, then branch address, else +1 with wrap at 256.
module tb_cmar;
  logic       clk = 0, rst, lm, lb;
  logic [7:0] ma, ba, addr, next_addr, model;
  int checks = 0, failures = 0;
  int n_inc = 0, n_map = 0, n_br = 0;

  cmar #(.ADDR_W(8)) dut (.clk(clk), .rst(rst), .load_map(lm), .map_addr(ma),
                          .load_branch(lb), .branch_addr(ba),
                          .addr(addr), .next_addr(next_addr));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; lm = 0; lb = 0; ma = 0; ba = 0;
    @(posedge clk); #1;
    model = 0;
    checks++; if (addr !== 0) failures++;
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      rst = ($urandom_range(0, 63) == 0);
      lm = ($urandom_range(0, 3) == 0);
      lb = ($urandom_range(0, 2) == 0);
      ma = 8'($urandom); ba = 8'($urandom);
      if (i > 2500) begin lm = 0; lb = 0; rst = 0; end // long run of +1 to wrap
      #1;
      if (rst) model = 0;
      else if (lm) begin model = ma; n_map++; end
      else if (lb) begin model = ba; n_br++; end
      else begin model = model + 1; n_inc++; end
      checks++;
      if (next_addr !== model) failures++;
      @(posedge clk); #1;
      checks++;
      if (addr !== model) begin failures++; $display("step %0d: %0d vs %0d", i, addr, model); end
    end
    checks++;
    if (n_inc == 0 || n_map == 0 || n_br == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
