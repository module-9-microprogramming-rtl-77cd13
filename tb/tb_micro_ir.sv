// tb_micro_ir - loads random words into the micro-instruction register and
// checks that each appears on the output one clock later and holds for the
// whole following cycle.
module tb_micro_ir;
  logic        clk = 0;
  logic [11:0] d, q, prev;
  int checks = 0, failures = 0;

  micro_ir #(.WIDTH(12)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 12'h5a5;
    @(posedge clk); #1;
    prev = d;
    for (int i = 0; i < 500; i++) begin
      d = 12'($urandom);
      #2;
      checks++;
      if (q !== prev) failures++; // input change must not show before the edge
      @(posedge clk); #1;
      checks++;
      if (q !== d) begin failures++; $display("q %h expected %h", q, d); end
      prev = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
