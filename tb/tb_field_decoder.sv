// tb_field_decoder - every 3-bit code must raise exactly its own line of
// the eight; a 2-bit instance is checked as well.
module tb_field_decoder;
  logic [2:0] code;
  logic [7:0] lines;
  logic [1:0] code2;
  logic [3:0] lines2;
  int checks = 0, failures = 0;

  field_decoder #(.IN_W(3)) dut  (.code(code),  .lines(lines));
  field_decoder #(.IN_W(2)) dut2 (.code(code2), .lines(lines2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      code = 3'(c); code2 = 2'(c); #1;
      checks++;
      if (lines !== (8'd1 << c)) begin failures++; $display("code %0d: %b", c, lines); end
      checks++;
      if (lines2 !== (4'd1 << (c % 4))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
