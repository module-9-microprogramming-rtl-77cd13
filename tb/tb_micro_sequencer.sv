// tb_micro_sequencer - drives random sequencing codes and mapped addresses
// into the micro-sequencer and compares the uPC after every clock with a
// reference model: NEXT +1 (mod 256), DECODE map address, FETCH 0, HLT
// hold, reset 0. Each code must be seen at least once.
module tb_micro_sequencer;
  import hmcu_pkg::*;

  logic       clk = 0, rst;
  seq_e       seq;
  logic [7:0] map_addr, upc, next_upc;
  logic [7:0] model;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  micro_sequencer dut (.clk(clk), .rst(rst), .seq(seq), .map_addr(map_addr),
                       .upc(upc), .next_upc(next_upc));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; seq = SEQ_NEXT; map_addr = 0;
    @(posedge clk); #1;
    model = 0;
    checks++; if (upc !== 8'd0) failures++;
    rst = 0;
    // walk to 255 to test wrap
    map_addr = 8'd254; seq = SEQ_DECODE;
    @(posedge clk); #1; model = 8'd254;
    checks++; if (upc !== model) failures++;
    seq = SEQ_NEXT;
    repeat (3) begin
      @(posedge clk); #1; model = model + 1;
      checks++; if (upc !== model) begin failures++; $display("wrap: %0d vs %0d", upc, model); end
    end
    for (int i = 0; i < 2000; i++) begin
      logic [1:0] s;
      s = 2'($urandom_range(0, 3));
      seq = seq_e'(s);
      map_addr = 8'($urandom);
      rst = ($urandom_range(0, 49) == 0);
      #1;
      if (rst) model = 0;
      else case (s)
        2'd0: model = model + 1;
        2'd1: model = map_addr;
        2'd2: model = 0;
        default: model = model;
      endcase
      checks++;
      if (next_upc !== model) failures++;
      if (!rst) seen[s]++;
      @(posedge clk); #1;
      checks++;
      if (upc !== model) begin
        failures++;
        $display("step %0d seq %0d: upc %0d expected %0d", i, s, upc, model);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
