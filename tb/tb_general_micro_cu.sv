// tb_general_micro_cu - loads the control memory of the general control
// unit with random micro-instructions (through the write port, under
// reset), then runs it with random status flags and IR opcodes and checks,
// every cycle, the micro-address, the 16 horizontal control bits and the
// decoded one-hot ALU lines against a reference model of the sequencing
// rules: condition 0/6 -> +1, 1 -> branch, 2 Z, 3 C, 4 !Z, 5 !C -> branch
// if true else +1, 7 -> {1, opcode, 000}. A second phase loads a short
// directed microprogram (fetch, decode, a conditional loop) and checks the
// path it takes. Every condition code must occur taken and not taken.
module tb_general_micro_cu;
  import gmcu_pkg::*;

  logic        clk = 0, rst;
  logic [3:0]  opcode;
  logic [1:0]  flags;
  logic        we;
  logic [7:0]  waddr;
  logic [29:0] wdata;
  logic [15:0] ctrl;
  logic [7:0]  alu_op;
  logic [7:0]  upc;
  logic [29:0] ref_mem [256];
  logic [7:0]  model;
  int checks = 0, failures = 0;
  int taken [8] = '{default: 0};
  int not_taken [8] = '{default: 0};

  general_micro_cu dut (
    .clk(clk), .rst(rst), .ir_opcode(opcode), .flags(flags),
    .cm_we(we), .cm_waddr(waddr), .cm_wdata(wdata),
    .ctrl(ctrl), .alu_op(alu_op), .upc(upc));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [29:0] uword(input logic [2:0] cond, input logic [7:0] ba,
                                        input logic [15:0] h, input logic [2:0] alu);
    return {cond, ba, h, alu};
  endfunction

  task automatic load(input int a, input logic [29:0] w);
    we = 1; waddr = 8'(a); wdata = w; ref_mem[a] = w;
    @(posedge clk); #1;
    we = 0;
  endtask

  // check outputs against ref_mem[model], then compute the model's next address
  task automatic step_and_check();
    logic [29:0] w;
    logic [2:0]  c;
    logic        t;
    w = ref_mem[model];
    checks++;
    if (upc !== model || ctrl !== w[18:3] || alu_op !== (8'd1 << w[2:0])) begin
      failures++;
      $display("t=%0t upc %0d/%0d ctrl %h/%h alu %b/%b", $time, upc, model,
               ctrl, w[18:3], alu_op, 8'd1 << w[2:0]);
    end
    c = w[29:27];
    case (c)
      3'd1: t = 1;
      3'd2: t = flags[0];
      3'd3: t = flags[1];
      3'd4: t = !flags[0];
      3'd5: t = !flags[1];
      default: t = 0;
    endcase
    if (c == 3'd7) begin model = {1'b1, opcode, 3'b000}; taken[7]++; end
    else if (t)    begin model = w[26:19]; taken[c]++; end
    else           begin model = model + 1; not_taken[c]++; end
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; we = 0; waddr = 0; wdata = 0; opcode = 0; flags = 0;
    for (int a = 0; a < 256; a++) load(a, 30'({$urandom, $urandom} >> 2));
    @(posedge clk); #1;
    rst = 0;
    model = 0;
    for (int i = 0; i < 20000; i++) begin
      flags = 2'($urandom);
      opcode = 4'($urandom);
      step_and_check();
    end

    // Directed program: 3-cycle fetch, decode, opcode 5 routine that loops
    // on C = 0, then leaves on C = 1 and returns to fetch.
    rst = 1;
    load(0,   uword(3'd0, 8'd0,   16'h8001, 3'd0)); // fetch 1
    load(1,   uword(3'd0, 8'd0,   16'h4002, 3'd0)); // fetch 2
    load(2,   uword(3'd7, 8'd0,   16'h0000, 3'd0)); // decode
    load(168, uword(3'd0, 8'd0,   16'h0010, 3'd5)); // opcode 5: {1,0101,000} = 168
    load(169, uword(3'd5, 8'd169, 16'h0020, 3'd2)); // loop while C = 0
    load(170, uword(3'd1, 8'd0,   16'h0040, 3'd7)); // back to fetch
    @(posedge clk); #1;
    rst = 0; model = 0; opcode = 4'd5; flags = 2'b00;
    begin
      logic [7:0] path [$];
      logic [7:0] exp_path [$];
      int k;
      exp_path = '{0, 1, 2, 168, 169, 169, 169, 170, 0};
      for (k = 0; k < 9; k++) begin
        flags[1] = (k >= 6);
        path.push_back(upc);
        step_and_check();
      end
      checks++;
      if (path != exp_path) begin failures++; $display("directed path wrong"); end
    end

    for (int c = 1; c < 6; c++) begin
      checks++;
      if (taken[c] == 0) begin failures++; $display("cond %0d never taken", c); end
    end
    for (int c = 2; c < 6; c++) begin
      checks++;
      if (not_taken[c] == 0) begin failures++; $display("cond %0d never not taken", c); end
    end
    checks++;
    if (taken[7] == 0 || not_taken[0] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
