// tb_hypo_micro_cu - runs a random stream of instructions through the
// example control unit and checks, cycle by cycle, the micro-address and
// all ten control lines against the expected micro-routine:
//   every instruction: 0 {PC_OUT, MAR_IN}, 1 {RAM_OUT, IR_IN}
//   LOAD_ACC (0001):   20 {MAR_IN}, 21 {PC_INC, RAM_OUT, ACC_IN}
//   JUMP_ZERO, Z=1:    30 {}
//   JUMP_ZERO, Z=0 and any other opcode: 16 {PC_INC}
// It also checks the instruction lengths (4 clocks for LOAD_ACC, 3 for the
// rest) and that reset returns the unit to the fetch routine.
module tb_hypo_micro_cu;
  logic       clk = 0, rst;
  logic [3:0] opcode;
  logic       z;
  logic [9:0] ctrl;
  logic [7:0] upc;
  int checks = 0, failures = 0;
  int n_load = 0, n_jump = 0, n_nop = 0;

  hypo_micro_cu dut (
    .clk(clk), .rst(rst), .opcode_in(opcode), .z_flag(z),
    .pc_out(ctrl[9]), .pc_inc(ctrl[8]), .mar_in(ctrl[7]), .ram_out(ctrl[6]),
    .ram_in(ctrl[5]), .ir_in(ctrl[4]), .acc_in(ctrl[3]), .acc_out(ctrl[2]),
    .temp_in(ctrl[1]), .alu_out(ctrl[0]), .upc(upc)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(input logic [7:0] a, input logic [9:0] c);
    checks++;
    if (upc !== a || ctrl !== c) begin
      failures++;
      $display("t=%0t upc %0d ctrl %b, expected upc %0d ctrl %b", $time, upc, ctrl, a, c);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; opcode = 0; z = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      int unsigned r;
      int start_cycle, len;
      r = $urandom_range(0, 3);
      opcode = (r == 0) ? 4'b0001 : (r == 1) ? 4'b1010 : 4'($urandom);
      z = 1'($urandom);
      start_cycle = int'($time / 10);
      expect_cycle(8'd0, 10'b1010000000);
      expect_cycle(8'd1, 10'b0001010000);
      if (opcode == 4'b0001) begin
        n_load++;
        expect_cycle(8'd20, 10'b0010000000);
        expect_cycle(8'd21, 10'b0101001000);
        len = 4;
      end else if (opcode == 4'b1010 && z) begin
        n_jump++;
        expect_cycle(8'd30, 10'b0000000000);
        len = 3;
      end else begin
        n_nop++;
        expect_cycle(8'd16, 10'b0100000000);
        len = 3;
      end
      checks++;
      if (int'($time / 10) - start_cycle != len) failures++;
    end
    // reset in the middle of a routine
    opcode = 4'b0001;
    expect_cycle(8'd0, 10'b1010000000);
    expect_cycle(8'd1, 10'b0001010000);
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    expect_cycle(8'd0, 10'b1010000000);
    checks++;
    if (n_load == 0 || n_jump == 0 || n_nop == 0) failures++;
    $display("loads %0d jumps %0d nops %0d", n_load, n_jump, n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
