// tb_opcode_map - checks the start address for all 16 opcodes with the
// zero flag both 0 and 1: 0001 -> 20, 1010 -> 30 (Z=1) or 16 (Z=0),
// everything else -> 16.
module tb_opcode_map;
  logic [3:0] opcode;
  logic       z;
  logic [7:0] start;
  int checks = 0, failures = 0;

  opcode_map dut (.opcode(opcode), .z_flag(z), .start_addr(start));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 16; op++) begin
      for (int zz = 0; zz < 2; zz++) begin
        logic [7:0] exp;
        opcode = 4'(op);
        z = 1'(zz);
        #1;
        if (op == 1) exp = 8'd20;
        else if (op == 10) exp = (zz != 0) ? 8'd30 : 8'd16;
        else exp = 8'd16;
        checks++;
        if (start !== exp) begin
          failures++;
          $display("op %b z %0d: got %0d expected %0d", opcode, z, start, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
