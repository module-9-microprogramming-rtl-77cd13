// tb_control_store - checks every word of the example control store
// against the expected microprogram, written here as raw 12-bit values
// {seq[1:0], PC_OUT PC_INC MAR_IN RAM_OUT RAM_IN IR_IN ACC_IN ACC_OUT
// TEMP_IN ALU_OUT}: words 0, 1, 16, 20, 21, 30 hold the fetch, NOP,
// LOAD_ACC and JUMP routines, all others must be zero.
module tb_control_store;
  import hmcu_pkg::*;

  logic [7:0]  addr;
  uinstr_t     data;
  int checks = 0, failures = 0;

  control_store dut (.addr(addr), .data(data));

  function automatic logic [11:0] expected(input int a);
    case (a)
      0:  return 12'b00_1010000000; // NEXT,   PC_OUT MAR_IN
      1:  return 12'b01_0001010000; // DECODE, RAM_OUT IR_IN
      16: return 12'b10_0100000000; // FETCH,  PC_INC
      20: return 12'b00_0010000000; // NEXT,   MAR_IN
      21: return 12'b10_0101001000; // FETCH,  PC_INC RAM_OUT ACC_IN
      30: return 12'b10_0000000000; // FETCH,  nothing
      default: return 12'b0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      checks++;
      if (data !== expected(a)) begin
        failures++;
        $display("addr %0d: got %b expected %b", a, data, expected(a));
      end
    end
    // field view
    addr = 8'd1; #1;
    checks++;
    if (data.seq != SEQ_DECODE || !data.ctrl.ram_out || !data.ctrl.ir_in) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
