// opcode_map - the mapping logic used by the DECODE step of the example
// control unit.
//
// Purely combinational. It translates the 4-bit opcode of the instruction
// and the zero flag into the first micro-address of the routine that
// executes it: LOAD_ACC (0001) starts at 20; JUMP_IF_ZERO (1010) starts the
// JUMP routine at 30 when Z is 1 and the NOP routine at 16 when Z is 0;
// every other opcode is treated as invalid and runs the NOP routine. The
// table is the one of the example unit; only these two opcodes are defined.
module opcode_map
  import hmcu_pkg::*;
(
  input  logic [OPCODE_W-1:0] opcode,
  input  logic                z_flag,
  output uaddr_t              start_addr
);

  always_comb begin
    unique case (opcode)
      OP_LOAD_ACC:  start_addr = UADDR_LDA;
      OP_JUMP_ZERO: start_addr = z_flag ? UADDR_JMP : UADDR_NOP;
      default:      start_addr = UADDR_NOP;
    endcase
  end

endmodule
