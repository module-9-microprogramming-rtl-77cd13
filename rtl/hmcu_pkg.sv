// hmcu_pkg - shared types and constants of the example microprogrammed
// control unit (hypo_micro_cu).
//
// A micro-instruction is 12 bits: a 2-bit sequencing field in bits [11:10]
// followed by a 10-bit horizontal control field in bits [9:0], one bit per
// datapath control line, PC_OUT in bit 9 down to ALU_OUT in bit 0. The
// sequencing codes, the routine addresses (fetch at 0, NOP at 16, LOAD_ACC
// at 20, JUMP at 30), the two decoded opcodes and the contents of the
// control store follow the example unit this design is modelled on. Words
// that the microprogram does not define are zero, which reads as "no control
// line, go to the next address".
package hmcu_pkg;

  localparam int unsigned UADDR_W  = 8;   // micro-address width
  localparam int unsigned CS_DEPTH = 256; // control store words
  localparam int unsigned SEQ_W    = 2;
  localparam int unsigned CTRL_W   = 10;
  localparam int unsigned UCODE_W  = SEQ_W + CTRL_W;
  localparam int unsigned OPCODE_W = 4;

  typedef logic [UADDR_W-1:0] uaddr_t;

  // Sequencing field
  typedef enum logic [SEQ_W-1:0] {
    SEQ_NEXT   = 2'b00, // uPC + 1
    SEQ_DECODE = 2'b01, // jump to the routine mapped from opcode and Z flag
    SEQ_FETCH  = 2'b10, // back to the fetch routine at 0
    SEQ_HLT    = 2'b11  // stay on this address
  } seq_e;

  // Horizontal control field; the first member is the most significant bit.
  typedef struct packed {
    logic pc_out;   // bit 9
    logic pc_inc;   // bit 8
    logic mar_in;   // bit 7
    logic ram_out;  // bit 6
    logic ram_in;   // bit 5
    logic ir_in;    // bit 4
    logic acc_in;   // bit 3
    logic acc_out;  // bit 2
    logic temp_in;  // bit 1
    logic alu_out;  // bit 0
  } ctrl_t;

  typedef struct packed {
    seq_e  seq;  // bits [11:10]
    ctrl_t ctrl; // bits [9:0]
  } uinstr_t;

  // Opcodes the mapping logic knows
  localparam logic [OPCODE_W-1:0] OP_LOAD_ACC  = 4'b0001;
  localparam logic [OPCODE_W-1:0] OP_JUMP_ZERO = 4'b1010;

  // Micro-routine start addresses
  localparam uaddr_t UADDR_FETCH = 8'd0;
  localparam uaddr_t UADDR_NOP   = 8'd16;
  localparam uaddr_t UADDR_LDA   = 8'd20;
  localparam uaddr_t UADDR_JMP   = 8'd30;

  // Control field of each defined micro-instruction
  localparam ctrl_t C_FETCH1 = 10'b10_1000_0000; // PC_OUT, MAR_IN
  localparam ctrl_t C_FETCH2 = 10'b00_0101_0000; // RAM_OUT, IR_IN
  localparam ctrl_t C_LDA1   = 10'b00_1000_0000; // MAR_IN (address from IR)
  localparam ctrl_t C_LDA2   = 10'b01_0100_1000; // PC_INC, RAM_OUT, ACC_IN
  localparam ctrl_t C_JUMP1  = 10'b00_0000_0000; // no line driven
  localparam ctrl_t C_NOP1   = 10'b01_0000_0000; // PC_INC

  // The microprogram: contents of control store word 'addr'.
  function automatic uinstr_t cs_word(input uaddr_t addr);
    unique case (addr)
      8'd0:    return '{seq: SEQ_NEXT,   ctrl: C_FETCH1};
      8'd1:    return '{seq: SEQ_DECODE, ctrl: C_FETCH2};
      8'd16:   return '{seq: SEQ_FETCH,  ctrl: C_NOP1};
      8'd20:   return '{seq: SEQ_NEXT,   ctrl: C_LDA1};
      8'd21:   return '{seq: SEQ_FETCH,  ctrl: C_LDA2};
      8'd30:   return '{seq: SEQ_FETCH,  ctrl: C_JUMP1};
      default: return '0;
    endcase
  endfunction

endpackage
