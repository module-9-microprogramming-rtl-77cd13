// gmcu_pkg - shared types and constants of the general microprogrammed
// control unit (general_micro_cu).
//
// A micro-instruction has three fields, most significant first:
//   branch condition (COND_W bits) | branch address (ADDR_W bits) |
//   control field (HORIZ_W horizontal bits, then ALU_FIELD_W encoded bits).
// The three-field layout follows the usual block diagram of a
// microprogrammed control unit. The widths and the condition encoding are
// this design's choices: a 16-bit horizontal part and a 3-bit encoded ALU
// field (eight mutually exclusive operations) make the control field a
// hybrid of horizontal and vertical microprogramming.
//
// Branch-condition codes (with NFLAGS = 2 status flags, Z = flag 0 and
// C = flag 1):
//   0 COND_NEVER   continue at CMAR + 1
//   1 COND_ALWAYS  load the branch address
//   2 COND_Z       load the branch address if Z = 1
//   3 COND_C       load the branch address if C = 1
//   4 COND_NZ      load the branch address if Z = 0
//   5 COND_NC      load the branch address if C = 0
//   6              reserved, behaves as COND_NEVER
//   7 COND_MAP     load the address mapped from the IR opcode
package gmcu_pkg;

  localparam int unsigned G_ADDR_W      = 8;
  localparam int unsigned G_NFLAGS      = 2;
  localparam int unsigned G_COND_W      = 3;
  localparam int unsigned G_HORIZ_W     = 16;
  localparam int unsigned G_ALU_FIELD_W = 3;
  localparam int unsigned G_OPCODE_W    = 4;

  localparam logic [G_COND_W-1:0] COND_NEVER  = 3'd0;
  localparam logic [G_COND_W-1:0] COND_ALWAYS = 3'd1;
  localparam logic [G_COND_W-1:0] COND_Z      = 3'd2;
  localparam logic [G_COND_W-1:0] COND_C      = 3'd3;
  localparam logic [G_COND_W-1:0] COND_NZ     = 3'd4;
  localparam logic [G_COND_W-1:0] COND_NC     = 3'd5;
  localparam logic [G_COND_W-1:0] COND_MAP    = 3'd7;

  typedef struct packed {
    logic [G_COND_W-1:0]      cond;
    logic [G_ADDR_W-1:0]      baddr;
    logic [G_HORIZ_W-1:0]     horiz;
    logic [G_ALU_FIELD_W-1:0] alu;
  } g_uinstr_t;

  localparam int unsigned G_UCODE_W = $bits(g_uinstr_t);

endpackage
