// microprogramming_top - the two microprogrammed control units side by side.
//
// 'a_*' ports belong to hypo_micro_cu, the example unit with a 12-bit
// micro-instruction (2-bit sequencing field, 10 horizontal control lines)
// and a fixed microprogram for fetch, LOAD_ACC and JUMP_IF_ZERO. 'b_*'
// ports belong to general_micro_cu, the general unit with branch-condition
// multiplexer, branch-address field, loadable control memory and a hybrid
// control field. Neither unit includes a datapath: the control lines go
// out as ports and the opcode and status flags come in as ports. Both share
// the clock and the synchronous, active-high reset.
module microprogramming_top
  import hmcu_pkg::*;
  import gmcu_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst,
  // Example control unit
  input  logic [OPCODE_W-1:0]            a_opcode,
  input  logic                           a_z_flag,
  output logic                           a_pc_out,
  output logic                           a_pc_inc,
  output logic                           a_mar_in,
  output logic                           a_ram_out,
  output logic                           a_ram_in,
  output logic                           a_ir_in,
  output logic                           a_acc_in,
  output logic                           a_acc_out,
  output logic                           a_temp_in,
  output logic                           a_alu_out,
  output logic [UADDR_W-1:0]             a_upc,
  // General control unit
  input  logic [G_OPCODE_W-1:0]          b_opcode,
  input  logic [G_NFLAGS-1:0]            b_flags,
  input  logic                           b_cm_we,
  input  logic [G_ADDR_W-1:0]            b_cm_waddr,
  input  logic [G_UCODE_W-1:0]           b_cm_wdata,
  output logic [G_HORIZ_W-1:0]           b_ctrl,
  output logic [(1<<G_ALU_FIELD_W)-1:0]  b_alu_op,
  output logic [G_ADDR_W-1:0]            b_upc
);

  hypo_micro_cu u_a (
    .clk       (clk),
    .rst       (rst),
    .opcode_in (a_opcode),
    .z_flag    (a_z_flag),
    .pc_out    (a_pc_out),
    .pc_inc    (a_pc_inc),
    .mar_in    (a_mar_in),
    .ram_out   (a_ram_out),
    .ram_in    (a_ram_in),
    .ir_in     (a_ir_in),
    .acc_in    (a_acc_in),
    .acc_out   (a_acc_out),
    .temp_in   (a_temp_in),
    .alu_out   (a_alu_out),
    .upc       (a_upc)
  );

  general_micro_cu u_b (
    .clk       (clk),
    .rst       (rst),
    .ir_opcode (b_opcode),
    .flags     (b_flags),
    .cm_we     (b_cm_we),
    .cm_waddr  (b_cm_waddr),
    .cm_wdata  (b_cm_wdata),
    .ctrl      (b_ctrl),
    .alu_op    (b_alu_op),
    .upc       (b_upc)
  );

endmodule
