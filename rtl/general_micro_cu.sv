// general_micro_cu - general microprogrammed control unit with branch
// condition, branch address and a hybrid control field.
//
// The control memory (CM) holds the microprogram. The control memory
// address register (CMAR, the micro-program counter) addresses it; the word
// read is registered in the micro-instruction register (uIR), whose fields
// are: a branch condition, a branch address and the control field. The
// condition field drives the select input of a multiplexer over the status
// flags; when the selected input is 1 the CMAR loads the branch address,
// otherwise it loads CMAR + 1. The reserved condition code COND_MAP instead
// loads the start address of the routine for the opcode in the IR:
//   map_addr = {1'b1, opcode, zeros}  (opcode 0..15 -> 128, 136, ..., 248
//   with the default 8-bit address), so each opcode owns an 8-word slot in
//   the upper half of the CM and the lower half is free for the fetch
//   routine and shared code.
// The control field has HORIZ_W horizontal bits, brought out unchanged on
// 'ctrl', and an ALU_FIELD_W-bit encoded field decoded into 2^ALU_FIELD_W
// one-hot lines on 'alu_op'.
//
// Timing: one micro-instruction per clock; 'ctrl' and 'alu_op' belong to
// the micro-instruction at address 'upc' throughout that cycle. The flags
// and the opcode are sampled in the cycle of the micro-instruction that
// tests them, so a flag or IR written by a micro-instruction can be tested
// by the next one. 'rst' is synchronous, active high; the unit starts at
// address 0. The microprogram is written through the cm_* port, normally
// while 'rst' is held.
//
// The blocks and their connections follow the usual block diagram of a
// microprogrammed control unit. All widths, the condition encoding, the IR
// mapping formula, the writable CM and the synchronous-read arrangement
// (CM addressed by the next address, its word captured by the uIR) are
// this design's choices.
module general_micro_cu
  import gmcu_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst,
  input  logic [G_OPCODE_W-1:0]          ir_opcode,
  input  logic [G_NFLAGS-1:0]            flags,
  input  logic                           cm_we,
  input  logic [G_ADDR_W-1:0]            cm_waddr,
  input  logic [G_UCODE_W-1:0]           cm_wdata,
  output logic [G_HORIZ_W-1:0]           ctrl,
  output logic [(1<<G_ALU_FIELD_W)-1:0]  alu_op,
  output logic [G_ADDR_W-1:0]            upc
);

  localparam int unsigned PAD_W = G_ADDR_W - 1 - G_OPCODE_W;

  g_uinstr_t           uir, cm_rdata;
  logic [G_ADDR_W-1:0] next_addr, map_addr;
  logic                load_branch, load_map;

  assign map_addr = {1'b1, ir_opcode, {PAD_W{1'b0}}};

  cond_mux #(.NFLAGS(G_NFLAGS), .SEL_W(G_COND_W)) u_mux (
    .flags       (flags),
    .sel         (uir.cond),
    .load_branch (load_branch),
    .load_map    (load_map)
  );

  cmar #(.ADDR_W(G_ADDR_W)) u_cmar (
    .clk         (clk),
    .rst         (rst),
    .load_map    (load_map),
    .map_addr    (map_addr),
    .load_branch (load_branch),
    .branch_addr (uir.baddr),
    .addr        (upc),
    .next_addr   (next_addr)
  );

  control_memory #(.ADDR_W(G_ADDR_W), .WIDTH(G_UCODE_W)) u_cm (
    .clk   (clk),
    .we    (cm_we),
    .waddr (cm_waddr),
    .wdata (cm_wdata),
    .raddr (next_addr),
    .rdata (cm_rdata)
  );

  micro_ir #(.WIDTH(G_UCODE_W)) u_uir (
    .clk (clk),
    .d   (cm_rdata),
    .q   (uir)
  );

  field_decoder #(.IN_W(G_ALU_FIELD_W)) u_alu_dec (
    .code  (uir.alu),
    .lines (alu_op)
  );

  assign ctrl = uir.horiz;

endmodule
