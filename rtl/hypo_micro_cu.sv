// hypo_micro_cu - the example microprogrammed control unit.
//
// A small "computer inside the CPU": the micro-sequencer keeps a
// micro-program counter, the control store holds one micro-routine per
// instruction, and the micro-instruction register (uIR) drives ten datapath
// control lines. Fetch runs at micro-addresses 0 and 1; the word at 1 says
// DECODE, so the sequencer jumps to the routine mapped from 'opcode_in' and
// 'z_flag' (LOAD_ACC at 20-21, JUMP at 30 when Z=1, NOP at 16 otherwise);
// the last word of each routine says FETCH and returns to 0.
//
// Timing: one micro-instruction per clock. The control lines of the
// micro-instruction at address 'upc' are valid throughout that cycle. A
// LOAD_ACC instruction takes 4 clocks, JUMP_IF_ZERO and any other opcode 3.
// 'opcode_in' and 'z_flag' are sampled in the cycle of micro-address 1, the
// same cycle that asserts IR_IN, so the datapath must present the opcode of
// the instruction being loaded during that cycle. 'rst' is synchronous and
// active high; after it the unit starts at address 0.
//
// Structure, field layout, sequencing codes, addresses and microprogram
// follow the example unit. Holding the word in a real register addressed by
// the next micro-address (rather than reading the store combinationally
// from the uPC) is this design's choice; it gives the same cycle behaviour.
// An assertion checks that no micro-instruction enables more than one bus
// source (PC_OUT, RAM_OUT, ACC_OUT, ALU_OUT).
module hypo_micro_cu
  import hmcu_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [OPCODE_W-1:0] opcode_in,
  input  logic                z_flag,
  output logic                pc_out,
  output logic                pc_inc,
  output logic                mar_in,
  output logic                ram_out,
  output logic                ram_in,
  output logic                ir_in,
  output logic                acc_in,
  output logic                acc_out,
  output logic                temp_in,
  output logic                alu_out,
  output uaddr_t              upc
);

  uaddr_t  map_addr, next_upc;
  uinstr_t cs_data, uir;

  opcode_map u_map (
    .opcode     (opcode_in),
    .z_flag     (z_flag),
    .start_addr (map_addr)
  );

  micro_sequencer #(.ADDR_W(UADDR_W)) u_seq (
    .clk      (clk),
    .rst      (rst),
    .seq      (uir.seq),
    .map_addr (map_addr),
    .upc      (upc),
    .next_upc (next_upc)
  );

  control_store #(.DEPTH(CS_DEPTH)) u_cs (
    .addr (next_upc),
    .data (cs_data)
  );

  micro_ir #(.WIDTH(UCODE_W)) u_uir (
    .clk (clk),
    .d   (cs_data),
    .q   (uir)
  );

  assign pc_out  = uir.ctrl.pc_out;
  assign pc_inc  = uir.ctrl.pc_inc;
  assign mar_in  = uir.ctrl.mar_in;
  assign ram_out = uir.ctrl.ram_out;
  assign ram_in  = uir.ctrl.ram_in;
  assign ir_in   = uir.ctrl.ir_in;
  assign acc_in  = uir.ctrl.acc_in;
  assign acc_out = uir.ctrl.acc_out;
  assign temp_in = uir.ctrl.temp_in;
  assign alu_out = uir.ctrl.alu_out;

  // Single shared bus: the microprogram never enables two bus sources in
  // the same micro-instruction.
  a_one_bus_source: assert property (@(posedge clk) disable iff (rst)
    $onehot0({pc_out, ram_out, acc_out, alu_out}))
    else $error("hypo_micro_cu: more than one bus source at uPC %0d", upc);

endmodule
