// hypo_datapath_model - behavioural model of a small single-bus datapath
// (testbench only, not synthesizable design) for the ten control lines of
// the example control unit: PC (4 bits), MAR (4 bits), IR (8 bits), ACC,
// TEMP (8 bits) and a 16 x 8 RAM.
//
// Bus sources: PC_OUT -> PC, RAM_OUT -> RAM[MAR], ACC_OUT -> ACC,
// ALU_OUT -> ACC + TEMP; with no source enabled the bus carries the address
// field IR[3:0], which is how the LOAD routine's lone MAR_IN gets its
// address. On the clock edge: MAR_IN, IR_IN, ACC_IN, TEMP_IN load from the
// bus, RAM_IN writes RAM[MAR], PC_INC increments PC. 'opcode' forwards the
// bus while IR_IN is asserted, because the control unit decodes in the same
// cycle as it loads the IR. 'z_flag' is ACC == 0. The JUMP routine drives
// no line, so this model leaves PC unchanged on a taken jump.
module hypo_datapath_model (
  input  logic       clk,
  input  logic       pc_out, pc_inc, mar_in, ram_out, ram_in,
  input  logic       ir_in, acc_in, acc_out, temp_in, alu_out,
  output logic [3:0] opcode,
  output logic       z_flag,
  output logic [3:0] pc,
  output logic [7:0] acc
);
  logic [3:0] mar;
  logic [7:0] ir, temp, bus;
  logic [7:0] ram [16];

  always_comb begin
    if (pc_out)       bus = {4'b0, pc};
    else if (ram_out) bus = ram[mar];
    else if (acc_out) bus = acc;
    else if (alu_out) bus = acc + temp;
    else              bus = {4'b0, ir[3:0]};
  end

  assign opcode = ir_in ? bus[7:4] : ir[7:4];
  assign z_flag = (acc == 8'd0);

  always @(posedge clk) begin
    if (mar_in)  mar  <= bus[3:0];
    if (ir_in)   ir   <= bus;
    if (acc_in)  acc  <= bus;
    if (temp_in) temp <= bus;
    if (ram_in)  ram[mar] <= bus;
    if (pc_inc)  pc   <= pc + 1'b1;
  end

  // Load a program and clear the registers (called by the testbench).
  task automatic init(input logic [7:0] prog [16]);
    for (int i = 0; i < 16; i++) ram[i] = prog[i];
    pc = 0; mar = 0; ir = 0; acc = 8'hff; temp = 0;
  endtask
endmodule
