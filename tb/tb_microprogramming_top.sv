// tb_microprogramming_top - end-to-end test of both control units at their
// default sizes, each driving its own copy of a behavioural datapath that
// runs the same 16-byte program from RAM:
//   0: 1E  LOAD_ACC [E]      ACC <- 07, Z = 0
//   1: A5  JUMP_IF_ZERO 5    not taken (NOP routine, PC + 1)
//   2: 30  opcode 0011       not defined -> NOP routine
//   3: 1F  LOAD_ACC [F]      ACC <- 00, Z = 1
//   4: A5  JUMP_IF_ZERO 5    taken (JUMP routine; PC is left alone)
//   E: 07, F: 00
// Unit A runs its built-in microprogram. Unit B is first loaded, through
// its control-memory write port, with the same routines written in its own
// format (top ten horizontal bits = the same ten lines): fetch at 0-1 with
// the decode (map) step at 1, LOAD_ACC at 136-137, JUMP_IF_ZERO at 208 with
// a Z-conditional branch to 210 (jump) or fall-through to 209 (NOP), and a
// NOP routine in every other opcode slot. The test checks the micro-address
// sequence and instruction length of A, PC and ACC after every instruction
// of both units, and that both units reach the same architectural states.
// Mechanisms counted (each must occur): A: NEXT, DECODE, FETCH, LOAD_ACC
// routine, jump taken, jump not taken, undefined opcode; B: firmware load,
// map, unconditional branch, Z branch taken and not taken, increment, ALU
// field decode.
module tb_microprogramming_top;
  import gmcu_pkg::*;

  logic        clk = 0, rst;
  logic [3:0]  a_opcode, b_opcode;
  logic        a_z, b_z;
  logic [9:0]  a_ctrl;
  logic [7:0]  a_upc, b_upc;
  logic        b_we;
  logic [7:0]  b_waddr;
  logic [29:0] b_wdata;
  logic [15:0] b_ctrl;
  logic [7:0]  b_alu;
  logic [3:0]  a_pc, b_pc;
  logic [7:0]  a_acc, b_acc;
  int checks = 0, failures = 0;

  // mechanism counters
  int a_next = 0, a_decode = 0, a_fetch = 0, a_load = 0, a_jump = 0, a_nop_jz = 0, a_nop_undef = 0;
  int b_load_fw = 0, b_map = 0, b_always = 0, b_z_taken = 0, b_z_not = 0, b_inc = 0, b_alu_lines = 0;

  microprogramming_top dut (
    .clk(clk), .rst(rst),
    .a_opcode(a_opcode), .a_z_flag(a_z),
    .a_pc_out(a_ctrl[9]), .a_pc_inc(a_ctrl[8]), .a_mar_in(a_ctrl[7]), .a_ram_out(a_ctrl[6]),
    .a_ram_in(a_ctrl[5]), .a_ir_in(a_ctrl[4]), .a_acc_in(a_ctrl[3]), .a_acc_out(a_ctrl[2]),
    .a_temp_in(a_ctrl[1]), .a_alu_out(a_ctrl[0]), .a_upc(a_upc),
    .b_opcode(b_opcode), .b_flags({1'b0, b_z}), .b_cm_we(b_we), .b_cm_waddr(b_waddr),
    .b_cm_wdata(b_wdata), .b_ctrl(b_ctrl), .b_alu_op(b_alu), .b_upc(b_upc));

  hypo_datapath_model dp_a (
    .clk(clk), .pc_out(a_ctrl[9]), .pc_inc(a_ctrl[8]), .mar_in(a_ctrl[7]), .ram_out(a_ctrl[6]),
    .ram_in(a_ctrl[5]), .ir_in(a_ctrl[4]), .acc_in(a_ctrl[3]), .acc_out(a_ctrl[2]),
    .temp_in(a_ctrl[1]), .alu_out(a_ctrl[0]), .opcode(a_opcode), .z_flag(a_z),
    .pc(a_pc), .acc(a_acc));

  hypo_datapath_model dp_b (
    .clk(clk), .pc_out(b_ctrl[15]), .pc_inc(b_ctrl[14]), .mar_in(b_ctrl[13]), .ram_out(b_ctrl[12]),
    .ram_in(b_ctrl[11]), .ir_in(b_ctrl[10]), .acc_in(b_ctrl[9]), .acc_out(b_ctrl[8]),
    .temp_in(b_ctrl[7]), .alu_out(b_ctrl[6]), .opcode(b_opcode), .z_flag(b_z),
    .pc(b_pc), .acc(b_acc));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // B micro-instruction: {cond, branch address, {ten lines, 6'b0}, alu}
  function automatic logic [29:0] bw(input logic [2:0] cond, input logic [7:0] ba,
                                     input logic [9:0] lines, input logic [2:0] alu);
    return {cond, ba, lines, 6'b0, alu};
  endfunction

  task automatic load_b(input int a, input logic [29:0] w);
    b_we = 1; b_waddr = 8'(a); b_wdata = w;
    @(posedge clk); #1;
    b_we = 0;
    b_load_fw++;
  endtask

  localparam logic [9:0] F1 = 10'b1010000000, F2 = 10'b0001010000,
                         L1 = 10'b0010000000, L2 = 10'b0101001000,
                         J1 = 10'b0000000000, N1 = 10'b0100000000;

  // Expected states after each instruction (PC, ACC)
  logic [3:0] exp_pc  [5] = '{4'd1, 4'd2, 4'd3, 4'd4, 4'd4};
  logic [7:0] exp_acc [5] = '{8'h07, 8'h07, 8'h07, 8'h00, 8'h00};

  // Unit A: micro-address trace per instruction
  initial begin : unit_a
    logic [7:0] prog [16];
    int n, len;
    logic [7:0] upcs [$];
    prog = '{8'h1E, 8'hA5, 8'h30, 8'h1F, 8'hA5, 8'h00, 8'h00, 8'h00,
             8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h07, 8'h00};
    rst = 1; b_we = 0; b_waddr = 0; b_wdata = 0;
    // Firmware for B, loaded under reset
    for (int op = 0; op < 16; op++) load_b(128 + 8 * op, bw(COND_ALWAYS, 8'd0, N1, 3'd0));
    load_b(0,   bw(COND_NEVER,  8'd0,   F1, 3'd1));
    load_b(1,   bw(COND_MAP,    8'd0,   F2, 3'd2));
    load_b(136, bw(COND_NEVER,  8'd0,   L1, 3'd3));
    load_b(137, bw(COND_ALWAYS, 8'd0,   L2, 3'd4));
    load_b(208, bw(COND_Z,      8'd210, J1, 3'd5));
    load_b(209, bw(COND_ALWAYS, 8'd0,   N1, 3'd6));
    load_b(210, bw(COND_ALWAYS, 8'd0,   J1, 3'd7));
    // Both units now sit on word 0 (fetch), which moves no register
    // except MAR; start the datapaths from a clean state.
    dp_a.init(prog);
    dp_b.init(prog);
    @(posedge clk); #1;
    rst = 0;
    fork
      // ---------------- unit A ----------------
      begin
        for (n = 0; n < 6; n++) begin
          logic [7:0] exp [$];
          upcs = {};
          len = 0;
          do begin
            upcs.push_back(a_upc);
            // sequencing-code counters from the control lines' addresses
            if (a_upc == 8'd1) a_decode++;
            else if (a_upc == 8'd0 || a_upc == 8'd20) a_next++;
            else a_fetch++;
            len++;
            @(posedge clk); #1;
          end while (a_upc != 8'd0 && len < 10);
          case (n)
            0, 3: begin exp = '{0, 1, 20, 21}; a_load++; end
            1:    begin exp = '{0, 1, 16}; a_nop_jz++; end
            2:    begin exp = '{0, 1, 16}; a_nop_undef++; end
            default: begin exp = '{0, 1, 30}; a_jump++; end
          endcase
          checks++;
          if (upcs != exp) begin
            failures++;
            $display("A instr %0d: micro-address trace %p, expected %p", n, upcs, exp);
          end
          checks++;
          if (len != exp.size()) failures++;
          checks++;
          if (a_pc !== exp_pc[n > 4 ? 4 : n] || a_acc !== exp_acc[n > 4 ? 4 : n]) begin
            failures++;
            $display("A instr %0d: PC %0d ACC %h", n, a_pc, a_acc);
          end
        end
      end
      // ---------------- unit B ----------------
      begin
        int m;
        logic [7:0] prev;
        for (m = 0; m < 6; m++) begin
          int blen;
          blen = 0;
          do begin
            checks++;
            if (!$onehot(b_alu)) failures++;
            b_alu_lines |= 1 << $clog2(b_alu);
            prev = b_upc;
            @(posedge clk); #1;
            blen++;
            if (prev == 8'd1) b_map++;
            else if (prev == 8'd208) begin
              if (b_upc == 8'd210) b_z_taken++;
              else if (b_upc == 8'd209) b_z_not++;
            end
            else if (b_upc == prev + 1) b_inc++;
            else if (b_upc == 8'd0) b_always++;
          end while (b_upc != 8'd0 && blen < 10);
          checks++;
          if (b_pc !== exp_pc[m > 4 ? 4 : m] || b_acc !== exp_acc[m > 4 ? 4 : m]) begin
            failures++;
            $display("B instr %0d: PC %0d ACC %h", m, b_pc, b_acc);
          end
        end
      end
    join

    // both datapaths agree at the end
    checks++;
    if (a_pc !== b_pc || a_acc !== b_acc) failures++;
    $display("A: next %0d decode %0d fetch %0d load %0d jump %0d jz-nop %0d undef-nop %0d",
             a_next, a_decode, a_fetch, a_load, a_jump, a_nop_jz, a_nop_undef);
    $display("B: fw-words %0d map %0d always %0d z-taken %0d z-not %0d inc %0d alu-lines %08b",
             b_load_fw, b_map, b_always, b_z_taken, b_z_not, b_inc, b_alu_lines);
    checks++; if (a_next == 0)      begin failures++; $display("A NEXT never happened"); end
    checks++; if (a_decode == 0)    begin failures++; $display("A DECODE never happened"); end
    checks++; if (a_fetch == 0)     begin failures++; $display("A FETCH never happened"); end
    checks++; if (a_load == 0)      begin failures++; $display("A LOAD_ACC never happened"); end
    checks++; if (a_jump == 0)      begin failures++; $display("A jump taken never happened"); end
    checks++; if (a_nop_jz == 0)    begin failures++; $display("A jump not taken never happened"); end
    checks++; if (a_nop_undef == 0) begin failures++; $display("A undefined opcode never happened"); end
    checks++; if (b_load_fw == 0)   begin failures++; $display("B firmware load never happened"); end
    checks++; if (b_map == 0)       begin failures++; $display("B map never happened"); end
    checks++; if (b_always == 0)    begin failures++; $display("B branch never happened"); end
    checks++; if (b_z_taken == 0)   begin failures++; $display("B Z taken never happened"); end
    checks++; if (b_z_not == 0)     begin failures++; $display("B Z not taken never happened"); end
    checks++; if (b_inc == 0)       begin failures++; $display("B increment never happened"); end
    checks++; if (b_alu_lines != 32'hff) begin failures++; $display("B ALU lines not all seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
