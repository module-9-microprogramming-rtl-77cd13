// cmar - control memory address register (the micro-program counter) with
// its +1 incrementer.
//
// 'addr' (the CMAR contents) is the address of the micro-instruction now in the uIR. On every
// rising edge the register loads 'next_addr', chosen with this priority:
// reset -> 0; 'load_map' -> 'map_addr' (address derived from the
// instruction in the IR); 'load_branch' -> 'branch_addr' (branch-address
// field); otherwise addr + 1, wrapping at 2^ADDR_W. 'next_addr' is also an
// output so that the control memory can be read at it and its word
// registered in the uIR in the same edge. Reset is synchronous and active
// high. The three address sources and the incrementer are those of the
// usual block diagram; the priority order and reset are this design's
// choices.
module cmar #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load_map,
  input  logic [ADDR_W-1:0] map_addr,
  input  logic              load_branch,
  input  logic [ADDR_W-1:0] branch_addr,
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] next_addr
);

  logic [ADDR_W-1:0] incremented;

  assign incremented = addr + 1'b1;

  always_comb begin
    if (rst)              next_addr = '0;
    else if (load_map)    next_addr = map_addr;
    else if (load_branch) next_addr = branch_addr;
    else                  next_addr = incremented;
  end

  always_ff @(posedge clk) addr <= next_addr;

endmodule
