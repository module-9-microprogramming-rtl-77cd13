// micro_sequencer - micro-program counter (uPC) and next-address logic of
// the example control unit.
//
// 'upc' is the address of the micro-instruction now in the uIR. Every clock
// the uPC loads 'next_upc', chosen by the sequencing field 'seq' of the
// current micro-instruction: SEQ_NEXT -> upc + 1 (wrapping at 2^ADDR_W),
// SEQ_DECODE -> 'map_addr' from the opcode mapping, SEQ_FETCH -> 0 (the
// fetch routine), SEQ_HLT -> upc (halt by looping). A synchronous,
// active-high reset forces next_upc, and hence the uPC, to 0. 'next_upc'
// is also an output, so that a control store with a registered output (the
// uIR) can be addressed with it and stay in step with the uPC.
module micro_sequencer
  import hmcu_pkg::*;
#(
  parameter int unsigned ADDR_W = UADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  seq_e              seq,
  input  logic [ADDR_W-1:0] map_addr,
  output logic [ADDR_W-1:0] upc,
  output logic [ADDR_W-1:0] next_upc
);

  always_comb begin
    if (rst) begin
      next_upc = ADDR_W'(UADDR_FETCH);
    end else begin
      unique case (seq)
        SEQ_NEXT:   next_upc = upc + 1'b1;
        SEQ_DECODE: next_upc = map_addr;
        SEQ_FETCH:  next_upc = ADDR_W'(UADDR_FETCH);
        SEQ_HLT:    next_upc = upc;
        default:    next_upc = '0;
      endcase
    end
  end

  always_ff @(posedge clk) upc <= next_upc;

endmodule
