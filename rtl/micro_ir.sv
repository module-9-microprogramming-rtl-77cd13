// micro_ir - micro-instruction register (uIR).
//
// A WIDTH-bit register that loads 'd' on every rising clock edge; its output
// bits are the current micro-instruction, whose control field drives the
// datapath directly. It is fed with the control store word at the address
// the micro-program counter is loading in the same edge, so uIR and
// micro-program counter always describe the same micro-instruction and no
// branch delay slot appears. It has no reset of its own: while the
// sequencer is held in reset it loads the word at address 0.
module micro_ir #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) q <= d;

endmodule
