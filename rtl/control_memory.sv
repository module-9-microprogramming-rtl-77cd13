// control_memory - writable control memory of the general control unit.
//
// DEPTH words of WIDTH bits. The read port is combinational: 'rdata' is the
// word at 'raddr' in the same cycle (the uIR that follows registers it).
// The write port stores 'wdata' at 'waddr' on a rising edge when 'we' is
// 1; it is used to load the microprogram (firmware) while the unit is held
// in reset. A read of the address being written returns the old word.
// The contents are not reset. Holding the microprogram in a loadable
// memory instead of a mask ROM is this design's choice, so that the same
// hardware runs any microprogram.
module control_memory #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DEPTH  = 1 << ADDR_W,
  parameter int unsigned WIDTH  = 30
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < int'(DEPTH)) mem[waddr] <= wdata;
  end

  always_comb begin
    if (int'(raddr) < int'(DEPTH)) rdata = mem[raddr];
    else                           rdata = '0;
  end

endmodule
