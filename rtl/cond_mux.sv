// cond_mux - branch-condition multiplexer ("selects flag input").
//
// Combinational. The branch-condition field 'sel' of the current
// micro-instruction picks one input of a multiplexer whose inputs are, in
// order: constant 0, constant 1, the NFLAGS status flags, and the NFLAGS
// flags inverted. The selected input is 'load_branch': when it is 1 the
// CMAR loads the branch address of the micro-instruction. The all-ones
// code is reserved for the instruction-decode step: it raises 'load_map'
// (the CMAR then loads the address mapped from the IR) and selects no
// branch. Codes between the last flag input and all-ones select 0.
// That the condition field selects a flag through a multiplexer follows
// the usual block diagram of such a unit; the input order, the inverted
// flags and the reserved decode code are this design's choices.
module cond_mux #(
  parameter int unsigned NFLAGS = 2,
  parameter int unsigned SEL_W  = 3
) (
  input  logic [NFLAGS-1:0] flags,
  input  logic [SEL_W-1:0]  sel,
  output logic              load_branch,
  output logic              load_map
);

  localparam int unsigned NIN = 2 + 2 * NFLAGS;

  initial assert (NIN < (1 << SEL_W))
    else $error("cond_mux: SEL_W too small for %0d flags", NFLAGS);

  logic [NIN-1:0] mux_in;

  always_comb begin
    mux_in = {~flags, flags, 1'b1, 1'b0};
    load_map = &sel;
    if (!load_map && int'(sel) < int'(NIN)) load_branch = mux_in[sel];
    else                                    load_branch = 1'b0;
  end

endmodule
