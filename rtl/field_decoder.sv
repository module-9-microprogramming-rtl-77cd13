// field_decoder - decoder for an encoded (vertical) micro-instruction
// field.
//
// Combinational. An IN_W-bit code selects exactly one of 2^IN_W output
// lines: 'lines[code]' is 1 and all others are 0. With IN_W = 3 a 3-bit
// ALU field selects one of eight mutually exclusive ALU operations, the
// example used for vertical encoding. This is the one extra level of
// logic that vertical encoding puts between the micro-instruction register
// and the datapath.
module field_decoder #(
  parameter int unsigned IN_W = 3
) (
  input  logic [IN_W-1:0]       code,
  output logic [(1<<IN_W)-1:0]  lines
);

  always_comb begin
    lines = '0;
    lines[code] = 1'b1;
  end

endmodule
