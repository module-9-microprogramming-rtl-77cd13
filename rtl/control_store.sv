// control_store - read-only control store of the example control unit.
//
// DEPTH words of UCODE_W bits, read combinationally: 'data' is the
// micro-instruction at 'addr' in the same cycle. The contents are the
// microprogram held in hmcu_pkg::cs_word (fetch, NOP, LOAD_ACC and JUMP
// routines); every other word is zero. The array is built once at
// elaboration from that function, so synthesis sees a constant table.
// Size and contents follow the example unit; the combinational read
// matches its concurrent ROM read, and the registering of the word is left
// to the micro-instruction register that follows.
module control_store
  import hmcu_pkg::*;
#(
  parameter int unsigned DEPTH = CS_DEPTH
) (
  input  uaddr_t  addr,
  output uinstr_t data
);

  function automatic uinstr_t [DEPTH-1:0] build_rom();
    uinstr_t [DEPTH-1:0] r;
    for (int unsigned a = 0; a < DEPTH; a++) r[a] = cs_word(uaddr_t'(a));
    return r;
  endfunction

  localparam uinstr_t [DEPTH-1:0] ROM = build_rom();

  always_comb begin
    if (int'(addr) < int'(DEPTH)) data = ROM[addr];
    else                          data = '0;
  end

endmodule
