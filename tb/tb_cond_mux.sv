// tb_cond_mux - all 8 condition codes against all 4 flag combinations
// (Z = flag 0, C = flag 1): 0 never, 1 always, 2 Z, 3 C, 4 !Z, 5 !C,
// 6 never, 7 map request (no branch).
module tb_cond_mux;
  logic [1:0] flags;
  logic [2:0] sel;
  logic       lb, lm;
  int checks = 0, failures = 0;

  cond_mux #(.NFLAGS(2), .SEL_W(3)) dut (.flags(flags), .sel(sel),
                                          .load_branch(lb), .load_map(lm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int f = 0; f < 4; f++) begin
        logic eb, em, zf, cf;
        sel = 3'(s); flags = 2'(f);
        zf = flags[0]; cf = flags[1];
        #1;
        em = (s == 7);
        case (s)
          1: eb = 1;
          2: eb = zf;
          3: eb = cf;
          4: eb = !zf;
          5: eb = !cf;
          default: eb = 0;
        endcase
        checks++;
        if (lb !== eb || lm !== em) begin
          failures++;
          $display("sel %0d flags %b: got %b%b expected %b%b", s, flags, lb, lm, eb, em);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
