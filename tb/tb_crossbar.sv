// tb_crossbar: random partial permutations of input ports to output ports; every selected
// output must carry its input's flit and VC number, every other output must be idle.
module tb_crossbar;
  import ecdr2_pkg::*;
  flit_t      in_flit  [NPORT];
  logic       in_valid [NPORT];
  dir_t       in_sel   [NPORT];
  logic [0:0] in_vc    [NPORT];
  flit_t      out_flit  [NPORT];
  logic       out_valid [NPORT];
  logic [0:0] out_vc    [NPORT];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int perm [NPORT];
      int src_of [NPORT];
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      foreach (src_of[o]) src_of[o] = -1;
      for (int i = 0; i < NPORT; i++) begin
        in_flit[i]  = flit_t'({$urandom, $urandom, $urandom});
        in_valid[i] = ($urandom % 4) != 0;
        in_sel[i]   = dir_t'(1 << perm[i]);
        in_vc[i]    = 1'($urandom);
        if (in_valid[i]) src_of[perm[i]] = i;
      end
      #1;
      for (int o = 0; o < NPORT; o++) begin
        checks++;
        if (src_of[o] < 0) begin
          if (out_valid[o] !== 1'b0) begin
            failures++;
            $display("FAIL output %0d valid without source", o);
          end
        end else if (out_valid[o] !== 1'b1 || out_flit[o] !== in_flit[src_of[o]] ||
                     out_vc[o] !== in_vc[src_of[o]]) begin
          failures++;
          $display("FAIL output %0d from input %0d", o, src_of[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
