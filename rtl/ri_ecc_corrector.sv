// ri_ecc_corrector: RI-ECC, two HM(6,3) single-error correctors for the 6-bit routing
// information (the destination coordinates).
//
// RI[2:0] (destination x) and RI[5:3] (destination y) each form an HM(6,3) code word with
// three parity bits (p0 = d0^d1, p1 = d0^d2, p2 = d1^d2). The syndrome of each word
// names the single bit in error, data or parity, which is flipped. The corrected data and
// the corrected parity are both output, so the router forwards a clean code word.
// Combinational. Two HM(6,3) codes for RI follow the design; the parity-check matrix is
// this implementation's choice.
module ri_ecc_corrector
  import ecdr2_pkg::*;
(
  input  logic [5:0] ri_in,
  input  logic [5:0] rdc_in,
  output logic [5:0] ri_out,
  output logic [5:0] rdc_out,
  output logic       corrected
);
  logic [1:0] corr;

  for (genvar g = 0; g < 2; g++) begin : g_word
    logic [2:0] d, p, s, dc, pc;
    always_comb begin
      d  = ri_in[3*g +: 3];
      p  = rdc_in[3*g +: 3];
      s  = hm63_parity(d) ^ p;
      dc = d;
      pc = p;
      unique case (s)
        3'b011:  dc[0] = ~d[0];
        3'b101:  dc[1] = ~d[1];
        3'b110:  dc[2] = ~d[2];
        3'b001:  pc[0] = ~p[0];
        3'b010:  pc[1] = ~p[1];
        3'b100:  pc[2] = ~p[2];
        default: ;  // 000: clean; 111: uncorrectable, passed on unchanged
      endcase
    end
    assign ri_out[3*g +: 3]  = dc;
    assign rdc_out[3*g +: 3] = pc;
    assign corr[g] = (s != 3'b000);
  end

  assign corrected = |corr;
endmodule
