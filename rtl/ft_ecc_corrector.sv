// ft_ecc_corrector: FT-ECC, the triple-modular-redundancy corrector of the 2-bit flit type.
//
// The flit type is stored three times (the FT field and the two copies in its 4 redundant
// bits). Each bit is rebuilt by a 2-of-3 majority vote, so any error confined to one
// copy, and any pair of errors hitting different bit positions, is corrected. The output
// is the corrected FT and the corrected, re-triplicated code word that the router
// forwards downstream. Purely combinational (about one gate level), which lets the
// corrected FT feed the VC controller and allocators in the same cycle.
// TMR for FT follows the design; the copy order inside the redundant bits is this
// implementation's choice.
module ft_ecc_corrector
  import ecdr2_pkg::*;
(
  input  logic [1:0] ft_in,      // FT field as received
  input  logic [3:0] rdc_in,     // {copy2, copy1}
  output logic [1:0] ft_out,     // voted flit type
  output logic [3:0] rdc_out,    // re-triplicated redundancy
  output logic       corrected   // some copy disagreed with the vote
);
  logic [1:0] c1, c2;

  always_comb begin
    c1 = rdc_in[1:0];
    c2 = rdc_in[3:2];
    ft_out    = (ft_in & c1) | (ft_in & c2) | (c1 & c2);
    rdc_out   = {ft_out, ft_out};
    corrected = (ft_in != ft_out) || (c1 != ft_out) || (c2 != ft_out);
  end
endmodule
