// ni_decoder: the decoder of a network interface, which takes coded flits from the local
// output port of the router, corrects them and returns the raw fields.
//
// It reuses the router's correctors: the TMR vote for the flit type, the two HM(6,3)
// correctors for the destination of a head flit and the HM(71,64) corrector for the
// payload or the zero-padded reserved bits. Outputs are registered (one cycle after the
// flit arrives), together with flags for a corrected flit, an uncorrectable payload/RB
// syndrome and a head flit whose destination is not this node. The NI always accepts a
// flit, so it returns the credit for the VC the flit came on one cycle after it.
// Decoding at the destination follows the design; the flags and the always-ready sink
// are this implementation's choices.
module ni_decoder
  import ecdr2_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  coord_t          my_x,
  input  coord_t          my_y,
  input  logic            in_valid,
  input  logic [0:0]      in_vc,
  input  flit_t           in_flit,
  output logic [NVC-1:0]  credit_out,
  output logic            ej_valid,
  output logic [0:0]      ej_vc,
  output ft_e             ej_ft,
  output logic [5:0]      ej_dst,
  output logic [63:0]     ej_data,
  output logic            ej_corrected,
  output logic            ej_uncorrectable,
  output logic            ej_misrouted
);
  logic [1:0] ft_c;
  logic [3:0] ft_rdc_c;
  logic       ft_fix;
  ft_ecc_corrector u_ft (
    .ft_in(in_flit.h.ft), .rdc_in(in_flit.h.ft_rdc), .ft_out(ft_c), .rdc_out(ft_rdc_c),
    .corrected(ft_fix)
  );

  logic is_head;
  assign is_head = (ft_c == FT_HEAD);

  logic [5:0] ri_c, ri_rdc_c;
  logic       ri_fix;
  ri_ecc_corrector u_ri (
    .ri_in(in_flit.h.ri), .rdc_in(in_flit.h.ri_rdc), .ri_out(ri_c), .rdc_out(ri_rdc_c),
    .corrected(ri_fix)
  );

  logic [63:0] pin, pout;
  logic [6:0]  prdc, prdc_c;
  logic        p_fix, p_bad;
  assign pin  = is_head ? {19'b0, in_flit.h.rb} : in_flit.b.payload;
  assign prdc = is_head ? in_flit.h.rb_rdc : in_flit.b.pl_rdc;
  payload_ecc_corrector u_pl (
    .data_in(pin), .rdc_in(prdc), .data_out(pout), .rdc_out(prdc_c),
    .corrected(p_fix), .uncorrectable(p_bad)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit_out       <= '0;
      ej_valid         <= 1'b0;
      ej_vc            <= '0;
      ej_ft            <= FT_NONE;
      ej_dst           <= '0;
      ej_data          <= '0;
      ej_corrected     <= 1'b0;
      ej_uncorrectable <= 1'b0;
      ej_misrouted     <= 1'b0;
    end else begin
      credit_out <= in_valid ? vc_onehot(32'(in_vc)) : '0;
      ej_valid   <= in_valid;
      if (in_valid) begin
        ej_vc            <= in_vc;
        ej_ft            <= ft_e'(ft_c);
        ej_dst           <= is_head ? ri_c : '0;
        ej_data          <= pout;
        ej_corrected     <= ft_fix || (is_head && ri_fix) || p_fix;
        ej_uncorrectable <= p_bad;
        ej_misrouted     <= is_head && (ri_c != {my_y, my_x});
      end
    end
  end
endmodule
