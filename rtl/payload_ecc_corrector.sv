// payload_ecc_corrector: Payload-ECC, the HM(71,64) single-error corrector shared by the
// payload of body/tail flits and the reserved bits (RB) of head flits.
//
// The 64 data bits and 7 parity bits form a Hamming code over positions 1..71 (parity at
// the powers of two, data at the other positions in order). The syndrome, the XOR of the
// recomputed and received parity, is the position of a single error, which is flipped.
// A head flit's 45 RB bits are corrected by padding them with 19 zero bits, so one
// corrector serves both flit kinds. Combinational; it is the longest path of the first
// router stage but feeds only the flit register.
// HM(71,64) and the zero padding of RB follow the design; the position map is this
// implementation's choice.
module payload_ecc_corrector
  import ecdr2_pkg::*;
(
  input  logic [63:0] data_in,
  input  logic [6:0]  rdc_in,
  output logic [63:0] data_out,
  output logic [6:0]  rdc_out,
  output logic        corrected,      // syndrome named a bit, which was flipped
  output logic        uncorrectable   // syndrome names no position (above 71)
);
  logic [6:0] syn;

  always_comb begin
    int k;
    syn       = hm7164_parity(data_in) ^ rdc_in;
    data_out  = data_in;
    rdc_out   = rdc_in;
    k = 0;
    for (int pos = 1; pos <= 71; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        if (syn == 7'(pos)) data_out[k] = ~data_in[k];
        k++;
      end
    end
    for (int i = 0; i < 7; i++) begin
      if (syn == 7'(1 << i)) rdc_out[i] = ~rdc_in[i];
    end
    corrected     = (syn != 7'd0) && (syn <= 7'd71);
    uncorrectable = (syn > 7'd71);
  end
endmodule
