// tb_ni_decoder: flits built by the reference encoder, with no error or a single-bit
// error in one code, are fed to the decoder of node (4,1). One cycle later the raw fields
// must be restored, the corrected flag must match, misrouted heads must be flagged, and
// a credit must come back for the flit's VC.
module tb_ni_decoder;
  import ecdr2_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  coord_t my_x = 3'd4, my_y = 3'd1;
  logic in_valid = 0;
  logic [0:0] in_vc = 0;
  flit_t in_flit = '0;
  logic [NVC-1:0] credit_out;
  logic ej_valid, ej_corrected, ej_uncorrectable, ej_misrouted;
  logic [0:0] ej_vc;
  ft_e ej_ft;
  logic [5:0] ej_dst;
  logic [63:0] ej_data;
  int checks = 0, failures = 0;

  ni_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int dx, dy, e, v;
      bit head;
      logic [63:0] d;
      logic [1:0] ft;
      flit_t f;
      head = (n % 3 == 0);
      dx = (n % 2) ? 4 : $urandom % 8;
      dy = (n % 2) ? 1 : $urandom % 8;
      v  = $urandom % 2;
      d  = {$urandom, $urandom};
      ft = head ? 2'b01 : ((n % 3 == 1) ? 2'b10 : 2'b11);
      if (head) begin
        d[63:45] = '0;
        f = ref_head(dx, dy, 4, v, d[44:0]);
      end else f = ref_body(ft, d);
      // one error in FT, RI (head) or payload/RB codes, or none
      e = $urandom % 4;
      if (e == 1) f = flip(f, 71 + ($urandom % 6));
      if (e == 2 && head) f = flip(f, 59 + ($urandom % 12));
      if (e == 3) f = flip(f, head ? ($urandom % 52) : ($urandom % 71));
      @(negedge clk);
      in_valid = 1; in_vc = 1'(v); in_flit = f;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!ej_valid || ej_ft != ft_e'(ft) || ej_data != d || ej_vc != 1'(v) ||
          (head && ej_dst != {3'(dy), 3'(dx)}) ||
          ej_corrected != (e == 1 || (e == 2 && head) || e == 3) || ej_uncorrectable ||
          ej_misrouted != (head && !(dx == 4 && dy == 1)) ||
          credit_out != 2'(1 << v)) begin
        failures++;
        $display("FAIL n=%0d head=%0d e=%0d data=%h got=%h corr=%b", n, head, e, d, ej_data,
                 ej_corrected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
