// tb_ni_encoder: random head and body/tail flits at random source nodes; the coded flit
// must equal the reference encoder's (TMR type, HM(6,3) destination, XY DIR at the
// source, one-hot VC, HM(71,64) over the payload or zero-padded RB).
module tb_ni_encoder;
  import ecdr2_pkg::*;
  import tb_ref_pkg::*;
  coord_t my_x, my_y;
  ft_e ft;
  logic [5:0] dst;
  logic [0:0] vc;
  logic [63:0] data;
  flit_t flit;
  int checks = 0, failures = 0;

  ni_encoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int x, y, dx, dy;
      flit_t exp;
      x = $urandom % 8; y = $urandom % 8; dx = $urandom % 8; dy = $urandom % 8;
      my_x = 3'(x); my_y = 3'(y);
      dst  = {3'(dy), 3'(dx)};
      vc   = 1'($urandom);
      data = {$urandom, $urandom};
      case (n % 3)
        0: ft = FT_HEAD;
        1: ft = FT_BODY;
        default: ft = FT_TAIL;
      endcase
      #1;
      if (ft == FT_HEAD) exp = ref_head(dx, dy, ref_xy(x, y, dx, dy), int'(vc), data[44:0]);
      else               exp = ref_body(ft, data);
      checks++;
      if (flit !== exp) begin
        failures++;
        $display("FAIL n=%0d ft=%0d got=%h exp=%h", n, ft, flit, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
