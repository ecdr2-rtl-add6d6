// tb_lrc_unit: lookahead and standard-RC modes of the routing unit against a reference
// XY router written here, over random router positions, destinations and directions.
module tb_lrc_unit;
  import ecdr2_pkg::*;
  coord_t my_x, my_y;
  logic [5:0] ri;
  dir_t  dir_cur, dir_out;
  vcid_t vcid_cur, vcid_out;
  logic [0:0] in_vc;
  logic rc_mode;
  int checks = 0, failures = 0;

  lrc_unit dut (.*);

  // reference XY: returns port number
  function automatic int ref_xy(int cx, int cy, int dx, int dy);
    if (dx > cx) return 1;       // E
    if (dx < cx) return 3;       // W
    if (dy > cy) return 2;       // S
    if (dy < cy) return 0;       // N
    return 4;                    // L
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int x, y, dx, dy, d, nx, ny, exp;
      x  = $urandom % 8;  y  = $urandom % 8;
      dx = $urandom % 8;  dy = $urandom % 8;
      my_x = 3'(x); my_y = 3'(y);
      ri   = {3'(dy), 3'(dx)};
      in_vc = 1'($urandom);
      vcid_cur = ($urandom % 2) ? 2'b01 : 2'b10;
      // current DIR as the upstream router would have computed it
      d = ref_xy(x, y, dx, dy);
      dir_cur = dir_t'(1 << d);
      // lookahead
      rc_mode = 1'b0;
      #1;
      nx = x + ((d == 1) ? 1 : (d == 3) ? -1 : 0);
      ny = y + ((d == 2) ? 1 : (d == 0) ? -1 : 0);
      exp = (d == 4) ? 4 : ref_xy(nx, ny, dx, dy);
      checks++;
      if (dir_out !== dir_t'(1 << exp) || vcid_out !== vcid_cur) begin
        failures++;
        $display("FAIL LRC (%0d,%0d)->(%0d,%0d) d=%0d out=%b exp=%0d", x, y, dx, dy, d, dir_out, exp);
      end
      // standard RC with a corrupted DIR
      rc_mode = 1'b1;
      dir_cur = dir_t'($urandom);
      #1;
      checks++;
      if (dir_out !== dir_t'(1 << d) || vcid_out !== vcid_t'(1 << in_vc)) begin
        failures++;
        $display("FAIL RC (%0d,%0d)->(%0d,%0d) out=%b exp=%0d", x, y, dx, dy, dir_out, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
