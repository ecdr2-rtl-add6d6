// tb_input_vc: one virtual channel of router (3,3), VC 1, driven by the testbench acting as
// upstream link and as the allocators. Checks, against flits built by the reference
// encoder:
//   * a clean head flit requests VA and speculative SA one cycle after it is written and,
//     when both are granted, reaches the flit register at the next edge with the lookahead
//     DIR of the next router and its VC_ID;
//   * single-bit errors in payload, RB, RI and one FT copy are corrected in the flit
//     register; a credit is returned one cycle after each flit leaves;
//   * a head flit with a corrupted DIR raises the one-hot failure, its allocation results
//     are thrown away, and one cycle later it requests the DIR that standard RC rebuilt
//     from the (corrected) destination; it leaves one cycle later than a clean head;
//   * VA granted but speculative SA lost: the next request is non-speculative;
//   * no request is made while the downstream VC has no credit.
module tb_input_vc;
  import ecdr2_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  coord_t my_x = 3'd3, my_y = 3'd3;
  logic  wr_en = 0;
  flit_t wr_flit = '0;
  logic  credit_out;
  logic [NPORT-1:0][NVC-1:0] cred_avail = '1;
  logic  va_req, va_kill, va_gnt = 0;
  dir_t  va_port;
  vcid_t va_vc;
  logic  sa_req, sa_spec, sa_gnt = 0;
  dir_t  sa_port;
  logic  sent, sent_tail;
  dir_t  sent_port;
  vcid_t sent_vc;
  logic  fr_valid;
  flit_t fr_flit;
  dir_t  fr_port;
  logic [0:0] fr_vc;
  ev_t   ev;
  int checks = 0, failures = 0;

  input_vc #(.DEPTH(4), .VC_IDX(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  task automatic write_flit(input flit_t f);
    @(negedge clk);
    wr_en = 1;
    wr_flit = f;
    @(negedge clk);
    wr_en = 0;
    #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t h, hx, b, t;
    logic [44:0] rb;
    logic [63:0] pl;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- A: clean head to (6,3): current DIR East, lookahead at (4,3) East
    rb = 45'h1234_5678_9ab;
    h  = ref_head(6, 3, 1, 1, rb);
    write_flit(flip(h, 3));                        // RB bit 3 flipped on the way
    chk(va_req && sa_req && sa_spec && !va_kill, "head requests VA + speculative SA");
    chk(va_port == 5'b00010 && va_vc == 2'b10, "head requests East, VC1");
    va_gnt = 1; sa_gnt = 1;
    #1 chk(sent && !sent_tail, "head leaves on VA+SSA grant");
    chk(ev.ssa_win, "SSA success reported");
    @(negedge clk);
    va_gnt = 0; sa_gnt = 0;
    #1;
    hx = ref_head(6, 3, 1, 1, rb);                 // lookahead DIR at (4,3) is also East
    chk(fr_valid && fr_flit == hx, "flit register holds corrected head");
    chk(fr_port == 5'b00010 && fr_vc == 1'b1, "flit register routed East VC1");
    chk(credit_out, "credit returned after head");
    chk(!va_req && !sa_req, "nothing left to request");

    // ---- body with a payload error, tail with an FT copy error
    pl = 64'hdead_beef_0123_4567;
    b  = ref_body(2'b10, pl);
    write_flit(flip(b, 17));
    chk(sa_req && !sa_spec && !va_req, "body issues non-speculative SA");
    sa_gnt = 1;
    @(negedge clk);
    sa_gnt = 0;
    #1 chk(fr_valid && fr_flit == b, "payload corrected");
    t = ref_body(2'b11, ~pl);
    write_flit(flip(flip(t, 75), 40));             // FT copy bit and payload bit
    sa_gnt = 1;
    #1 chk(sent_tail, "tail recognised after FT correction");
    @(negedge clk);
    sa_gnt = 0;
    #1 chk(fr_valid && fr_flit == t, "tail corrected");

    // ---- B: head with corrupted DIR (two ones) and an RI error, to (3,6): South here
    rb = 45'h0abc_def0_123;
    h  = ref_head(3, 6, 2, 1, rb);
    hx = flip(flip(h, 54 + 0), 60);                // DIR bit N set, RI bit 1 flipped
    write_flit(hx);
    chk(ev.ohc_fail && va_kill, "one-hot failure detected");
    va_gnt = 1; sa_gnt = 1;                        // results must be abandoned
    #1 chk(!sent, "allocation results abandoned on one-hot failure");
    @(negedge clk);
    #1;
    chk(!ev.ohc_fail && !va_kill, "RC result register in use");
    chk(va_req && va_port == 5'b00100 && va_vc == 2'b10, "standard RC rebuilt South, VC1");
    chk(sent, "head leaves one cycle later");
    @(negedge clk);
    va_gnt = 0; sa_gnt = 0;
    #1 chk(fr_valid && fr_flit == ref_head(3, 6, 2, 1, rb), "head rebuilt with lookahead South");
    chk(fr_port == 5'b00100, "routed South");

    // finish that packet: VA held, SA lost on the next head
    t = ref_body(2'b11, 64'h1);
    write_flit(t);
    sa_gnt = 1;
    @(negedge clk);
    sa_gnt = 0;

    // ---- C: VA granted, speculative SA lost
    h = ref_head(0, 3, 3, 1, 45'h5);
    write_flit(h);
    va_gnt = 1; sa_gnt = 0;
    #1 chk(ev.ssa_lose, "speculation failure reported");
    @(negedge clk);
    va_gnt = 0;
    #1 chk(sa_req && !sa_spec && !va_req, "retry as non-speculative SA");
    // ---- D: no credit for West VC1
    cred_avail[3][1] = 1'b0;
    #1 chk(!sa_req && ev.credit_stall, "no SA request without credit");
    @(negedge clk);
    cred_avail[3][1] = 1'b1;
    sa_gnt = 1;
    #1 chk(sa_req && sent, "request resumes with credit");
    @(negedge clk);
    sa_gnt = 0;
    #1 chk(fr_valid && fr_flit == ref_head(0, 3, 3, 1, 45'h5), "head sent West, lookahead West");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
