// tb_payload_ecc_corrector: HM(71,64) corrector test. Random 64-bit words (and zero-padded
// 45-bit RB words) are encoded by a reference Hamming encoder written here as a 71-bit
// code word in position order; each word is checked clean, with every one of its 71 bits
// flipped in turn, and with two flips (which must be reported, not silently accepted).
module tb_payload_ecc_corrector;
  logic [63:0] data_in, data_out;
  logic [6:0]  rdc_in, rdc_out;
  logic        corrected, uncorrectable;
  int checks = 0, failures = 0;

  payload_ecc_corrector dut (.*);

  // reference: build the code word c[1..71]; parity bits at powers of two
  function automatic logic [71:1] encode(logic [63:0] d);
    logic [71:1] c;
    int k;
    c = '0;
    k = 0;
    for (int pos = 1; pos <= 71; pos++)
      if ($countones(pos) != 1) begin
        c[pos] = d[k];
        k++;
      end
    for (int i = 0; i < 7; i++) begin
      logic x;
      x = 1'b0;
      for (int pos = 1; pos <= 71; pos++)
        if ($countones(pos) != 1 && ((pos >> i) & 1) == 1) x ^= c[pos];
      c[1 << i] = x;
    end
    return c;
  endfunction

  function automatic void split(logic [71:1] c, output logic [63:0] d, output logic [6:0] p);
    int k;
    k = 0;
    for (int pos = 1; pos <= 71; pos++)
      if ($countones(pos) != 1) begin
        d[k] = c[pos];
        k++;
      end
    for (int i = 0; i < 7; i++) p[i] = c[1 << i];
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 60; n++) begin
      logic [63:0] d, dd;
      logic [6:0]  p, pp;
      logic [71:1] c, ce;
      d = {$urandom, $urandom};
      if (n % 3 == 0) d[63:45] = '0;   // RB word
      if (n == 1) d = '0;
      if (n == 2) d = '1;
      c = encode(d);
      for (int f = 0; f <= 71; f++) begin
        ce = c;
        if (f > 0) ce[f] = ~ce[f];
        split(ce, dd, pp);
        data_in = dd;
        rdc_in  = pp;
        #1;
        split(c, dd, pp);
        checks++;
        if (data_out !== dd || rdc_out !== pp || corrected !== (f > 0) || uncorrectable) begin
          failures++;
          $display("FAIL word %0d flip %0d: out=%h exp=%h corr=%b", n, f, data_out, dd, corrected);
        end
      end
      // double error: syndrome is non-zero, so it must not pass as clean
      begin
        int a, b;
        a = 1 + ($urandom % 71);
        b = 1 + ($urandom % 71);
        if (a != b) begin
          ce = c;
          ce[a] = ~ce[a];
          ce[b] = ~ce[b];
          split(ce, dd, pp);
          data_in = dd;
          rdc_in  = pp;
          #1;
          checks++;
          if (!(corrected || uncorrectable)) begin
            failures++;
            $display("FAIL double error %0d,%0d not flagged", a, b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
