// tb_ri_ecc_corrector: exhaustive test of the two HM(6,3) routing-information correctors.
// For every 6-bit RI value and every error pattern with at most one flipped bit per 6-bit
// code word (the reference parity is built here from the code's generator columns), the
// corrected RI and parity must equal the clean code word.
module tb_ri_ecc_corrector;
  logic [5:0] ri_in, rdc_in, ri_out, rdc_out;
  logic       corrected;
  int checks = 0, failures = 0;

  ri_ecc_corrector dut (.*);

  // generator: data bit i contributes column G[i] to the parity
  localparam logic [2:0] G [3] = '{3'b011, 3'b101, 3'b110};

  function automatic logic [2:0] par(logic [2:0] d);
    logic [2:0] p = '0;
    for (int i = 0; i < 3; i++) if (d[i]) p ^= G[i];
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ri = 0; ri < 64; ri++) begin
      logic [5:0] clean_rdc;
      clean_rdc = {par(3'(ri >> 3)), par(3'(ri))};
      // e0/e1: 0 = no error, 1..6 = flip bit (k-1) of the word {parity, data}
      for (int e0 = 0; e0 <= 6; e0++) begin
        for (int e1 = 0; e1 <= 6; e1++) begin
          logic [5:0] w0, w1;
          w0 = {clean_rdc[2:0], 3'(ri)};
          w1 = {clean_rdc[5:3], 3'(ri >> 3)};
          if (e0 > 0) w0[e0-1] = ~w0[e0-1];
          if (e1 > 0) w1[e1-1] = ~w1[e1-1];
          ri_in  = {w1[2:0], w0[2:0]};
          rdc_in = {w1[5:3], w0[5:3]};
          #1;
          checks++;
          if (ri_out !== 6'(ri) || rdc_out !== clean_rdc) begin
            failures++;
            $display("FAIL ri=%0d e0=%0d e1=%0d out=%h/%h", ri, e0, e1, ri_out, rdc_out);
          end
          checks++;
          if (corrected !== (e0 != 0 || e1 != 0)) begin
            failures++;
            $display("FAIL corrected flag ri=%0d e0=%0d e1=%0d", ri, e0, e1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
