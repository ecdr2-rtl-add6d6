// tb_ft_ecc_corrector: exhaustive test of the TMR flit-type corrector. Every flit type is
// stored three times and every 6-bit error pattern is applied; the expected output is a
// per-bit 2-of-3 count, and the corrected flag must be set exactly when some copy differs.
module tb_ft_ecc_corrector;
  logic [1:0] ft_in, ft_out;
  logic [3:0] rdc_in, rdc_out;
  logic       corrected;
  int checks = 0, failures = 0;

  ft_ecc_corrector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ft = 0; ft < 4; ft++) begin
      for (int e = 0; e < 64; e++) begin
        logic [5:0] word;
        logic [1:0] exp_ft;
        word   = {2'(ft), 2'(ft), 2'(ft)} ^ 6'(e);
        rdc_in = word[5:2];
        ft_in  = word[1:0];
        #1;
        for (int b = 0; b < 2; b++) begin
          int ones;
          ones = int'(word[b]) + int'(word[2+b]) + int'(word[4+b]);
          exp_ft[b] = (ones >= 2);
        end
        checks++;
        if (ft_out !== exp_ft || rdc_out !== {exp_ft, exp_ft}) begin
          failures++;
          $display("FAIL ft=%0d err=%b out=%b exp=%b", ft, 6'(e), ft_out, exp_ft);
        end
        checks++;
        if (corrected !== (word != {exp_ft, exp_ft, exp_ft})) begin
          failures++;
          $display("FAIL corrected flag ft=%0d err=%b", ft, 6'(e));
        end
        // any error confined to a single copy must restore the original type
        if (e == (e & 6'b000011) || e == (e & 6'b001100) || e == (e & 6'b110000)) begin
          checks++;
          if (ft_out !== 2'(ft)) begin
            failures++;
            $display("FAIL single-copy error not corrected ft=%0d err=%b", ft, 6'(e));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
