// tb_onehot_checker: exhaustive test of the one-hot checker over all 128 DIR/VC_ID
// combinations; the reference counts the ones of each field.
module tb_onehot_checker;
  import ecdr2_pkg::*;
  dir_t  dir;
  vcid_t vcid;
  logic  dir_ok, vcid_ok, error;
  int checks = 0, failures = 0;

  onehot_checker dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      logic exp_err;
      {dir, vcid} = 7'(i);
      #1;
      exp_err = !($countones(dir) == 1 && $countones(vcid) == 1);
      checks++;
      if (error !== exp_err || dir_ok !== ($countones(dir) == 1) ||
          vcid_ok !== ($countones(vcid) == 1)) begin
        failures++;
        $display("FAIL dir=%b vcid=%b error=%b", dir, vcid, error);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
