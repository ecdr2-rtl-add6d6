// onehot_checker: OHC, the error detector of the one-hot DIR and VC_ID fields.
//
// A single bit error turns a one-hot word into a word with zero or two ones, so checking
// that exactly one bit is set detects it. There is no redundancy and no correction: an
// error is reported to the LRC unit, which then recomputes DIR and VC_ID by standard
// routing computation. Combinational.
module onehot_checker
  import ecdr2_pkg::*;
(
  input  dir_t  dir,
  input  vcid_t vcid,
  output logic  dir_ok,
  output logic  vcid_ok,
  output logic  error      // DIR or VC_ID is not one-hot
);
  function automatic logic is_onehot5(dir_t v);
    int n;
    n = 0;
    for (int i = 0; i < NPORT; i++) n += int'(v[i]);
    return n == 1;
  endfunction

  assign dir_ok  = is_onehot5(dir);
  assign vcid_ok = vcid[0] ^ vcid[1];
  assign error   = !(dir_ok && vcid_ok);
endmodule
