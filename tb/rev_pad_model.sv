// rev_pad_model: behavioural model of the reverse-padding logic of the RSA
// node, used only by testbenches. The padding scheme is not part of this
// design, so the model assumes unpadded messages and passes the decrypted
// dual-rail word through unchanged (DATA and NULL wavefronts alike).
module rev_pad_model
  import ncl_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  dr_t [N-1:0] m,
  output dr_t [N-1:0] mp
);

  assign mp = m;

endmodule
