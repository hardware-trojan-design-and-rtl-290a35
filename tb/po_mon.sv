// po_mon: monitor bound into every threshold gate by tb_rsa_po; reports each
// assertion of the gate output to tb_po_pkg under the gate's instance name.
module po_mon (
  input logic z
);

  always @(posedge z) tb_po_pkg::hit($sformatf("%m"));

endmodule
