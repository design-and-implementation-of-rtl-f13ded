// ztcam_and1: the layer's 1-bit AND operation.
//
// ANDs the N single-bit outputs of the layer's validation memories. The result
// is the activation signal: high only when every subword of the search word
// was found in its partition, in which case the search continues into the
// OATs; low means the layer has already mismatched. Purely combinational.
// The function is the design's; N is a parameter.
module ztcam_and1 #(
  parameter int unsigned N = ztcam_pkg::N_DEF  // subwords per word
) (
  input  logic [N-1:0] vm_bits,    // one validation bit per VM
  output logic         activation  // all subwords validated
);

  assign activation = &vm_bits;

endmodule
