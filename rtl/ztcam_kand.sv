// ztcam_kand: the layer's K-bit AND operation.
//
// ANDs, bit by bit, the K-bit rows read out of the N original address tables.
// Bit k of the result is 1 only when entry k of the layer matched the search
// word in every partition, i.e. when entry k hits the whole word. Any
// number of bits may be set (several entries can match); the layer priority
// encoder picks one. Purely combinational; the function is the design's.
module ztcam_kand #(
  parameter int unsigned N = ztcam_pkg::N_DEF,  // subwords per word
  parameter int unsigned K = ztcam_pkg::K_DEF   // original addresses per layer
) (
  input  logic [N-1:0][K-1:0] rows,    // OAT rows, one per partition
  output logic [K-1:0]        hits  // entries of the layer that match
);

  always_comb begin
    hits = '1;
    for (int unsigned n = 0; n < N; n++) hits &= rows[n];
  end

endmodule
