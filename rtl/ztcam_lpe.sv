// ztcam_lpe: layer priority encoder (LPE).
//
// Takes the K-bit result of the layer's K-bit AND and returns the index of one
// set bit as the layer's potential match address (PMA), with a valid flag that
// is low when no bit is set (the layer mismatched). The lowest index, i.e. the
// lowest original address, wins: a plain linear priority encoder. The design
// only says the LPE selects a PMA among multiple matches; giving the lowest
// address the highest priority is the usual TCAM rule and matches the way the
// CAM priority encoder ranks layers. Purely combinational.
module ztcam_lpe #(
  parameter int unsigned K  = ztcam_pkg::K_DEF,        // request bits
  parameter int unsigned PW = ztcam_pkg::idx_w(K)      // PMA width
) (
  input  logic [K-1:0]  req,        // K-bit AND result
  output logic [PW-1:0] pma,        // index of the winning bit
  output logic          pma_valid   // at least one bit set
);

  always_comb begin
    pma       = '0;
    pma_valid = 1'b0;
    for (int k = K - 1; k >= 0; k--) begin
      if (req[k]) begin
        pma       = PW'(k);
        pma_valid = 1'b1;
      end
    end
  end

endmodule
