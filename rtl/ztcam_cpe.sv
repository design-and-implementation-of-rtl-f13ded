// ztcam_cpe: CAM priority encoder (CPE).
//
// Receives the potential match address and valid flag of each of the L
// layers and returns the match address (MA) of the whole table. Layer 0 holds
// the lowest original addresses and has the highest priority: when several
// layers match, the lowest-numbered one wins (if layers 4, 5, 7 and 10
// matched, layer 4 would be chosen). The match address is the original table
// address, layer * K + PMA; hit is low when no layer matched, and ma is then
// zero. Purely combinational. Ranking by layer number follows the design; the
// address arithmetic and the zero MA on a miss are this implementation's.
module ztcam_cpe #(
  parameter int unsigned L  = ztcam_pkg::L_DEF,        // layers
  parameter int unsigned K  = ztcam_pkg::K_DEF,        // entries per layer
  parameter int unsigned PW = ztcam_pkg::idx_w(K),     // PMA width
  parameter int unsigned AW = ztcam_pkg::idx_w(L * K)  // MA width
) (
  input  logic [L-1:0][PW-1:0] pma,        // PMA of each layer
  input  logic [L-1:0]         pma_valid,  // layer matched
  output logic [AW-1:0]        ma,         // match address
  output logic                 hit         // some layer matched
);

  always_comb begin
    ma  = '0;
    hit = 1'b0;
    for (int l = L - 1; l >= 0; l--) begin
      if (pma_valid[l]) begin
        ma  = AW'(l * K) + AW'(pma[l]);
        hit = 1'b1;
      end
    end
  end

endmodule
