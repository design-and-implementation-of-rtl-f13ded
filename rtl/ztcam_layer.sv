// ztcam_layer: one layer of the ZTCAM.
//
// A layer holds K consecutive entries of the ternary table (one horizontal
// slice) and cuts each entry into N vertical partitions of W bits. Each
// partition n owns a pair of memories: a validation memory VM_n (2**W x 1)
// and an original address table OAT_n (2**W x K). A search runs as follows,
// all within one combinational path:
//   1. subword n addresses VM_n; the N VM bits are ANDed (1-bit AND) into the
//      activation signal;
//   2. subword n also addresses OAT_n directly, and the activation signal
//      enables the OAT read (a rejected word reads all zeros);
//   3. the N K-bit rows are ANDed bit by bit (K-bit AND);
//   4. the layer priority encoder returns the lowest set bit as the potential
//      match address (PMA), pma_valid low meaning the layer mismatched.
// A mismatch shows up either as activation = 0 (a subword absent from its
// partition) or as activation = 1 with an all-zero K-bit AND.
//
// Write port: one row of one pair per clock. wpart selects the pair, wrow the
// row (subword value), wdata the K-bit OAT row. The VM bit of that row is
// written in the same cycle as the OR of wdata: a subword is present in the
// partition exactly when at least one original address uses it. Deriving the
// VM bit from the OAT row is a choice of this implementation; it keeps the
// two memories of a pair consistent with a single write.
//
// Subword 0 (sw[0]) is the first subword, sw1, taken from the most significant
// bits of the search word.
module ztcam_layer #(
  parameter int unsigned N  = ztcam_pkg::N_DEF,   // partitions (subwords)
  parameter int unsigned W  = ztcam_pkg::W_DEF,   // subword width
  parameter int unsigned K  = ztcam_pkg::K_DEF,   // entries in the layer
  parameter int unsigned NW = ztcam_pkg::idx_w(N),
  parameter int unsigned PW = ztcam_pkg::idx_w(K)
) (
  input  logic                clk,
  input  logic                rst_n,
  // search
  input  logic [N-1:0][W-1:0] sw,          // subwords, sw[0] = sw1
  output logic [PW-1:0]       pma,         // potential match address in layer
  output logic                pma_valid,   // layer matched
  output logic                activation,  // 1-bit AND result
  // table write (data mapping)
  input  logic                we,
  input  logic [NW-1:0]       wpart,       // partition (VM/OAT pair)
  input  logic [W-1:0]        wrow,        // row = subword value
  input  logic [K-1:0]        wdata        // OAT row
);

  logic [N-1:0]        vm_bits;
  logic [N-1:0][K-1:0] oat_rows;
  logic [K-1:0]        kand;

  for (genvar n = 0; n < N; n++) begin : g_pair
    logic pair_we;
    assign pair_we = we && (wpart == NW'(n));

    ztcam_vm #(.W(W)) u_vm (
      .clk   (clk),
      .rst_n (rst_n),
      .we    (pair_we),
      .waddr (wrow),
      .wdata (|wdata),
      .raddr (sw[n]),
      .rdata (vm_bits[n])
    );

    ztcam_oat #(.W(W), .K(K)) u_oat (
      .clk   (clk),
      .rst_n (rst_n),
      .we    (pair_we),
      .waddr (wrow),
      .wdata (wdata),
      .raddr (sw[n]),
      .ren   (activation),
      .rdata (oat_rows[n])
    );
  end

  ztcam_and1 #(.N(N)) u_and1 (
    .vm_bits    (vm_bits),
    .activation (activation)
  );

  ztcam_kand #(.N(N), .K(K)) u_kand (
    .rows    (oat_rows),
    .hits    (kand)
  );

  ztcam_lpe #(.K(K), .PW(PW)) u_lpe (
    .req       (kand),
    .pma       (pma),
    .pma_valid (pma_valid)
  );

endmodule
