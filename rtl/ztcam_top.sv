// ztcam_top: area-efficient SRAM-based ternary CAM (ZTCAM) with clock gating.
//
// The ternary table of L*K entries, each C bits wide, is split two ways. Rows
// are grouped into L layers of K consecutive entries (entry e is in layer
// e / K), and every word is cut into N = C / W subwords of W bits. Each layer
// keeps, per subword position, a validation memory (VM, 2**W x 1) and an
// original address table (OAT, 2**W x K) addressed by the subword itself, so
// ternary matching becomes plain memory reads: no comparators and no
// ternary cells. A search word is cut into its N subwords, all L layers are
// searched in parallel, and the CAM priority encoder (CPE) turns the layers'
// potential match addresses into the match address, lower addresses first.
//
// Control (sampled on the rising edge of the gated clock):
//   sel = 0, r_wb = 1  search: ma/hit register the result for word c, so the
//                      match address appears one clock after c is applied;
//   sel = 0, r_wb = 0  write: load the ternary table presented on tbl_*
//                      into the VMs and OATs. The load takes L*N*2**W clocks
//                      while busy is high; done pulses at its end. Searches
//                      are not taken while busy (ma and hit hold);
//   sel = 1            deselected: nothing starts and, from the next clock,
//                      ma_oe is low and ma reads zero. This is the
//                      high-impedance state of the device output, modelled
//                      here as an output enable because the pad is outside
//                      this RTL.
// clk_en gates the clock of the whole core through a latch-based clock gate:
// with clk_en low no input is sampled and no flip-flop switches.
//
// What follows the design: the L x N arrangement of VM/OAT pairs, the
// activation signal gating the OAT read, the K-bit AND, the two priority
// encoders, the sel/r_wb/c/ma interface and the clock enable. Choices of this
// implementation: one-cycle registered search, the table-load sequencer and
// its tbl_* port, the hit, busy, done and ma_oe outputs, and the reset.
module ztcam_top #(
  parameter int unsigned C  = ztcam_pkg::C_DEF,  // search word width
  parameter int unsigned W  = ztcam_pkg::W_DEF,  // subword width
  parameter int unsigned L  = ztcam_pkg::L_DEF,  // layers
  parameter int unsigned K  = ztcam_pkg::K_DEF,  // entries per layer
  parameter int unsigned AW = ztcam_pkg::idx_w(L * K)  // match address width
) (
  input  logic                  clk,
  input  logic                  rst_n,       // asynchronous, active low
  input  logic                  clk_en,      // clock enable (clock gating)
  input  logic                  sel,         // 0 = operate, 1 = deselect
  input  logic                  r_wb,        // 1 = search (read), 0 = write
  input  logic [C-1:0]          c,           // search word
  // ternary table loaded by a write
  input  logic [L*K-1:0]        tbl_valid,   // entry in use
  input  logic [L*K-1:0][C-1:0] tbl_value,   // entry bits
  input  logic [L*K-1:0][C-1:0] tbl_care,    // 1 = bit cares, 0 = x
  // results
  output logic [AW-1:0]         ma,          // match address
  output logic                  ma_oe,       // ma driven (sel was 0)
  output logic                  hit,         // ma is a real match
  output logic                  busy,        // table load in progress
  output logic                  done         // table load finished
);

  localparam int unsigned N  = C / W;
  localparam int unsigned NW = ztcam_pkg::idx_w(N);
  localparam int unsigned LW = ztcam_pkg::idx_w(L);
  localparam int unsigned PW = ztcam_pkg::idx_w(K);

  if (N * W != C) begin : g_bad_split
    $error("ztcam_top: C must be a multiple of W");
  end

  // ---- clock gating -------------------------------------------------------
  logic gclk;

  ztcam_clock_gate u_cg (
    .clk     (clk),
    .en      (clk_en),
    .test_en (1'b0),
    .gclk    (gclk)
  );

  // ---- input partition: sw[0] = sw1 = most significant W bits ------------
  logic [N-1:0][W-1:0] sw;
  for (genvar n = 0; n < N; n++) begin : g_split
    assign sw[n] = c[C-1-n*W -: W];
  end

  // ---- data mapping -------------------------------------------------------
  logic          wr_en;
  logic [LW-1:0] wr_layer;
  logic [NW-1:0] wr_part;
  logic [W-1:0]  wr_row;
  logic [K-1:0]  wr_data;

  ztcam_mapper #(.C(C), .W(W), .N(N), .L(L), .K(K), .NW(NW), .LW(LW)) u_map (
    .clk       (gclk),
    .rst_n     (rst_n),
    .start     (!sel && !r_wb),
    .tbl_valid (tbl_valid),
    .tbl_value (tbl_value),
    .tbl_care  (tbl_care),
    .busy      (busy),
    .done      (done),
    .wr_en     (wr_en),
    .wr_layer  (wr_layer),
    .wr_part   (wr_part),
    .wr_row    (wr_row),
    .wr_data   (wr_data)
  );

  // ---- layers -------------------------------------------------------------
  logic [L-1:0][PW-1:0] pma;
  logic [L-1:0]         pma_valid;
  logic [L-1:0]         activation;

  for (genvar l = 0; l < L; l++) begin : g_layer
    ztcam_layer #(.N(N), .W(W), .K(K), .NW(NW), .PW(PW)) u_layer (
      .clk        (gclk),
      .rst_n      (rst_n),
      .sw         (sw),
      .pma        (pma[l]),
      .pma_valid  (pma_valid[l]),
      .activation (activation[l]),
      .we         (wr_en && (wr_layer == LW'(l))),
      .wpart      (wr_part),
      .wrow       (wr_row),
      .wdata      (wr_data)
    );
  end

  // ---- CAM priority encoder and output register ---------------------------
  logic [AW-1:0] ma_d;
  logic          hit_d;

  ztcam_cpe #(.L(L), .K(K), .PW(PW), .AW(AW)) u_cpe (
    .pma       (pma),
    .pma_valid (pma_valid),
    .ma        (ma_d),
    .hit       (hit_d)
  );

  logic [AW-1:0] ma_q;
  logic          search;
  assign search = !sel && r_wb && !busy;

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      ma_q  <= '0;
      hit   <= 1'b0;
      ma_oe <= 1'b0;
    end else begin
      ma_oe <= !sel;
      if (search) begin
        ma_q <= ma_d;
        hit  <= hit_d;
      end
    end
  end

  assign ma = ma_oe ? ma_q : '0;

  // Protocol: no search result is taken while the tables are being written.
  a_no_search_while_busy: assert property (
    @(posedge gclk) disable iff (!rst_n)
      busy |=> $stable(ma_q) && $stable(hit));

endmodule
