// ztcam_oat: original address table (OAT) of one hybrid partition.
//
// A 2**W x K memory. Row r holds one bit per original address of the layer:
// bit k is 1 when entry k of the layer has, in this partition, a subword that
// covers the value r (after don't-care bits have been expanded). During a
// search the subword is applied to the OAT directly as its address, and the
// layer's activation signal (the AND of all VM outputs) enables the read: with
// the activation low the OAT returns all zeros, so nothing downstream toggles
// for a word that the VMs have already rejected.
//
// Interface: synchronous write port (we/waddr/wdata, rising edge of clk),
// asynchronous read port (raddr, ren -> rdata). rst_n (asynchronous, active
// low) clears the table.
//
// Feeding the subword straight in and gating the read with the activation
// signal is the area-efficient arrangement the design is built on; the
// register-array storage and the reset are choices of this implementation.
module ztcam_oat #(
  parameter int unsigned W = ztcam_pkg::W_DEF,  // subword width
  parameter int unsigned K = ztcam_pkg::K_DEF   // original addresses per layer
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,     // write strobe
  input  logic [W-1:0] waddr,  // row (subword value) to write
  input  logic [K-1:0] wdata,  // one bit per original address
  input  logic [W-1:0] raddr,  // search subword
  input  logic         ren,    // activation signal from the 1-bit AND
  output logic [K-1:0] rdata   // K-bit row, zero when ren is low
);

  localparam int unsigned ROWS = 1 << W;

  logic [ROWS-1:0][K-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  mem <= '0;
    else if (we) mem[waddr] <= wdata;
  end

  assign rdata = ren ? mem[raddr] : '0;

endmodule
