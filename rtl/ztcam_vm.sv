// ztcam_vm: validation memory (VM) of one hybrid partition.
//
// A 2**W x 1 memory. During a search the W-bit subword is the read address
// and the bit read out says whether that subword value occurs anywhere in the
// partition (1 = present). The VM is written while the table is being mapped:
// a 1 at the row whose address equals a stored subword, 0 elsewhere.
//
// Interface: one synchronous write port (we/waddr/wdata, on the rising edge
// of clk) and one asynchronous read port (raddr -> rdata), so a search reads
// the VM in the same cycle the subword is applied. rst_n (asynchronous,
// active low) clears every row, which leaves the partition empty.
//
// The 2**W x 1 organisation and the addressing by subword follow the design;
// the register-array implementation, the combinational read and the reset
// are choices of this implementation (the FPGA realisation keeps the tables
// in flip-flops).
module ztcam_vm #(
  parameter int unsigned W = ztcam_pkg::W_DEF  // subword width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,     // write strobe
  input  logic [W-1:0] waddr,  // row (subword value) to write
  input  logic         wdata,  // 1 = subword present
  input  logic [W-1:0] raddr,  // search subword
  output logic         rdata   // subword validated
);

  localparam int unsigned ROWS = 1 << W;

  logic [ROWS-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  mem <= '0;
    else if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
