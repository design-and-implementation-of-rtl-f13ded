// ztcam_mapper: data-mapping sequencer of the ZTCAM.
//
// Converts a conventional ternary table into the contents of the validation
// memories and original address tables. Entry e of the table (value, care
// mask, valid) lives in layer e / K as local address k = e % K. For every
// layer l, partition n and row r (r = every W-bit value), the mapper writes
// OAT row r of pair (l, n) with
//     bit k = valid[e] && ((r ^ subword_n(value[e])) & subword_n(care[e])) == 0
// i.e. bit k is set when the ternary subword of entry e covers the binary
// value r. This is the expansion of don't-care bits (a subword 0x becomes the
// two rows 00 and 01) done row by row instead of entry by entry; the layer
// writes the VM bit of the row as the OR of the OAT row. Every row is written,
// so a load fully replaces the previous contents.
//
// A care bit of 1 means the bit must match; 0 marks an x. Subword n is taken
// from bits [C-1-n*W -: W], subword 0 being the most significant.
//
// Timing: start (one cycle, while idle) copies the table into a holding
// register. The mapper then issues one row write per clock, L*N*2**W writes in
// all, layer-major, then partition, then row. busy is high exactly while the
// writes are issued, from the cycle after start to the last write; done is a
// one-cycle pulse in the cycle after the last write. start is only taken in
// the idle state, so a start while busy (or during done) is ignored.
//
// What a mapping has to produce follows the design's data-mapping description;
// the sequencer, its order and its timing are this implementation's.
module ztcam_mapper
  import ztcam_pkg::*;
#(
  parameter int unsigned C  = ztcam_pkg::C_DEF,   // word width
  parameter int unsigned W  = ztcam_pkg::W_DEF,   // subword width
  parameter int unsigned N  = C / W,              // subwords per word
  parameter int unsigned L  = ztcam_pkg::L_DEF,   // layers
  parameter int unsigned K  = ztcam_pkg::K_DEF,   // entries per layer
  parameter int unsigned NW = ztcam_pkg::idx_w(N),
  parameter int unsigned LW = ztcam_pkg::idx_w(L)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [L*K-1:0]          tbl_valid,  // entry in use
  input  logic [L*K-1:0][C-1:0]   tbl_value,  // entry value bits
  input  logic [L*K-1:0][C-1:0]   tbl_care,   // 1 = bit cares, 0 = x
  output logic                    busy,
  output logic                    done,
  // row-write port towards the layers
  output logic                    wr_en,
  output logic [LW-1:0]           wr_layer,
  output logic [NW-1:0]           wr_part,
  output logic [W-1:0]            wr_row,
  output logic [K-1:0]            wr_data
);

  map_state_e state;

  logic [L*K-1:0]        valid_q;
  logic [L*K-1:0][C-1:0] value_q;
  logic [L*K-1:0][C-1:0] care_q;

  logic [LW-1:0] l_q;
  logic [NW-1:0] n_q;
  logic [W-1:0]  r_q;

  logic last_row, last_part, last_layer;
  assign last_row   = (r_q == W'((1 << W) - 1));
  assign last_part  = (n_q == NW'(N - 1));
  assign last_layer = (l_q == LW'(L - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= MAP_IDLE;
      valid_q <= '0;
      value_q <= '0;
      care_q  <= '0;
      l_q     <= '0;
      n_q     <= '0;
      r_q     <= '0;
    end else begin
      unique case (state)
        MAP_IDLE: begin
          if (start) begin
            valid_q <= tbl_valid;
            value_q <= tbl_value;
            care_q  <= tbl_care;
            l_q     <= '0;
            n_q     <= '0;
            r_q     <= '0;
            state   <= MAP_RUN;
          end
        end
        MAP_RUN: begin
          r_q <= r_q + 1'b1;
          if (last_row) begin
            n_q <= last_part ? '0 : n_q + 1'b1;
            if (last_part) begin
              l_q <= l_q + 1'b1;
              if (last_layer) state <= MAP_DONE;
            end
          end
        end
        MAP_DONE: state <= MAP_IDLE;
        default:  state <= MAP_IDLE;
      endcase
    end
  end

  // OAT row for (l_q, n_q, r_q): ternary compare of each entry's subword.
  always_comb begin
    int unsigned base;
    int unsigned e;
    base = C - W - int'(n_q) * W;
    for (int unsigned k = 0; k < K; k++) begin
      e = int'(l_q) * K + k;
      wr_data[k] = valid_q[e] &&
                   (((r_q ^ value_q[e][base +: W]) & care_q[e][base +: W]) == '0);
    end
  end

  assign busy     = (state == MAP_RUN);
  assign done     = (state == MAP_DONE);
  assign wr_en    = (state == MAP_RUN);
  assign wr_layer = l_q;
  assign wr_part  = n_q;
  assign wr_row   = r_q;

  // Protocol: done follows the final row write and lasts a single cycle.
  a_done_after_last_write: assert property (
    @(posedge clk) disable iff (!rst_n)
      done |-> $past(wr_en) && $past(last_row && last_part && last_layer) && !$past(done));

endmodule
