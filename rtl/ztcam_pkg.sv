// ztcam_pkg: shared constants and types of the SRAM-based ternary CAM (ZTCAM).
//
// The defaults describe the configuration the design was presented in: a
// 4-bit search word (c[3:0]) cut into N = 2 subwords of w = 2 bits, a table
// of four ternary entries split into L = 2 layers of K = 2 entries, giving a
// 2-bit match address (ma[1:0]). Every module takes these as typed
// parameters, so other sizes are set per instance.
package ztcam_pkg;

  // Search word width in bits (C).
  localparam int unsigned C_DEF = 4;
  // Subword width in bits (w); each VM/OAT has 2**w rows.
  localparam int unsigned W_DEF = 2;
  // Subwords per word, i.e. vertical partitions per layer (N = C / w).
  localparam int unsigned N_DEF = C_DEF / W_DEF;
  // Layers (L) and original addresses held by one layer (K).
  localparam int unsigned L_DEF = 2;
  localparam int unsigned K_DEF = 2;

  // State of the data-mapping sequencer.
  typedef enum logic [1:0] {
    MAP_IDLE = 2'd0,  // waiting for a load request
    MAP_RUN  = 2'd1,  // writing one OAT/VM row per clock
    MAP_DONE = 2'd2   // one-cycle completion pulse
  } map_state_e;

  // Index width that also works for a count of one.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
