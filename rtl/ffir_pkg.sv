// ffir_pkg: constants and types shared by the folded bit-plane FIR filter.
//
// The default sizes are those of the reference configuration of the
// architecture: k = 8 sections, a folding factor of up to 16, 8-bit input
// words and a 27-bit output word. E_MAX (the longest extra delay that can be
// switched into the fold path from the last section back to the first) is a
// choice of this implementation; 3 covers every folding factor up to 16 with
// k = 8 (see fir_ctrl).
package ffir_pkg;

  parameter int unsigned K_DEF     = 8;   // number of sections / folding sets (k)
  parameter int unsigned N_MAX_DEF = 16;  // largest folding factor (N_max)
  parameter int unsigned XW_DEF    = 8;   // input word length (n)
  parameter int unsigned YW_DEF    = 27;  // output word length (y)
  parameter int unsigned E_MAX_DEF = 3;   // extra fold-path registers available

  // Operating mode of the filter.
  typedef enum logic [1:0] {
    MODE_IDLE = 2'd0,   // no valid configuration
    MODE_INIT = 2'd1,   // coefficient bits are being entered
    MODE_RUN  = 2'd2    // filtering
  } mode_e;

endpackage
