// rad_pkg: types and constants shared by the soft-error tolerant flip-flop
// system, its error monitor, the supply/clock regulator and the shift-register
// BIST.
//
// Nothing here is timing-critical; the package only fixes encodings so that
// testbenches and blocks agree on them. The encodings themselves are this
// design's own choice.
package rad_pkg;
  timeunit 1ps; timeprecision 1ps;

  // What the closed-loop regulator adjusts on a timing pre-error.
  typedef enum logic {
    REG_VOLTAGE   = 1'b0,  // move the supply code, clock period fixed
    REG_FREQUENCY = 1'b1   // move the clock-period code, supply fixed
  } reg_mode_e;

  // Patterns the shift-register BIST loads into the chain under test.
  typedef enum logic [1:0] {
    PAT_CHECKER = 2'd0,    // 0101... along the chain
    PAT_ALL0    = 2'd1,
    PAT_ALL1    = 2'd2
  } bist_pat_e;

  // Bit of pattern `pat` at a chain position whose least significant bit is
  // `idx_lsb`.
  function automatic logic bist_pattern_bit(bist_pat_e pat, logic idx_lsb);
    unique case (pat)
      PAT_CHECKER: return idx_lsb;
      PAT_ALL1:    return 1'b1;
      default:     return 1'b0;
    endcase
  endfunction
endpackage
