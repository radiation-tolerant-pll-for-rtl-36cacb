// fdir_pkg - types and helpers shared by the redundant-PLL FDIR core.
//
// The core runs in one of three redundancy modes. In dual mode the PLL
// selection is one bit: 0 picks PLL index 0 (the primary), 1 picks PLL
// index 1. In both triple modes the selection is a two-bit code: 0 means
// "no PLL" (no output clock), 1, 2 and 3 pick PLL index 0, 1 and 2. The
// code values 1..3 and the "none" code follow the selection equations of
// the triple-redundant switching logic; the enum and helper functions are
// this design's own packaging.
package fdir_pkg;

  typedef enum logic [1:0] {
    MODE_DUAL       = 2'd0,  // two PLLs, switch to whichever is locked
    MODE_TRIPLE     = 2'd1,  // three PLLs, output while any one is locked
    MODE_TRIPLE_MAJ = 2'd2   // three PLLs, output only while two or more are locked
  } fdir_mode_e;

  // Selection code held by the switching matrix.
  typedef logic [1:0] sel_t;

  localparam sel_t SEL_NONE = 2'd0;

  // Number of PLLs used in a mode.
  function automatic int unsigned num_plls(fdir_mode_e mode);
    return (mode == MODE_DUAL) ? 2 : 3;
  endfunction

  // One-hot clock request (bit i = PLL index i) for a selection code.
  function automatic logic [2:0] sel_to_onehot(fdir_mode_e mode, sel_t sel);
    logic [2:0] oh;
    oh = '0;
    if (mode == MODE_DUAL) begin
      oh = sel[0] ? 3'b010 : 3'b001;
    end else if (sel != SEL_NONE) begin
      oh[sel - 2'd1] = 1'b1;
    end
    return oh;
  endfunction

endpackage
