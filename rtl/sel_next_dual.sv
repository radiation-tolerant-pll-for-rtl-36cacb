// sel_next_dual - next-PLL selection for the dual-redundant configuration.
//
// Combinational next-state function of the switching matrix with two PLLs.
// sel = 0 picks PLL index 0, sel = 1 picks PLL index 1. The rule is
//   next = lock[1] & (sel | ~lock[0])
// i.e. stay on PLL 1 while it is locked, move to PLL 1 only when it is the
// only locked PLL, and fall back to PLL 0 in every other case (including
// when neither is locked). When both PLLs become locked again the current
// selection is kept, so there is no needless switch. This is the
// document's Boolean equation for the dual switching logic; the document
// also shows it as a combinational feedback loop, whereas here the current
// selection comes from a register in switch_ctrl (the document allows a
// sequential implementation, at the cost of a cycle of switching delay).
//
// Interface: sel (current selection), lock[1:0] (healthy flags, already
// registered on the master clock), sel_next. Purely combinational.
module sel_next_dual (
  input  logic       sel,
  input  logic [1:0] lock,
  output logic       sel_next
);

  always_comb sel_next = lock[1] & (sel | ~lock[0]);

endmodule
