// sel_next_triple - next-PLL selection, triple redundancy without majority.
//
// Combinational next-state function of the switching matrix for three PLLs
// when one locked PLL is enough to drive the output. Selection codes:
// 0 = no output, 1/2/3 = PLL index 0/1/2.
//   * no PLL locked                -> 0 (no output clock)
//   * current PLL still locked     -> keep it
//   * otherwise                    -> first locked PLL in the fixed sequence
//                                     index 0, 1, 2
// These are the document's stated rules for this mode. Its printed equations
// agree with them in 30 of 32 input combinations; in the remaining two (PLL
// index 1 selected and locked while PLL index 0 is also locked) they would
// move to PLL index 2, against the rule that the selected output does not
// change until its PLL loses lock, so the rule is used.
//
// Interface: sel (current code), lock[2:0] (healthy flags), sel_next.
module sel_next_triple
  import fdir_pkg::*;
(
  input  sel_t       sel,
  input  logic [2:0] lock,
  output sel_t       sel_next
);

  logic cur_ok;

  always_comb begin
    cur_ok = (sel != SEL_NONE) && lock[sel - 2'd1];
    if (cur_ok)        sel_next = sel;
    else if (lock[0])  sel_next = 2'd1;
    else if (lock[1])  sel_next = 2'd2;
    else if (lock[2])  sel_next = 2'd3;
    else               sel_next = SEL_NONE;
  end

endmodule
