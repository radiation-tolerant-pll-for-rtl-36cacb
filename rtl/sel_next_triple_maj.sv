// sel_next_triple_maj - next-PLL selection, triple redundancy with majority.
//
// Combinational next-state function of the switching matrix for three PLLs
// when an output clock is allowed only while at least two PLLs are locked.
// Selection codes: 0 = no output, 1/2/3 = PLL index 0/1/2.
//   * fewer than two PLLs locked          -> 0 (no output clock)
//   * current PLL still locked            -> keep it (no needless switch)
//   * otherwise                           -> first locked PLL in the fixed
//                                            sequence index 0, 1, 2
// This follows the document's description of the majority mode. Its printed
// sum-of-products equations agree with these rules in 30 of the 32 input
// combinations; in the other two (PLL index 2 selected and still locked,
// with exactly one other PLL locked) the equations would switch away from a
// healthy PLL, which the text rules out, so the text's rule is used.
//
// Interface: sel (current code), lock[2:0] (healthy flags), sel_next.
module sel_next_triple_maj
  import fdir_pkg::*;
(
  input  sel_t       sel,
  input  logic [2:0] lock,
  output sel_t       sel_next
);

  logic two_or_more;
  logic cur_ok;

  always_comb begin
    two_or_more = (lock[0] & lock[1]) | (lock[0] & lock[2]) | (lock[1] & lock[2]);
    cur_ok      = (sel != SEL_NONE) && lock[sel - 2'd1];
    if (!two_or_more)  sel_next = SEL_NONE;
    else if (cur_ok)   sel_next = sel;
    else if (lock[0])  sel_next = 2'd1;
    else               sel_next = 2'd2;  // two locked and index 0 is not: 1 is
  end

endmodule
