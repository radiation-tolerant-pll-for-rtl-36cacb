// tb_sel_next_dual - exhaustive check of the dual-PLL next-selection logic
// against the truth table of the dual switching logic: fall back to PLL 0
// when neither PLL is locked, move to the only locked PLL, and keep the
// current PLL when both are locked.
module tb_sel_next_dual;
  logic       sel;
  logic [1:0] lock;
  logic       sel_next;
  int checks = 0, failures = 0;

  sel_next_dual dut (.sel(sel), .lock(lock), .sel_next(sel_next));

  // Reference: {pre_sel, lock1, lock0} -> next sel.
  function automatic logic expected(logic s, logic l1, logic l0);
    if (!l1 && !l0) return 1'b0;   // nothing locked: PLL 0
    if (l1 && !l0)  return 1'b1;   // only PLL 1 locked
    if (!l1 && l0)  return 1'b0;   // only PLL 0 locked
    return s;                      // both locked: no switch
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, lock} = 3'(i);
      #1;
      checks++;
      if (sel_next !== expected(sel, lock[1], lock[0])) begin
        failures++;
        $display("FAIL sel=%0b lock=%02b got %0b", sel, lock, sel_next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
