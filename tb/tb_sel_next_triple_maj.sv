// tb_sel_next_triple_maj - exhaustive check of the triple-PLL next-selection logic
// with majority voting: no output unless two or more PLLs are locked.
// The reference keeps a selected PLL while it is locked and otherwise takes
// the lowest-numbered locked PLL; code 0 means no output clock.
module tb_sel_next_triple_maj;
  import fdir_pkg::*;
  sel_t       sel;
  logic [2:0] lock;
  sel_t       sel_next;
  int checks = 0, failures = 0;

  sel_next_triple_maj dut (.sel(sel), .lock(lock), .sel_next(sel_next));

  function automatic sel_t expected(sel_t s, logic [2:0] l);
    int n;
    n = int'(l[0]) + int'(l[1]) + int'(l[2]);
    if (n < (1 ? 2 : 1)) return 2'd0;
    if (s != 2'd0 && l[int'(s) - 1]) return s;
    for (int p = 0; p < 3; p++) if (l[p]) return sel_t'(p + 1);
    return 2'd0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {sel, lock} = 5'(i);
      #1;
      checks++;
      if (sel_next !== expected(sel, lock)) begin
        failures++;
        $display("FAIL sel=%0d lock=%03b got %0d exp %0d", sel, lock, sel_next, expected(sel, lock));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
