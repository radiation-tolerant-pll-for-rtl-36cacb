// tb_pll_fdir_top - end-to-end test of the FDIR core with every parameter
// at its default (triple redundancy without majority voting), driving three
// behavioural PLL models from one master clock.
//
// Scenario: power-up and lock; a short glitch on a lock line (ignored);
// upset of the PLL in use (failover, alert,
// auto reset, re-lock without switching back); upset of a standby PLL (no
// switch); upset of the new PLL in use (failover back along the fixed
// sequence); permanent failure of one PLL (repeated resets after the lock
// timeout); loss of all remaining PLLs (no output clock) and recovery;
// command bypass to a chosen PLL and release. Throughout, the output clock
// is checked for pulses shorter than a PLL half period, and sampled against
// the selected PLL's clock. Each mechanism is counted and must happen.
module tb_pll_fdir_top;
  import fdir_pkg::*;
  localparam int MH = 10;            // master clock half period
  localparam int PH = 4;             // PLL output half period
  localparam int LOCKC = 50;         // PLL output cycles to lock
  localparam int NO = 7;             // clock outputs per PLL (core default)

  logic clk = 1'b0, rst_n = 1'b1;
  logic [2:0][NO-1:0] pll_clk;
  logic [2:0] pll_lock, pll_rst;
  logic [2:0] lock_glitch = '0;      // short low pulses forced onto the lock lines
  logic [2:0] lock_to_core;
  assign lock_to_core = pll_lock & ~lock_glitch;
  logic [2:0] upset = '0, dead = '0;
  logic [NO-1:0] clk_out;
  logic cmd_bypass = 1'b0;
  sel_t cmd_sel = '0;
  sel_t pll_sel;
  logic [2:0] pll_healthy;
  logic [NO-1:0][2:0] clk_en;
  logic switch_alert;
  logic [7:0] switch_count;
  logic [2:0][7:0] reset_count;

  int checks = 0, failures = 0;
  int n_failover = 0, n_standby_fault = 0, n_auto_reset = 0, n_relock = 0;
  int n_timeout_retry = 0, n_no_output = 0, n_bypass = 0, n_alert = 0, n_glitch = 0;

  always #MH clk = ~clk;

  pll_model #(.HALF(PH), .PHASE(0), .LOCK_CYCLES(LOCKC), .NUM_OUT(NO)) u_pll0 (.ref_clk(clk), .rst(pll_rst[0]),
    .upset(upset[0]), .dead(dead[0]), .clk_out(pll_clk[0]), .lock(pll_lock[0]));
  pll_model #(.HALF(PH), .PHASE(2), .LOCK_CYCLES(LOCKC), .NUM_OUT(NO)) u_pll1 (.ref_clk(clk), .rst(pll_rst[1]),
    .upset(upset[1]), .dead(dead[1]), .clk_out(pll_clk[1]), .lock(pll_lock[1]));
  pll_model #(.HALF(PH), .PHASE(3), .LOCK_CYCLES(LOCKC), .NUM_OUT(NO)) u_pll2 (.ref_clk(clk), .rst(pll_rst[2]),
    .upset(upset[2]), .dead(dead[2]), .clk_out(pll_clk[2]), .lock(pll_lock[2]));

  pll_fdir_top dut (
    .clk, .rst_n, .pll_clk, .pll_lock(lock_to_core), .pll_rst, .clk_out, .cmd_bypass, .cmd_sel,
    .pll_sel, .pll_healthy, .clk_en, .switch_alert, .switch_count, .reset_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Output clock pulse-width monitors (output k has half period PH + k)
  // and the longest low time of output 0.
  realtime longest_low = 0;
  bit mon_on = 1'b0;
  int n_short = 0;
  for (genvar k = 0; k < NO; k++) begin : g_mon
    realtime last_edge = 0;
    bit armed = 1'b0;
    always @(clk_out[k]) begin
      if (armed && ($time - last_edge < PH + k)) begin
        n_short++;
        $display("short pulse on output %0d at %0t sel %0d healthy %03b", k, $time, pll_sel, pll_healthy);
      end
      if (k == 0 && armed && clk_out[k] && ($time - last_edge > longest_low))
        longest_low = $time - last_edge;
      last_edge = $time;
      armed = mon_on;
    end
  end

  // Alert pulses and their length in master cycles.
  int alert_len = 0;
  always @(posedge clk) begin
    if (switch_alert) alert_len++;
    else if (alert_len != 0) begin
      n_alert++;
      check(alert_len == 16, $sformatf("alert length %0d", alert_len));
      alert_len = 0;
    end
  end

  // Output follows the selected PLL.
  task automatic sample_output(input int n);
    for (int s = 0; s < n; s++) begin
      #($urandom_range(1, 2 * PH - 1));
      #0.5;  // half-way between the integer-time clock edges
      if (pll_sel != 2'd0 && clk_en[0] != 3'b000)
        check(clk_out == pll_clk[pll_sel - 1], $sformatf("outputs follow PLL%0d", pll_sel - 1));
      #0.5;
    end
  endtask

  task automatic hit(input int i);
    upset[i] = 1'b1;
    #1 upset[i] = 1'b0;
  endtask

  task automatic wait_master(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sc, rc, gap_bound, toggles;
  initial begin
    #1 rst_n = 1'b0;
    wait_master(5);
    #1 rst_n = 1'b1;
    // --- power-up: all PLLs lock, PLL0 is taken first
    wait (pll_healthy == 3'b111);
    wait_master(20);
    mon_on = 1'b1;
    check(pll_sel == 2'd1 && clk_en == {NO{3'b001}}, "PLL0 selected after power-up");
    sample_output(40);

    // --- short glitch on the lock of the PLL in use, between two master
    //     edges: filtered by the registered lock, no switch, no reset
    sc = int'(switch_count); rc = int'(reset_count[0]);
    @(posedge clk); #(MH / 2);
    lock_glitch[0] = 1'b1; #(MH / 2) lock_glitch[0] = 1'b0;
    wait_master(6);
    check(pll_sel == 2'd1 && int'(switch_count) == sc && int'(reset_count[0]) == rc,
          "lock glitch between edges causes no switch or reset");
    if (pll_sel == 2'd1 && int'(switch_count) == sc) n_glitch++;

    // --- upset of the PLL in use
    sc = int'(switch_count); rc = int'(reset_count[0]);
    longest_low = 0;
    hit(0);
    wait_master(4);
    check(pll_sel == 2'd2, "failover to PLL1");
    if (pll_sel == 2'd2) n_failover++;
    check(switch_alert, "alert raised on switch");
    check(int'(switch_count) == sc + 1, "switch counted");
    check(int'(reset_count[0]) == rc + 1, "auto reset of PLL0 counted");
    if (int'(reset_count[0]) == rc + 1) n_auto_reset++;
    wait (pll_healthy[0]);
    n_relock++;
    wait_master(40);
    check(pll_sel == 2'd2, "no switch back when PLL0 recovers");
    gap_bound = (2 + 3) * 2 * MH + 3 * 2 * PH;
    check(longest_low <= gap_bound, $sformatf("failover gap %0t within %0d", longest_low, gap_bound));
    $display("failover: longest output gap %0t", longest_low);
    sample_output(40);

    // --- upset of a standby PLL: isolated and reset, no switch
    sc = int'(switch_count); rc = int'(reset_count[2]);
    hit(2);
    wait_master(6);
    check(!pll_healthy[2], "standby PLL2 isolated");
    check(pll_sel == 2'd2 && int'(switch_count) == sc, "no switch on standby fault");
    if (pll_sel == 2'd2 && int'(switch_count) == sc) n_standby_fault++;
    check(int'(reset_count[2]) == rc + 1, "standby PLL2 auto reset");
    wait (pll_healthy[2]);
    n_relock++;
    wait_master(10);

    // --- upset of PLL1 (in use): back to PLL0, first in sequence
    hit(1);
    wait_master(4);
    check(pll_sel == 2'd1, "failover to PLL0");
    if (pll_sel == 2'd1) n_failover++;
    wait (pll_healthy[1]);
    wait_master(40);
    sample_output(40);

    // --- PLL2 fails for good: repeated resets after the lock timeout
    rc = int'(reset_count[2]);
    dead[2] = 1'b1;
    wait_master(2 * 4096 + 100);
    check(int'(reset_count[2]) >= rc + 3, $sformatf("lock-timeout retries (%0d resets)", int'(reset_count[2]) - rc));
    if (int'(reset_count[2]) >= rc + 3) n_timeout_retry++;
    check(pll_sel == 2'd1, "dead standby causes no switch");

    // --- PLL0 and PLL1 lost together: no PLL healthy, no output clock
    hit(0); hit(1);
    wait_master(5);
    check(pll_sel == 2'd0 && clk_en == '0, "no PLL selected with none healthy");
    begin
      toggles = 0;
      fork
        begin : count_edges
          forever begin @(clk_out); toggles++; end
        end
      join_none
      wait_master(8);
      disable fork;
      check(toggles == 0, "no output clock with no healthy PLL");
      if (toggles == 0) n_no_output++;
    end
    wait (pll_healthy[0] || pll_healthy[1]);
    wait_master(5);
    check(pll_sel != 2'd0 && clk_en[0] != 3'b000, "output back after recovery");
    wait (pll_healthy[1:0] == 2'b11);
    wait_master(40);
    sample_output(40);

    // --- command bypass to PLL1, then release
    sc = int'(switch_count);
    cmd_sel = 2'd2; cmd_bypass = 1'b1;
    wait_master(3);
    check(pll_sel == 2'd2, "bypass selects PLL1");
    wait_master(20);
    check(clk_en == {NO{3'b010}}, "bypass clock enabled");
    sample_output(40);
    if (pll_sel == 2'd2 && clk_en == {NO{3'b010}}) n_bypass++;
    cmd_bypass = 1'b0;
    wait_master(20);
    check(pll_sel == 2'd2, "healthy PLL kept after bypass release");
    wait_master(40);

    // --- mechanism coverage and glitch summary
    check(n_short == 0, $sformatf("%0d short output pulses", n_short));
    check(n_failover == 2, "failovers");
    check(n_standby_fault == 1, "standby fault without switch");
    check(n_auto_reset > 0 && n_relock > 0, "auto reset and re-lock");
    check(n_timeout_retry == 1, "lock-timeout retry");
    check(n_no_output == 1, "no output with no healthy PLL");
    check(n_bypass == 1, "bypass");
    check(n_alert >= 3, "alerts");
    check(n_glitch == 1, "lock glitch filtered");
    $display("lock glitches filtered %0d", n_glitch);
    $display("failovers %0d standby-faults %0d auto-resets %0d relocks %0d timeout-retries %0d no-output %0d bypass %0d alerts %0d switches %0d",
             n_failover, n_standby_fault, n_auto_reset, n_relock, n_timeout_retry, n_no_output, n_bypass, n_alert, switch_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
