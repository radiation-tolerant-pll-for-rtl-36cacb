// tb_pll_fdir_modes - end-to-end test of the FDIR core in the two other
// redundancy modes: dual (two PLLs) and triple with majority voting. Uses
// the behavioural PLL model, a shortened lock timeout and one output clock
// per PLL.
//   Dual: failover from PLL0 to PLL1, no switch back when PLL0 recovers,
//         failover back to PLL0, and no output while both PLLs are down.
//   Majority: failover while two PLLs stay healthy, output removed as soon
//         as only one PLL is healthy, output restored when a second PLL
//         re-locks.
module tb_pll_fdir_modes;
  import fdir_pkg::*;
  localparam int MH = 10, PH = 4, LOCKC = 50;

  logic clk = 1'b0, rst_n = 1'b1;
  always #MH clk = ~clk;

  int checks = 0, failures = 0;
  int n_dual_failover = 0, n_dual_none = 0, n_maj_failover = 0, n_maj_none = 0, n_maj_back = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- dual ----------------
  logic [1:0] d_clk, d_lock, d_rst, d_upset = '0;
  logic d_out, d_alert;
  sel_t d_sel;
  logic [1:0] d_healthy, d_en;
  logic [7:0] d_swc;
  logic [1:0][7:0] d_rc;

  for (genvar i = 0; i < 2; i++) begin : g_dpll
    pll_model #(.HALF(PH), .PHASE(i * 3), .LOCK_CYCLES(LOCKC)) u (.ref_clk(clk), .rst(d_rst[i]),
      .upset(d_upset[i]), .dead(1'b0), .clk_out(d_clk[i]), .lock(d_lock[i]));
  end

  pll_fdir_top #(.MODE(MODE_DUAL), .LOCK_TIMEOUT(64), .NUM_OUT(1)) u_dual (
    .clk, .rst_n, .pll_clk(d_clk), .pll_lock(d_lock), .pll_rst(d_rst), .clk_out(d_out),
    .cmd_bypass(1'b0), .cmd_sel(2'd0), .pll_sel(d_sel), .pll_healthy(d_healthy), .clk_en(d_en),
    .switch_alert(d_alert), .switch_count(d_swc), .reset_count(d_rc));

  // ---------------- triple with majority ----------------
  logic [2:0] m_clk, m_lock, m_rst, m_upset = '0;
  logic m_out, m_alert;
  sel_t m_sel;
  logic [2:0] m_healthy, m_en;
  logic [7:0] m_swc;
  logic [2:0][7:0] m_rc;

  for (genvar i = 0; i < 3; i++) begin : g_mpll
    pll_model #(.HALF(PH), .PHASE(i), .LOCK_CYCLES(LOCKC)) u (.ref_clk(clk), .rst(m_rst[i]),
      .upset(m_upset[i]), .dead(1'b0), .clk_out(m_clk[i]), .lock(m_lock[i]));
  end

  pll_fdir_top #(.MODE(MODE_TRIPLE_MAJ), .LOCK_TIMEOUT(64), .NUM_OUT(1)) u_maj (
    .clk, .rst_n, .pll_clk(m_clk), .pll_lock(m_lock), .pll_rst(m_rst), .clk_out(m_out),
    .cmd_bypass(1'b0), .cmd_sel(2'd0), .pll_sel(m_sel), .pll_healthy(m_healthy), .clk_en(m_en),
    .switch_alert(m_alert), .switch_count(m_swc), .reset_count(m_rc));

  task automatic wait_master(input int n);
    repeat (n) @(posedge clk);
  endtask

  // Running edge counts of the two output clocks.
  int d_edges = 0, m_edges = 0, toggles;
  always @(d_out) d_edges++;
  always @(m_out) m_edges++;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    wait_master(5);
    #1 rst_n = 1'b1;
    wait (d_healthy == 2'b11 && m_healthy == 3'b111);
    wait_master(20);

    // dual
    check(d_sel == 2'd0 && d_en == 2'b01, "dual: PLL0 in use");
    d_upset[0] = 1'b1; #1 d_upset[0] = 1'b0;
    wait_master(4);
    check(d_sel == 2'd1 && d_alert, "dual: failover to PLL1");
    if (d_sel == 2'd1) n_dual_failover++;
    wait (d_healthy == 2'b11);
    wait_master(30);
    check(d_sel == 2'd1 && d_en == 2'b10, "dual: stays on PLL1 after PLL0 recovers");
    #0.5 check(d_out == d_clk[1], "dual: output is PLL1 clock");
    d_upset[1] = 1'b1; #1 d_upset[1] = 1'b0;
    wait_master(4);
    check(d_sel == 2'd0, "dual: failover back to PLL0");
    if (d_sel == 2'd0) n_dual_failover++;
    wait (d_healthy == 2'b11);
    wait_master(30);
    d_upset = 2'b11; #1 d_upset = 2'b00;
    wait_master(4);
    check(d_sel == 2'd0 && d_en == 2'b00, "dual: both down, channel cleared");
    toggles = d_edges; wait_master(6); toggles = d_edges - toggles;
    check(toggles == 0, "dual: no output clock with both PLLs down");
    if (toggles == 0) n_dual_none++;
    wait (d_healthy != 2'b00);
    wait_master(30);
    check(d_en != 2'b00, "dual: output back after recovery");
    check(d_rc[0] >= 8'd2 && d_rc[1] >= 8'd2, "dual: auto resets counted");

    // majority
    check(m_sel == 2'd1 && m_en == 3'b001, "maj: PLL0 in use");
    m_upset[0] = 1'b1; #1 m_upset[0] = 1'b0;
    wait_master(4);
    check(m_sel == 2'd2, "maj: failover to PLL1 with two healthy");
    if (m_sel == 2'd2) n_maj_failover++;
    m_upset[1] = 1'b1; #1 m_upset[1] = 1'b0;
    wait_master(4);
    check(m_healthy == 3'b100, "maj: only PLL2 healthy");
    check(m_sel == 2'd0 && m_en == 3'b000, "maj: no PLL selected with one healthy");
    toggles = m_edges; wait_master(6); toggles = m_edges - toggles;
    check(toggles == 0, "maj: no output clock with one healthy PLL");
    if (toggles == 0 && m_healthy == 3'b100) n_maj_none++;
    wait (m_healthy[0] || m_healthy[1]);
    wait_master(4);
    check(m_sel != 2'd0, "maj: output back with two healthy");
    if (m_sel != 2'd0) n_maj_back++;
    wait_master(30);
    #0.5 check(m_out == m_clk[m_sel - 1], "maj: output follows selected PLL");

    check(n_dual_failover == 2 && n_dual_none == 1, "dual mechanisms exercised");
    check(n_maj_failover == 1 && n_maj_none == 1 && n_maj_back == 1, "majority mechanisms exercised");
    $display("dual failovers %0d dual no-output %0d maj failovers %0d maj no-output %0d maj restore %0d",
             n_dual_failover, n_dual_none, n_maj_failover, n_maj_none, n_maj_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
