// pll_fdir_top - fault detection, isolation and recovery (FDIR) core for
// hot-redundant PLLs.
//
// Two or three PLLs with identical settings run side by side from the same
// input clock. For each PLL a pll_error_detect block watches the lock on the
// master clock; when a PLL loses lock it is marked unhealthy at once, its
// channel in the clock multiplexer is cleared, and it is reset
// automatically until it locks again (recovery runs in parallel with normal
// operation). The switching matrix (switch_ctrl) picks the PLL that drives
// the output from the healthy flags and the current choice, so a switch only
// happens when the PLL in use fails, and the glitch-free multiplexers move
// the outputs to the new PLL with a gap of about two cycles instead of a
// glitch. Each PLL provides NUM_OUT output clocks (default 7, as many as
// the FPGA PLL of the document's block diagram has, CLKOUT0 to CLKOUT6,
// and consistent with its clock-buffer counts of 7 x 3 for two PLLs and
// 7 x 4 for three); output k of the core is a multiplexer over output k of
// every PLL, and all multiplexers follow the same selection. Telemetry: the current selection, the health flags, a switching
// alert of fixed length, a switch counter and a reset counter per PLL.
// Telecommand: cmd_bypass pins the output to cmd_sel whatever the health
// flags say.
//
// MODE chooses the redundancy scheme (see fdir_pkg): MODE_DUAL (2 PLLs),
// MODE_TRIPLE (3 PLLs, output while any is locked) or MODE_TRIPLE_MAJ
// (3 PLLs, output only while two or more are locked). The default is
// triple redundancy without majority voting, the scheme with the highest
// clock availability. The document selects the scheme with compiler
// directives; here it is a parameter. The document's structure, lock-based
// detection, auto reset, glitch-free switching, alert, counters and bypass
// are followed; widths, lengths and the registered switching are this
// design's choices.
//
// Interface: clk/rst_n master clock and active-low master reset; pll_clk,
// pll_lock from the PLLs (pll_clk[i][k] is output k of PLL i); pll_rst
// (active high) to the PLLs, the master reset combined with each PLL's auto
// reset; clk_out[k]; clk_en[k][i] tells which PLL drives clk_out[k]; the
// rest telemetry and telecommand. Timing: a lock loss is seen SYNC_STAGES master cycles
// later; the failed channel is cleared one cycle after that, the new
// selection registered in the same cycle, and the new clock appears on
// clk_out within about two of its own cycles.
module pll_fdir_top
  import fdir_pkg::*;
#(
  parameter fdir_mode_e  MODE         = MODE_TRIPLE,
  parameter int unsigned SYNC_STAGES  = 2,
  parameter int unsigned RST_CYCLES   = 16,
  parameter int unsigned LOCK_TIMEOUT = 4096,
  parameter int unsigned ALERT_CYCLES = 16,
  parameter int unsigned CNT_W        = 8,
  parameter int unsigned NUM_OUT      = 7,
  localparam int unsigned N           = (MODE == MODE_DUAL) ? 2 : 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // PLL side
  input  logic [N-1:0][NUM_OUT-1:0] pll_clk,
  input  logic [N-1:0]              pll_lock,
  output logic [N-1:0]              pll_rst,
  // output clocks
  output logic [NUM_OUT-1:0]        clk_out,
  // telecommand
  input  logic                      cmd_bypass,
  input  sel_t                      cmd_sel,
  // telemetry
  output sel_t                      pll_sel,
  output logic [N-1:0]              pll_healthy,
  output logic [NUM_OUT-1:0][N-1:0] clk_en,
  output logic                      switch_alert,
  output logic [CNT_W-1:0]          switch_count,
  output logic [N-1:0][CNT_W-1:0]   reset_count
);

  logic [N-1:0] auto_rst;
  logic [N-1:0] fault;
  logic [2:0]   healthy3;
  logic [2:0]   req3;
  logic [N-1:0] kill_q;

  for (genvar i = 0; i < N; i++) begin : g_pll
    pll_error_detect #(
      .SYNC_STAGES (SYNC_STAGES),
      .RST_CYCLES  (RST_CYCLES),
      .LOCK_TIMEOUT(LOCK_TIMEOUT),
      .CNT_W       (CNT_W)
    ) u_det (
      .clk        (clk),
      .rst_n      (rst_n),
      .lock_async (pll_lock[i]),
      .healthy    (pll_healthy[i]),
      .pll_rst    (auto_rst[i]),
      .fault      (fault[i]),
      .reset_count(reset_count[i])
    );
    assign pll_rst[i] = ~rst_n | auto_rst[i];
  end

  always_comb begin
    healthy3        = '0;
    healthy3[N-1:0] = pll_healthy;
  end

  switch_ctrl #(
    .MODE        (MODE),
    .ALERT_CYCLES(ALERT_CYCLES),
    .CNT_W       (CNT_W)
  ) u_switch (
    .clk         (clk),
    .rst_n       (rst_n),
    .healthy     (healthy3),
    .cmd_bypass  (cmd_bypass),
    .cmd_sel     (cmd_sel),
    .sel         (pll_sel),
    .req         (req3),
    .alert       (switch_alert),
    .switch_count(switch_count)
  );

  // Isolation: a channel whose PLL is not healthy is held cleared in the
  // multiplexer, unless the output is pinned to it by command. Registered
  // so that the asynchronous clear is glitch free.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) kill_q <= '1;
    else        kill_q <= ~pll_healthy & ~{N{cmd_bypass}};
  end

  // One glitch-free multiplexer per output clock, all following the same
  // selection.
  for (genvar k = 0; k < NUM_OUT; k++) begin : g_out
    logic [N-1:0] clk_k;
    for (genvar i = 0; i < N; i++) begin : g_in
      assign clk_k[i] = pll_clk[i][k];
    end
    glitch_free_clk_mux #(.N(N)) u_mux (
      .clk_in (clk_k),
      .req    (req3[N-1:0]),
      .kill   (kill_q),
      .clk_out(clk_out[k]),
      .en     (clk_en[k])
    );
  end

  // fault is a one-cycle pulse that must coincide with a loss of health.
  always_comb assert ((fault & pll_healthy) == '0);

endmodule
