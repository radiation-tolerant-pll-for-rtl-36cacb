// switch_ctrl - switching matrix of the redundant-PLL FDIR core.
//
// Holds the current PLL selection in a register on the master clock and
// updates it every cycle from the next-selection logic of the configured
// redundancy mode (sel_next_dual, sel_next_triple or sel_next_triple_maj),
// fed with the healthy flags of the PLLs. Because the current selection is
// one of the inputs of that logic, a PLL is only switched away from when it
// stops being healthy, and the first healthy PLL in a fixed order is taken
// in its place.
//
// Command bypass: while cmd_bypass is high the selection is forced to
// cmd_sel, whatever the health flags say, so the output can be pinned to a
// chosen PLL (for example after permanent failure of the others).
//
// Every change of the selection starts a switching alert that stays high
// for ALERT_CYCLES master-clock cycles and increments the saturating
// switch_count. The document asks for an alert "of finite duration" and a
// switch counter; their length and width, the registered (sequential)
// implementation and the reset value (PLL index 0 in dual mode, no PLL in
// the triple modes) are this design's choices.
//
// Interface: healthy[2:0] (bit 2 unused in dual mode), cmd_bypass, cmd_sel
// (a selection code, see fdir_pkg), sel (registered code), req (one-hot
// clock request, bit i = PLL index i), alert, switch_count. Timing: sel and
// req change one master-clock cycle after the healthy flags.
module switch_ctrl
  import fdir_pkg::*;
#(
  parameter fdir_mode_e  MODE         = MODE_TRIPLE,
  parameter int unsigned ALERT_CYCLES = 16,
  parameter int unsigned CNT_W        = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       healthy,
  input  logic             cmd_bypass,
  input  sel_t             cmd_sel,
  output sel_t             sel,
  output logic [2:0]       req,
  output logic             alert,
  output logic [CNT_W-1:0] switch_count
);

  localparam int unsigned AW = $clog2(ALERT_CYCLES + 1);

  sel_t          auto_next;
  sel_t          sel_d;
  logic [AW-1:0] alert_q;

  generate
    if (MODE == MODE_DUAL) begin : g_dual
      logic nxt;
      sel_next_dual u_next (.sel(sel[0]), .lock(healthy[1:0]), .sel_next(nxt));
      assign auto_next = {1'b0, nxt};
    end else if (MODE == MODE_TRIPLE_MAJ) begin : g_maj
      sel_next_triple_maj u_next (.sel(sel), .lock(healthy), .sel_next(auto_next));
    end else begin : g_triple
      sel_next_triple u_next (.sel(sel), .lock(healthy), .sel_next(auto_next));
    end
  endgenerate

  always_comb begin
    if (cmd_bypass) sel_d = (MODE == MODE_DUAL) ? {1'b0, cmd_sel[0]} : cmd_sel;
    else            sel_d = auto_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel          <= SEL_NONE;
      alert_q      <= '0;
      switch_count <= '0;
    end else begin
      sel <= sel_d;
      if (sel_d != sel) begin
        alert_q <= AW'(ALERT_CYCLES);
        if (switch_count != '1) switch_count <= switch_count + 1'b1;
      end else if (alert_q != '0) begin
        alert_q <= alert_q - 1'b1;
      end
    end
  end

  assign alert = (alert_q != '0);
  assign req   = sel_to_onehot(MODE, sel);

  // In dual mode the upper selection bit is never used.
  always_comb assert ((MODE != MODE_DUAL) || (sel[1] == 1'b0));

endmodule
