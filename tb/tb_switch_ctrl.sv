// tb_switch_ctrl - checks the switching matrix in all three redundancy
// modes side by side. Random health patterns (held for a few cycles each)
// and bursts of command bypass are applied; a cycle-accurate reference
// model gives the expected selection, clock request, alert (ALERT_CYCLES
// long after every change) and switch count, compared every cycle.
module tb_switch_ctrl;
  import fdir_pkg::*;
  localparam int AL = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] healthy = '0;
  logic bypass = 1'b0;
  sel_t cmd_sel = '0;
  int checks = 0, failures = 0;
  int n_switch = 0, n_bypass = 0;

  sel_t       sel   [3];
  logic [2:0] req   [3];
  logic       alert [3];
  logic [7:0] cnt   [3];

  switch_ctrl #(.MODE(MODE_DUAL),       .ALERT_CYCLES(AL)) u_d (.clk, .rst_n, .healthy, .cmd_bypass(bypass), .cmd_sel,
    .sel(sel[0]), .req(req[0]), .alert(alert[0]), .switch_count(cnt[0]));
  switch_ctrl #(.MODE(MODE_TRIPLE),     .ALERT_CYCLES(AL)) u_t (.clk, .rst_n, .healthy, .cmd_bypass(bypass), .cmd_sel,
    .sel(sel[1]), .req(req[1]), .alert(alert[1]), .switch_count(cnt[1]));
  switch_ctrl #(.MODE(MODE_TRIPLE_MAJ), .ALERT_CYCLES(AL)) u_m (.clk, .rst_n, .healthy, .cmd_bypass(bypass), .cmd_sel,
    .sel(sel[2]), .req(req[2]), .alert(alert[2]), .switch_count(cnt[2]));

  always #5 clk = ~clk;

  // Reference next selection. m: 0 dual, 1 triple, 2 triple with majority.
  function automatic int ref_next(int m, int cur, logic [2:0] h);
    int n;
    if (m == 0) begin
      if (h[1:0] == 2'b11) return cur;
      return h[1] ? 1 : 0;
    end
    n = h[0] + h[1] + h[2];
    if (n == 0 || (m == 2 && n == 1)) return 0;
    if (cur > 0 && h[cur-1]) return cur;
    return h[0] ? 1 : (h[1] ? 2 : 3);
  endfunction

  function automatic logic [2:0] ref_req(int m, int s);
    if (m == 0) return (s == 1) ? 3'b010 : 3'b001;
    return (s == 0) ? 3'b000 : 3'(1 << (s - 1));
  endfunction

  int exp_sel [3];
  int exp_al  [3];
  int exp_cnt [3];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin exp_sel[m] = 0; exp_al[m] = 0; exp_cnt[m] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int step = 0; step < 3000; step++) begin
      // new stimulus just after the edge
      if (step % 4 == 0) healthy = 3'($urandom_range(0, 7));
      if (step % 200 == 150) begin bypass = 1'b1; cmd_sel = 2'($urandom_range(1, 3)); end
      if (step % 200 == 170) bypass = 1'b0;
      @(posedge clk);
      // reference update for this edge
      for (int m = 0; m < 3; m++) begin
        int nx;
        nx = bypass ? ((m == 0) ? int'(cmd_sel[0]) : int'(cmd_sel)) : ref_next(m, exp_sel[m], healthy);
        if (nx != exp_sel[m]) begin
          exp_al[m] = AL;
          if (exp_cnt[m] < 255) exp_cnt[m]++;
          n_switch++;
          if (bypass) n_bypass++;
        end else if (exp_al[m] > 0) begin
          exp_al[m]--;
        end
        exp_sel[m] = nx;
      end
      #1;
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (int'(sel[m]) != exp_sel[m] || req[m] != ref_req(m, exp_sel[m]) ||
            alert[m] != (exp_al[m] != 0) || int'(cnt[m]) != exp_cnt[m]) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode %0d step %0d: sel %0d/%0d req %03b alert %0b/%0d cnt %0d/%0d",
                     m, step, sel[m], exp_sel[m], req[m], alert[m], exp_al[m], cnt[m], exp_cnt[m]);
        end
      end
    end
    checks++;
    if (n_switch == 0 || n_bypass == 0) begin
      failures++;
      $display("FAIL switching or bypass never exercised (%0d, %0d)", n_switch, n_bypass);
    end
    $display("switches %0d, of them by bypass %0d", n_switch, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
