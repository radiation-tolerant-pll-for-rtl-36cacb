// tb_pll_error_detect - checks lock-based fault detection and auto reset.
// Drives the lock input directly and checks: no health before lock, the
// lock-timeout retry reset, the detection latency of a lock loss
// (SYNC_STAGES cycles), the one-cycle fault pulse, the auto-reset length
// (RST_CYCLES), the reset counter, and that a lock glitch falling between
// two master-clock edges is ignored.
module tb_pll_error_detect;
  localparam int SYNC = 2, RST = 4, TMO = 20;
  logic clk = 1'b0, rst_n = 1'b0, lock = 1'b0;
  logic healthy, pll_rst, fault;
  logic [7:0] reset_count;
  int checks = 0, failures = 0;
  int cyc = 0;

  pll_error_detect #(.SYNC_STAGES(SYNC), .RST_CYCLES(RST), .LOCK_TIMEOUT(TMO), .CNT_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .lock_async(lock), .healthy(healthy),
    .pll_rst(pll_rst), .fault(fault), .reset_count(reset_count));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1, n_rst, n_fault;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    t0 = cyc;
    // 1. no lock: after LOCK_TIMEOUT cycles a reset of RST cycles is issued
    @(posedge pll_rst); t1 = cyc;
    check(healthy == 1'b0, "not healthy without lock");
    check(t1 - t0 == TMO, $sformatf("timeout reset after %0d cycles", t1 - t0));
    n_rst = 0;
    while (pll_rst) begin @(posedge clk); #1; if (pll_rst) n_rst++; end
    check(n_rst + 1 == RST, $sformatf("reset length %0d", n_rst + 1));
    check(reset_count == 8'd1, "reset_count after timeout");
    // 2. lock arrives
    repeat (3) @(posedge clk);
    #1 lock = 1'b1; t0 = cyc;
    @(posedge healthy); t1 = cyc;
    check(t1 - t0 == SYNC + 1, $sformatf("lock acquisition latency %0d", t1 - t0));
    repeat (10) @(posedge clk);
    check(healthy && !pll_rst, "healthy while locked");
    // 3. short glitch between two edges is filtered
    #2 lock = 1'b0; #3 lock = 1'b1;
    repeat (5) @(posedge clk); #1;
    check(healthy && reset_count == 8'd1, "glitch between edges ignored");
    // 4. loss of lock
    @(posedge clk); #1 lock = 1'b0; t0 = cyc;
    n_fault = 0;
    @(negedge healthy); t1 = cyc;
    check(t1 - t0 == SYNC, $sformatf("fault detection latency %0d", t1 - t0));
    #1 check(fault == 1'b1, "fault pulse with loss of health");
    @(posedge clk); #1;
    check(fault == 1'b0 && pll_rst == 1'b1, "fault one cycle, then auto reset");
    check(reset_count == 8'd2, "reset_count after loss of lock");
    n_rst = 0;
    while (pll_rst) begin @(posedge clk); #1; n_rst++; end
    check(n_rst == RST, $sformatf("auto reset length %0d", n_rst));
    // 5. re-lock after reset: healthy again
    lock = 1'b1;
    repeat (SYNC + 2) @(posedge clk); #1;
    check(healthy, "re-acquired lock is healthy");
    check(reset_count == 8'd2, "no extra reset once locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
