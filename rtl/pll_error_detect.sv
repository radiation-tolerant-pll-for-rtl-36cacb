// pll_error_detect - lock-based fault detection and automatic recovery for
// one PLL.
//
// The PLL's lock output is asynchronous to the core, so it is first passed
// through SYNC_STAGES flip-flops on the master clock. Registering the lock
// keeps a short glitch on it from causing a false switch, at the price of a
// detection delay of a few master-clock cycles (the document quotes 2-4).
// A small state machine then tracks the PLL:
//   ST_WAIT  : waiting for lock after master reset or after an auto reset.
//              If lock does not arrive within LOCK_TIMEOUT cycles, the PLL is
//              reset again.
//   ST_RUN   : PLL locked and usable. A drop of the registered lock is a
//              fault: the PLL is isolated (healthy goes low at once) and an
//              auto reset is started.
//   ST_RESET : pll_rst is held high for RST_CYCLES cycles, then ST_WAIT.
// Every reset issued increments the saturating reset_count (telemetry), and
// each detected loss of lock gives a one-cycle fault pulse.
//
// Lock-based detection, the auto reset of a faulty PLL and the reset counter
// follow the document. The three-state machine, the lock timeout with
// retry, the reset length and the counter width are this design's choices.
//
// Interface: clk/rst_n master clock and active-low reset; lock_async from
// the PLL; healthy (registered lock and in ST_RUN); pll_rst, active high, to
// be combined with the master reset at the PLL; fault (one-cycle pulse);
// reset_count. Timing: healthy falls SYNC_STAGES cycles after the lock
// falls; pll_rst rises one cycle after that.
module pll_error_detect #(
  parameter int unsigned SYNC_STAGES  = 2,   // at least 2
  parameter int unsigned RST_CYCLES   = 16,
  parameter int unsigned LOCK_TIMEOUT = 4096,
  parameter int unsigned CNT_W        = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lock_async,
  output logic             healthy,
  output logic             pll_rst,
  output logic             fault,
  output logic [CNT_W-1:0] reset_count
);

  typedef enum logic [1:0] {ST_WAIT, ST_RUN, ST_RESET} state_e;

  localparam int unsigned TW = $clog2(((LOCK_TIMEOUT > RST_CYCLES) ? LOCK_TIMEOUT : RST_CYCLES) + 1);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   lock_s;
  state_e                 state_q;
  logic [TW-1:0]          timer_q;
  logic                   start_reset;

  initial begin
    assert (SYNC_STAGES >= 2 && RST_CYCLES >= 1 && LOCK_TIMEOUT >= 1);
  end

  // Lock synchroniser on the master clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[SYNC_STAGES-2:0], lock_async};
  end
  assign lock_s = sync_q[SYNC_STAGES-1];

  always_comb begin
    start_reset = 1'b0;
    unique case (state_q)
      ST_RUN:   start_reset = !lock_s;
      ST_WAIT:  start_reset = !lock_s && (timer_q == TW'(LOCK_TIMEOUT - 1));
      default:  start_reset = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_WAIT;
      timer_q     <= '0;
      reset_count <= '0;
    end else begin
      if (start_reset) begin
        state_q <= ST_RESET;
        timer_q <= '0;
        if (reset_count != '1) reset_count <= reset_count + 1'b1;
      end else begin
        unique case (state_q)
          ST_WAIT: begin
            if (lock_s) begin
              state_q <= ST_RUN;
              timer_q <= '0;
            end else begin
              timer_q <= timer_q + 1'b1;
            end
          end
          ST_RESET: begin
            if (timer_q == TW'(RST_CYCLES - 1)) begin
              state_q <= ST_WAIT;
              timer_q <= '0;
            end else begin
              timer_q <= timer_q + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign healthy = (state_q == ST_RUN) && lock_s;
  assign pll_rst = (state_q == ST_RESET);
  assign fault   = (state_q == ST_RUN) && !lock_s;

endmodule
