// pll_model - behavioural model of an FPGA PLL, for simulation only.
//
// Stands in for the vendor PLL hard block, which has analogue parts and is
// not synthesizable logic. Ports are those the FDIR core uses: a reset in,
// NUM_OUT output clocks and a lock flag out. After reset is released output
// k runs with half period HALF + k (all starting PHASE time units late) and
// lock rises after LOCK_CYCLES cycles of output 0. Two fault inputs model radiation
// effects: a rising edge on `upset` makes the PLL lose lock and stop its
// clock until the next reset (a PLL does not regain lock without reset);
// `dead` holds it permanently failed. Timing is in simulator time units.
module pll_model #(
  parameter int unsigned HALF        = 4,
  parameter int unsigned PHASE       = 0,
  parameter int unsigned LOCK_CYCLES = 20,
  parameter int unsigned NUM_OUT     = 1
) (
  input  logic ref_clk,
  input  logic rst,
  input  logic upset,
  input  logic dead,
  output logic [NUM_OUT-1:0] clk_out,
  output logic lock
);

  logic failed = 1'b0;
  logic run;
  int unsigned cnt;

  always @(posedge upset or posedge rst) begin
    if (rst) failed <= 1'b0;
    else     failed <= 1'b1;
  end

  assign run = !rst && !failed && !dead;

  for (genvar k = 0; k < NUM_OUT; k++) begin : g_out
    initial begin
      clk_out[k] = 1'b0;
      #(PHASE);
      forever begin
        #(HALF + k);
        clk_out[k] = run ? ~clk_out[k] : 1'b0;
      end
    end
  end

  always @(posedge clk_out[0] or negedge run) begin
    if (!run) begin
      cnt  <= 0;
      lock <= 1'b0;
    end else if (cnt >= LOCK_CYCLES) begin
      lock <= 1'b1;
    end else begin
      cnt <= cnt + 1;
    end
  end

  // The reference clock only paces lock acquisition in a real PLL.
  logic unused_ref;
  assign unused_ref = ref_clk;

endmodule
