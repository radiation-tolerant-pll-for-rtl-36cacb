// glitch_free_clk_mux - N-input glitch-free clock multiplexer.
//
// Each input clock i has its own enable, made by two flip-flops clocked by
// that clock: the first samples on the rising edge "req[i] and no other
// input enabled", the second passes it on at the falling edge. The output
// is the OR of (clk_in[i] AND en[i]). An enable therefore only changes
// while its clock is low, and a new clock is enabled only after the old
// one's enable has dropped, so the output never carries a shortened pulse.
// The cost is a gap at every switch: the old clock is turned off at its
// next falling edge, then the new one is turned on within about two of its
// own cycles, in line with the two-cycle gap the document reports for its
// glitch-free multiplexer.
//
// A PLL that fails may stop its clock, and then its enable could never be
// cleared by that clock and the switch would hang. kill[i] therefore clears
// channel i's flip-flops asynchronously; the core drives it from the
// registered fault state of PLL i. The per-channel enable flip-flops follow
// the usual glitch-free clock switch the document uses; the N-input form
// and the kill inputs are this design's.
//
// Interface: clk_in[N-1:0], req[N-1:0] (at most one high; all low gives no
// output clock), kill[N-1:0] (active-high asynchronous clear per channel,
// also used as reset), clk_out, en[N-1:0] (which input drives clk_out).
module glitch_free_clk_mux #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] clk_in,
  input  logic [N-1:0] req,
  input  logic [N-1:0] kill,
  output logic         clk_out,
  output logic [N-1:0] en
);

  for (genvar i = 0; i < N; i++) begin : g_ch
    logic clk_i;
    logic kill_i;
    logic others_on;
    logic stage1_q;
    logic en_q;

    assign clk_i  = clk_in[i];
    assign kill_i = kill[i];

    always_comb begin
      others_on = 1'b0;
      for (int j = 0; j < N; j++) begin
        if (j != i) others_on = others_on | en[j];
      end
    end

    always_ff @(posedge clk_i or posedge kill_i) begin
      if (kill_i) stage1_q <= 1'b0;
      else        stage1_q <= req[i] & ~others_on;
    end

    always_ff @(negedge clk_i or posedge kill_i) begin
      if (kill_i) begin
        en_q <= 1'b0;
      end else begin
        en_q <= stage1_q;
        // Interlock: a channel is only switched on while all others are off.
        if (stage1_q && !en_q) assert (!others_on);
      end
    end

    assign en[i] = en_q;
  end

  assign clk_out = |(clk_in & en);

endmodule
