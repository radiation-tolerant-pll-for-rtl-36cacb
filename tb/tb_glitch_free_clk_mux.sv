// tb_glitch_free_clk_mux - checks the three-input glitch-free clock
// multiplexer with three unrelated clocks (two at one frequency with a
// phase offset, one slower). For many random switches it checks that the
// output never shows a pulse or gap shorter than the shortest input half
// period, that at most one input is enabled, that the output follows the
// requested clock once the switch has settled, and that the switch-over gap
// stays within three cycles of the new clock. A final test stops the
// selected clock while it is high and checks that the switch hangs until
// that channel is killed, and completes afterwards.
module tb_glitch_free_clk_mux;
  localparam int H0 = 4, H1 = 4, H2 = 5;
  localparam int HMIN = 4;
  logic [2:0] clk_in = '0;
  logic [2:0] req = '0;
  logic [2:0] kill = '0;
  logic [2:0] run = '1;
  logic clk_out;
  logic [2:0] en;
  int checks = 0, failures = 0;
  int n_switch = 0, n_kill = 0;

  glitch_free_clk_mux #(.N(3)) dut (.clk_in, .req, .kill, .clk_out, .en);

  initial forever begin #H0; if (run[0]) clk_in[0] = ~clk_in[0]; end
  initial begin #3; forever begin #H1; if (run[1]) clk_in[1] = ~clk_in[1]; end end
  initial begin #1; forever begin #H2; if (run[2]) clk_in[2] = ~clk_in[2]; end end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Pulse-width monitor on the output.
  realtime last_edge = 0;
  int n_short = 0;
  always @(clk_out) begin
    if ($time > 20 && $time - last_edge < HMIN) begin
      n_short++;
      $display("short output pulse at %0t", $time);
    end
    last_edge = $time;
  end

  // One-hot monitor.
  int n_multi = 0;
  always @(en) if ($time > 20 && !$onehot0(en)) n_multi++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cur, nxt;
  realtime t_req, t_on;
  initial begin
    #1 kill = '1;
    #19 kill = '0;
    req = 3'b001; cur = 0;
    #100;
    check(en == 3'b001, "first clock enabled");
    for (int k = 0; k < 60; k++) begin
      nxt = (cur + 1 + $urandom_range(0, 1)) % 3;
      #($urandom_range(0, 9));
      req = 3'(1 << nxt); t_req = $time;
      @(posedge en[nxt]); t_on = $time;
      n_switch++;
      check(t_on - t_req <= 4 * 2 * H2, $sformatf("switch %0d->%0d took %0t", cur, nxt, t_on - t_req));
      cur = nxt;
      #(2 * H2 + 1);
      for (int s = 0; s < 10; s++) begin
        #($urandom_range(1, 7));
        #0.5;  // half-way between the integer-time clock edges
        check(clk_out == clk_in[cur] && en == 3'(1 << cur), "output follows selected clock");
        #0.5;
      end
    end
    // Selected clock dies while high: no switch possible until killed.
    wait (clk_in[cur] == 1'b1); #1 run[cur] = 1'b0;
    nxt = (cur + 1) % 3;
    req = 3'(1 << nxt);
    #200;
    check(en == 3'(1 << cur), "dead clock keeps its enable until killed");
    kill[cur] = 1'b1; n_kill++;
    #(8 * H2);
    check(en == 3'(1 << nxt), "kill frees the switch to the next clock");
    #1 check(clk_out == clk_in[nxt], "output follows new clock after kill");
    check(n_short == 0, $sformatf("%0d output pulses shorter than a half period", n_short));
    check(n_multi == 0, "at most one input enabled");
    check(n_switch > 0 && n_kill > 0, "switch and kill exercised");
    $display("switches %0d, kills %0d", n_switch, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
