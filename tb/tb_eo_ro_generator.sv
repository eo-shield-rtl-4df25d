// tb_eo_ro_generator: self-checking test of the ring-oscillator model.
//
// For each select value the output is watched for 20 ns: the time between
// successive edges must be N * T_INV with N = 3, 5, 7, 9 inverters for
// select values 0..3, and the number of edges must match. The four
// rings must keep running whichever one is selected.
`timescale 1ns / 1ps
module tb_eo_ro_generator;
  localparam int T_INV_PS = 60;
  localparam int STAGES [4] = '{3, 5, 7, 9};

  logic [1:0] sel;
  logic ro;
  logic [3:0] all;
  int checks = 0, failures = 0;

  eo_ro_generator #(.T_INV_PS(T_INV_PS)) dut (.sel, .ro_out(ro), .ro_all(all));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      realtime t_prev, t_now, half;
      int edges, bad;
      sel = 2'(s);
      #1;
      @(ro);
      t_prev = $realtime;
      edges = 0; bad = 0;
      half = STAGES[s] * T_INV_PS / 1000.0;
      while ($realtime - t_prev < 20.0 && edges < 1000) begin
        @(ro);
        t_now = $realtime;
        if (t_now - t_prev < half - 0.001 || t_now - t_prev > half + 0.001) bad++;
        t_prev = t_now;
        edges++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL sel %0d: %0d half periods differ from %0.3f ns", s, bad, half);
      end
      begin
        int n;
        n = 0;
        fork
          begin : count
            forever begin @(ro); n++; end
          end
          #(20ns);
        join_any
        disable fork;
        checks++;
        if (n < int'(20.0 / half) - 1 || n > int'(20.0 / half) + 1) begin
          failures++;
          $display("FAIL sel %0d: %0d edges in 20 ns, expected about %0d", s, n, int'(20.0 / half));
        end
      end
    end
    // all rings run whatever is selected
    begin
      logic [3:0] a0;
      int moved [4];
      a0 = all;
      moved = '{0, 0, 0, 0};
      repeat (200) begin
        #0.013;
        for (int k = 0; k < 4; k++) if (all[k] != a0[k]) moved[k] = 1;
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (!moved[k]) begin failures++; $display("FAIL: ring %0d stopped", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
