// tb_ro_array -- enables each oscillator of a small bank alone and checks
// that only it toggles and that its period is 8 times the stage delay that
// the location model gives for its placement.
module tb_ro_array;
  timeunit 1ps;
  timeprecision 1fs;
  import ropuf_pkg::*;

  localparam int          N    = 8;
  localparam int unsigned SEED = 7;

  int checks = 0, failures = 0;
  logic [N-1:0] en = '0;
  logic [N-1:0] q;
  int           edges [N], n_timed [N];
  realtime      t_first [N], t_last [N];

  ro_array #(.N_RO(N), .STRATEGY(STRAT_FIRST_SAME_DOMAIN), .DEVICE_SEED(SEED)) dut (
    .enable(en), .ro_out(q));

  for (genvar i = 0; i < N; i++) begin : g_mon
    // Edges after the enable falls come early (the ring drains), so only
    // edges seen with the enable high time the period.
    always @(posedge q[i]) begin
      edges[i]++;
      if (en[i]) begin
        if (edges[i] == 1) t_first[i] = $realtime;
        t_last[i]   = $realtime;
        n_timed[i]  = edges[i];
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real per, expect_per;
    foreach (edges[i]) edges[i] = 0;
    #5000;
    for (int i = 0; i < N; i++) begin
      foreach (edges[j]) edges[j] = 0;
      en[i] = 1'b1;
      #20000;
      en[i] = 1'b0;
      #5000;
      for (int j = 0; j < N; j++)
        if (j != i) check(edges[j] == 0, $sformatf("ro %0d toggled while %0d measured", j, i));
      per        = (t_last[i] - t_first[i]) / real'(n_timed[i] - 1);
      expect_per = 8.0 * 1.0e6 / (8.0 * ro_freq_mhz(SEED, 2 * i + 1));
      check(n_timed[i] > 5 && per > expect_per - 0.01 && per < expect_per + 0.01,
            $sformatf("ro %0d period %0f ps, expected %0f", i, per, expect_per));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
