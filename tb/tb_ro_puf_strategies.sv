// tb_ro_puf_strategies -- uniqueness of the response under the four
// placement strategies.
//
// N_DEV simulated devices (different process-variation seeds) are built
// for each strategy, all 200 oscillators, 100-bit responses. All devices
// produce one response at the same time. The test checks every bit against
// the bit the location model predicts (where the two model frequencies
// differ by more than the count resolution), then computes the average
// inter-device Hamming distance per strategy. Neighbouring Slice(0)/Slice(1)
// pairs ("first") must give an almost constant response, placements that
// only compare Slice(1) neighbours ("first same-domain") a response close
// to 50% inter-device distance, and the scattered placements lie between.
module tb_ro_puf_strategies;
  timeunit 1ps;
  timeprecision 1fs;
  import ropuf_pkg::*;

  localparam int  N_DEV  = 3;
  localparam int  N_RO   = 200;
  localparam int  N_BITS = N_RO / 2;
  localparam int  GATE   = 64;
  localparam real TCLK   = 10000.0;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_BITS-1:0] resp [4][N_DEV];
  logic              done [4][N_DEV];

  for (genvar s = 0; s < 4; s++) begin : g_s
    for (genvar d = 0; d < N_DEV; d++) begin : g_d
      ro_puf_top #(.N_RO(N_RO), .STRATEGY(strategy_e'(s)), .DEVICE_SEED(100 + d),
                   .GATE_CYCLES(GATE)) dut (
        .clk, .rst_n, .start, .response(resp[s][d]), .busy(), .done(done[s][d]),
        .bit_valid(), .bit_index(), .count_a(), .count_b());
    end
  end

  always #(TCLK / 2.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real hd [4];
    real fa, fb, res;
    int  npairs;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk iff done[0][0]);
    @(posedge clk);
    // One count is 1 / (GATE * TCLK) of frequency; ask for three of them.
    res = 3.0 / (GATE * TCLK * 1.0e-6);
    for (int s = 0; s < 4; s++) begin
      for (int d = 0; d < N_DEV; d++)
        for (int k = 0; k < N_BITS; k++) begin
          fa = ro_freq_mhz(100 + d, ro_location(strategy_e'(s), 2 * k));
          fb = ro_freq_mhz(100 + d, ro_location(strategy_e'(s), 2 * k + 1));
          if (fa - fb > res || fb - fa > res)
            check(resp[s][d][k] == (fa > fb),
                  $sformatf("strategy %0d device %0d bit %0d", s, d, k));
        end
      hd[s] = 0.0;
      npairs = 0;
      for (int a = 0; a < N_DEV; a++)
        for (int b = a + 1; b < N_DEV; b++) begin
          hd[s] += real'($countones(resp[s][a] ^ resp[s][b]));
          npairs++;
        end
      hd[s] = 100.0 * hd[s] / real'(npairs * N_BITS);
      $display("strategy %-26s average inter-device HD %5.2f %%", strategy_e'(s), hd[s]);
    end
    check(hd[STRAT_FIRST] < 10.0, "first: nearly constant response");
    check(hd[STRAT_FIRST_SAME_DOMAIN] > 35.0, "first same-domain: close to 50 %");
    check(hd[STRAT_RANDOM] > hd[STRAT_FIRST] && hd[STRAT_RANDOM] < hd[STRAT_FIRST_SAME_DOMAIN],
          "random lies between first and first same-domain");
    check(hd[STRAT_RANDOM_SAME_DOMAIN] > hd[STRAT_RANDOM], "same-domain beats mixed-domain random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
