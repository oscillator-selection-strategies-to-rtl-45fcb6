// tb_ro_puf_top -- end-to-end test of the RO-PUF with a short gate window.
//
// Two devices are built: the default placement (first same-domain, 200
// oscillators) and a small one with the "first" placement, where every pair
// is a Slice(0) oscillator against a Slice(1) one. For every comparison the
// test checks that only the two measured oscillators run, that both counts
// match the model frequency of their locations times the window, and that the
// bit is (count_a > count_b) and, where the model frequencies differ by
// more than the count resolution, the bit the frequencies predict. It checks
// the response word, the start-to-done latency, and that a second run on
// the same device gives the same response. It counts how often each
// mechanism happened: bit 1, bit 0, same-domain pair, cross-domain pair,
// repeated run; one that never happened is a failure.
module tb_ro_puf_top;
  timeunit 1ps;
  timeprecision 1fs;
  import ropuf_pkg::*;

  localparam int          GATE   = 256;
  localparam int          SETTLE = 4;
  localparam real         TCLK   = 10000.0;   // 100 MHz
  localparam int          N0     = 200;
  localparam int          N1     = 20;
  localparam int unsigned SEED   = 11;

  int checks = 0, failures = 0;
  int n_bit1 = 0, n_bit0 = 0, n_same = 0, n_cross = 0, n_rerun = 0;

  logic clk = 1'b0, rst_n = 1'b0, start0 = 1'b0, start1 = 1'b0;

  logic [N0/2-1:0] resp0;
  logic            busy0, done0, valid0;
  logic [6:0]      idx0;
  logic [15:0]     ca0, cb0;
  logic [N1/2-1:0] resp1;
  logic            busy1, done1, valid1;
  logic [3:0]      idx1;
  logic [15:0]     ca1, cb1;

  ro_puf_top #(.N_RO(N0), .STRATEGY(STRAT_FIRST_SAME_DOMAIN), .DEVICE_SEED(SEED),
               .GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE)) dut0 (
    .clk, .rst_n, .start(start0), .response(resp0), .busy(busy0), .done(done0),
    .bit_valid(valid0), .bit_index(idx0), .count_a(ca0), .count_b(cb0));

  ro_puf_top #(.N_RO(N1), .STRATEGY(STRAT_FIRST), .DEVICE_SEED(SEED),
               .GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE)) dut1 (
    .clk, .rst_n, .start(start1), .response(resp1), .busy(busy1), .done(done1),
    .bit_valid(valid1), .bit_index(idx1), .count_a(ca1), .count_b(cb1));

  always #(TCLK / 2.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Periods expected in the window, from the location model.
  function automatic real model_counts(input strategy_e st, input int i);
    return GATE * TCLK * ro_freq_mhz(SEED, ro_location(st, i)) * 1.0e-6;
  endfunction

  task automatic check_pair(input strategy_e st, input int k, input logic [15:0] ca,
                            input logic [15:0] cb, input logic bit_out);
    real ea, eb;
    ea = model_counts(st, 2 * k);
    eb = model_counts(st, 2 * k + 1);
    check(real'(ca) > ea - 2.0 && real'(ca) < ea + 2.0,
          $sformatf("strategy %0d pair %0d: count_a %0d, model %0f", st, k, ca, ea));
    check(real'(cb) > eb - 2.0 && real'(cb) < eb + 2.0,
          $sformatf("strategy %0d pair %0d: count_b %0d, model %0f", st, k, cb, eb));
    check(bit_out == (ca > cb), "bit is count_a > count_b");
    if (ea - eb > 3.0 || eb - ea > 3.0)
      check(bit_out == (ea > eb), $sformatf("strategy %0d pair %0d: bit against model", st, k));
    if (bit_out) n_bit1++;
    else         n_bit0++;
    if (is_slice1(ro_location(st, 2 * k)) == is_slice1(ro_location(st, 2 * k + 1))) n_same++;
    else                                                                             n_cross++;
  endtask

  // Only the two oscillators of the pair run.
  // Outputs are only defined once the synchronous reset has been applied.
  always @(posedge clk) if (rst_n) begin
    if (dut0.ro_run) check($countones(dut0.ro_en) == 2, "two oscillators enabled in device 0");
    if (!dut0.ro_run) check(dut0.ro_en == '0, "no oscillator enabled in device 0");
    if (valid0) check_pair(STRAT_FIRST_SAME_DOMAIN, int'(idx0), ca0, cb0, dut0.cmp_gt);
    if (valid1) check_pair(STRAT_FIRST, int'(idx1), ca1, cb1, dut1.cmp_gt);
  end

  initial begin
    logic [N0/2-1:0] first_resp;
    longint t0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      start0 <= 1'b1;
      start1 <= 1'b1;
      @(posedge clk);
      t0 = $time;
      start0 <= 1'b0;
      start1 <= 1'b0;
      fork
        @(posedge clk iff done1);
        @(posedge clk iff done0);
      join
      check(($time - t0) / longint'(TCLK) == longint'((N0 / 2) * (GATE + SETTLE + 2) + 1),
            $sformatf("latency %0d cycles", ($time - t0) / longint'(TCLK)));
      check(resp1 == '0, $sformatf("first placement: Slice(1) always faster, response %b", resp1));
      if (run == 0) first_resp = resp0;
      else begin
        check(resp0 == first_resp, "same device, same response");
        n_rerun++;
      end
      @(posedge clk);
    end
    $display("mechanisms: bit1=%0d bit0=%0d same_domain=%0d cross_domain=%0d rerun=%0d",
             n_bit1, n_bit0, n_same, n_cross, n_rerun);
    check(n_bit1 > 0, "a 1 bit was produced");
    check(n_bit0 > 0, "a 0 bit was produced");
    check(n_same > 0, "a same-domain pair was compared");
    check(n_cross > 0, "a cross-domain pair was compared");
    check(n_rerun > 0, "a second run was made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
