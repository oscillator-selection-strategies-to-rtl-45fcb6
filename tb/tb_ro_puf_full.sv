// tb_ro_puf_full -- one complete response of the RO-PUF at its default
// size: 200 oscillators in the first same-domain placement, 100 pairs, a
// 4096-cycle gate window at 100 MHz. Every comparison's counts are checked
// against the location model of the oscillator bank, every bit against the
// counts and, where the model frequencies differ by more than the count
// resolution, against the model; then the response word and the latency.
module tb_ro_puf_full;
  timeunit 1ps;
  timeprecision 1fs;
  import ropuf_pkg::*;

  localparam real TCLK   = 10000.0;   // 100 MHz
  localparam int  N_RO   = 200;
  localparam int  GATE   = 4096;
  localparam int  SETTLE = 4;

  int checks = 0, failures = 0, n_bit1 = 0, n_bit0 = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_RO/2-1:0] response, expected;
  logic              busy, done, bit_valid;
  logic [6:0]        bit_index;
  logic [15:0]       count_a, count_b;

  ro_puf_top dut (
    .clk, .rst_n, .start, .response, .busy, .done, .bit_valid, .bit_index,
    .count_a, .count_b);

  always #(TCLK / 2.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // The device model the default top is built with: seed 1.
  function automatic real model_counts(input int i);
    return GATE * TCLK * ro_freq_mhz(1, ro_location(STRAT_FIRST_SAME_DOMAIN, i)) * 1.0e-6;
  endfunction

  // Outputs are only defined once the synchronous reset has been applied.
  always @(posedge clk) begin
    if (rst_n && bit_valid) begin
      real ea, eb;
      ea = model_counts(2 * int'(bit_index));
      eb = model_counts(2 * int'(bit_index) + 1);
      check(real'(count_a) > ea - 2.0 && real'(count_a) < ea + 2.0,
            $sformatf("pair %0d count_a %0d model %0f", bit_index, count_a, ea));
      check(real'(count_b) > eb - 2.0 && real'(count_b) < eb + 2.0,
            $sformatf("pair %0d count_b %0d model %0f", bit_index, count_b, eb));
      expected[bit_index] = count_a > count_b;
      if (ea - eb > 3.0 || eb - ea > 3.0)
        check((count_a > count_b) == (ea > eb), $sformatf("pair %0d bit against model", bit_index));
      if (count_a > count_b) n_bit1++;
      else                   n_bit0++;
    end
  end

  initial begin
    longint t0;
    expected = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    t0 = $time;
    start <= 1'b0;
    @(posedge clk iff done);
    check(($time - t0) / longint'(TCLK) == longint'((N_RO / 2) * (GATE + SETTLE + 2) + 1),
          $sformatf("latency %0d cycles", ($time - t0) / longint'(TCLK)));
    check(response == expected, $sformatf("response %h expected %h", response, expected));
    check(n_bit1 + n_bit0 == N_RO / 2, "one bit per pair");
    check(n_bit1 > 20 && n_bit0 > 20, $sformatf("balanced response: %0d ones", n_bit1));
    $display("response = %h (%0d ones)", response, n_bit1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
