// tb_puf_controller -- runs the controller alone with a model comparator.
// Checks per bit: the pair selected (2k, 2k+1), the run window of exactly
// GATE cycles, counters cleared before and never during the window, the
// response bit stored from the comparator, and the total latency.
module tb_puf_controller;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N_RO   = 12;
  localparam int N_BITS = N_RO / 2;
  localparam int GATE   = 7;
  localparam int SETTLE = 3;
  localparam int SEL_W  = $clog2(N_RO);
  localparam int IDX_W  = $clog2(N_BITS);
  localparam int PER_BIT = GATE + SETTLE + 2;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, cmp_gt;
  logic [SEL_W-1:0]  sel_a, sel_b;
  logic              ro_run, cnt_clr, bit_valid, busy, done;
  logic [N_BITS-1:0] response, pattern;
  logic [IDX_W-1:0]  bit_index;

  puf_controller #(.N_RO(N_RO), .GATE_CYCLES(GATE), .SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst_n, .start, .cmp_gt, .sel_a, .sel_b, .ro_run, .cnt_clr,
    .response, .bit_valid, .bit_index, .busy, .done);

  always #5000 clk = ~clk;

  // Model comparator: the bit for pair k is pattern[k].
  assign cmp_gt = pattern[sel_a / 2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int run_len, cycle, t_start, n_valid;
  bit cleared;

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (ro_run) begin
      run_len++;
      if (cnt_clr) check(1'b0, "clear during run");
      if (sel_b != sel_a + 1 || sel_a[0] != 1'b0) check(1'b0, "pair is not (2k, 2k+1)");
    end else if (run_len != 0) begin
      check(run_len == GATE, $sformatf("run window %0d cycles", run_len));
      check(cleared, "counters cleared before the window");
      run_len = 0;
      cleared = 1'b0;
    end
    if (cnt_clr && !ro_run) cleared = 1'b1;
    if (bit_valid) begin
      check(int'(bit_index) == n_valid, $sformatf("bit index %0d", bit_index));
      check(cmp_gt == pattern[bit_index], "pair under comparison");
      n_valid++;
    end
  end

  initial begin
    cycle = 0;
    run_len = 0;
    n_valid = 0;
    cleared = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < N_BITS; i++) pattern[i] = 1'($urandom);
      if (rep == 0) pattern = '0;
      if (rep == 1) pattern = '1;
      n_valid = 0;
      @(posedge clk);
      start <= 1'b1;
      t_start = cycle + 1;
      @(posedge clk);
      start <= 1'b0;
      #1;
      check(busy, "busy after start");
      @(posedge clk iff done);
      // done is registered: one cycle after the last CAPTURE.
      check(cycle - t_start == N_BITS * PER_BIT + 1,
            $sformatf("latency %0d cycles, expected %0d", cycle - t_start, N_BITS * PER_BIT + 1));
      @(posedge clk);
      check(response == pattern, $sformatf("response %b expected %b", response, pattern));
      check(n_valid == N_BITS, "one bit_valid per bit");
      check(!busy && !ro_run && cnt_clr, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
