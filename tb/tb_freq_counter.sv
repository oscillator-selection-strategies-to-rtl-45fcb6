// tb_freq_counter -- drives bursts of pulses on the counter clock, checks the
// count after each burst, the asynchronous clear, and saturation.
module tb_freq_counter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int W = 6;
  int checks = 0, failures = 0;
  logic         ro_clk = 1'b1;
  logic         clr    = 1'b1;
  logic [W-1:0] count;

  freq_counter #(.W(W)) dut (.ro_clk(ro_clk), .clr(clr), .count(count));

  task automatic pulses(input int n);
    repeat (n) begin
      #800 ro_clk = 1'b0;
      #800 ro_clk = 1'b1;
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n, total;
    #1000;
    pulses(3);
    check(count == 0, "held at zero while clear is high");
    #100;
    clr = 1'b0;
    total = 0;
    for (int t = 0; t < 8; t++) begin
      n = $urandom_range(0, 7);
      pulses(n);
      total += n;
      #100;
      check(int'(count) == total, $sformatf("burst %0d of %0d: count %0d expected %0d", t, n, count, total));
    end
    // Asynchronous clear with the clock at rest.
    clr = 1'b1;
    #10;
    check(count == 0, "asynchronous clear");
    #100;
    clr = 1'b0;
    pulses(70);
    #100;
    check(count == '1, $sformatf("saturates at %0d, got %0d", (1 << W) - 1, count));
    pulses(5);
    #100;
    check(count == '1, "stays saturated");
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
