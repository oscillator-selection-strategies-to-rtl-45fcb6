// tb_ro_cell -- checks the ring-oscillator model: at rest with enable low,
// first rising edge 8 stage delays after enable, period 8 stage delays, and
// the edge count over a window, for two stage delays.
module tb_ro_cell;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real D0 = 200.0;
  localparam real D1 = 231.25;

  int checks = 0, failures = 0;
  logic en0 = 1'b0, en1 = 1'b0;
  logic q0, q1;
  int   n0 = 0, n1 = 0;
  realtime t_first0, t_last0, t_en;

  ro_cell #(.STAGE_DELAY_PS(D0)) u0 (.enable(en0), .ro_out(q0));
  ro_cell #(.STAGE_DELAY_PS(D1)) u1 (.enable(en1), .ro_out(q1));

  always @(posedge q0) begin
    n0++;
    if (n0 == 1) t_first0 = $realtime;
    t_last0 = $realtime;
  end
  always @(posedge q1) n1++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    // Let the time-zero initialisation settle, then watch the rest state.
    #1000;
    n0 = 0;
    n1 = 0;
    #9000;
    check(n0 == 0 && n1 == 0 && q0 == 1'b1 && q1 == 1'b1, "rest state with enable low");
    t_en = $realtime;
    en0 = 1'b1;
    en1 = 1'b1;
    #100000;   // 100 ns
    en0 = 1'b0;
    en1 = 1'b0;
    #5000;
    check(t_first0 - t_en > 8.0 * D0 - 0.01 && t_first0 - t_en < 8.0 * D0 + 0.01,
          $sformatf("first edge at %0f ps", t_first0 - t_en));
    // n0 edges: the first at 8*D0, then one each 8*D0 until the window ends
    // (plus at most one edge from the ring draining).
    check(n0 >= 62 && n0 <= 63, $sformatf("count for D0: %0d", n0));
    check(n1 >= 54 && n1 <= 55, $sformatf("count for D1: %0d", n1));
    check(((t_last0 - t_first0) / real'(n0 - 1)) > 8.0 * D0 - 0.01 &&
          ((t_last0 - t_first0) / real'(n0 - 1)) < 8.0 * D0 + 0.01, "period of D0 ring");
    n0 = 0;
    #20000;
    check(n0 == 0 && q0 == 1'b1, "ring stops and rests after enable falls");
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
