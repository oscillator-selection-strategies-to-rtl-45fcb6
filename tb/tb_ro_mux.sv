// tb_ro_mux -- random inputs and selects on a 200-input multiplexer; the
// output must equal the selected input bit, and 0 for out-of-range selects.
module tb_ro_mux;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 200;
  int checks = 0, failures = 0;
  logic [N-1:0] in;
  logic [7:0]   sel;
  logic         out;

  ro_mux #(.N(N)) dut (.in(in), .sel(sel), .out(out));

  initial begin
    bit expected;
    for (int t = 0; t < 2000; t++) begin
      for (int w = 0; w < N; w++) in[w] = 1'($urandom);
      sel = 8'($urandom_range(0, 255));
      #10;
      expected = (int'(sel) < N) ? in[sel] : 1'b0;
      checks++;
      if (out !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL: sel=%0d out=%b expected=%b", sel, out, expected);
      end
    end
    // Walk a single one through every position.
    for (int p = 0; p < N; p++) begin
      in  = '0;
      in[p] = 1'b1;
      sel = 8'(p);
      #10;
      checks++;
      if (out !== 1'b1) failures++;
      sel = 8'((p + 1) % N);
      #10;
      checks++;
      if (out !== 1'b0) failures++;
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
