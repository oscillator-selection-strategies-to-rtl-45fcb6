// tb_freq_comparator -- random and corner-case counts; the bit must be 1
// exactly when the first count is strictly larger than the second.
module tb_freq_comparator;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int W = 16;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b;
  logic         gt;

  freq_comparator #(.W(W)) dut (.count_a(a), .count_b(b), .gt(gt));

  task automatic try(input int va, input int vb);
    a = W'(va);
    b = W'(vb);
    #10;
    checks++;
    if (gt !== (va > vb)) begin
      failures++;
      $display("FAIL: a=%0d b=%0d gt=%b", va, vb, gt);
    end
  endtask

  initial begin
    int x;
    try(0, 0);
    try(1, 0);
    try(0, 1);
    try(65535, 65534);
    try(65534, 65535);
    try(32768, 32767);
    try(25000, 25000);
    for (int t = 0; t < 2000; t++) begin
      x = $urandom_range(0, 65535);
      try(x, $urandom_range(0, 65535));
      try(x, x + $urandom_range(0, 2) - 1 < 0 ? 0 : (x + $urandom_range(0, 2) - 1) % 65536);
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
