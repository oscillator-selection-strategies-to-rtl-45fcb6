// freq_comparator -- turns two frequency counts into one response bit.
//
// gt = 1 when count_a (first oscillator) is strictly larger than count_b
// (second oscillator), otherwise 0; equal counts give 0. This is the rule
// of the source design. Purely combinational.
//
// Ports: count_a, count_b (in, W bits), gt (out).
module freq_comparator #(
  parameter int W = 16
) (
  input  logic [W-1:0] count_a,
  input  logic [W-1:0] count_b,
  output logic         gt
);
  timeunit 1ps;
  timeprecision 1fs;

  assign gt = count_a > count_b;

endmodule
