// freq_counter -- edge counter that measures an oscillator's frequency.
//
// Clocked by the oscillator itself: every rising edge of ro_clk adds one to
// count while the count is below its maximum (it saturates rather than wraps,
// so a too-long window cannot turn a fast oscillator into a slow one). clr
// is an asynchronous, active-high clear driven from the system clock domain
// while the oscillator is stopped. The count read after the measurement
// window is the number of periods in the window, i.e. the frequency.
//
// Ports: ro_clk (in), clr (in), count (out, W bits). count is only stable,
// and only safe to read in another clock domain, while ro_clk is at rest.
// The counter itself follows the source design; saturation and the
// asynchronous clear are this design's choices.
module freq_counter #(
  parameter int W = 16
) (
  input  logic         ro_clk,
  input  logic         clr,
  output logic [W-1:0] count
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr)             count <= '0;
    else if (count != '1) count <= count + 1'b1;
  end

endmodule
