// ro_cell -- behavioural model of one 3-LUT ring oscillator.
//
// Behavioural model, for simulation only: the frequency comes from the
// stage delay STAGE_DELAY_PS, which stands for the placement- and
// process-dependent delay of the real LUTs and their routing.
//
// The circuit it models, as in the source design: an AND gate (LUT-A) takes
// the enable and the fed-back output, then three inverters (LUT-B, LUT-C,
// LUT-D) close the loop. Three inversions make the ring unstable while
// enable is 1, so it oscillates with a period of two trips round the ring,
// 8 * STAGE_DELAY_PS. With enable at 0 the AND output is 0 and the ring
// rests with ro_out = 1.
//
// The model reproduces that timing with one process instead of four gates:
// after enable rises the output falls 4 stage delays later and rises 8 stage
// delays later, then keeps toggling every 4 stage delays; after enable
// falls, an output that is low returns high once more and then rests. One
// process per ring keeps a bank of hundreds of rings fast to simulate.
//
// Ports: enable (in), ro_out (out). No clock.
module ro_cell #(
  parameter real STAGE_DELAY_PS = 205.0
) (
  input  logic enable,
  output logic ro_out
);
  timeunit 1ps;
  timeprecision 1fs;

  // Rest state: enable low, AND output 0, ring output 1.
  initial ro_out = 1'b1;

  // While enabled, the ring output changes every four stage delays (one
  // trip round AND + three inverters). When the enable falls, the edge
  // already inside the ring still comes out, then the AND gate holds the
  // ring at rest with the output high.
  always begin
    if (!enable) @(posedge enable);
    while (enable) begin
      #(4.0 * STAGE_DELAY_PS);
      ro_out = ~ro_out;
    end
    if (!ro_out) begin
      #(4.0 * STAGE_DELAY_PS);
      ro_out = 1'b1;
    end
  end

endmodule
