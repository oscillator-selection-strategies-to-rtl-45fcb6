// ro_mux -- N-to-1 multiplexer that routes one oscillator to a counter.
//
// The PUF has two of them (MUXA with select SA, MUXB with select SB), so
// that two oscillators can be counted at the same time. out = in[sel]; a
// select of N or above gives 0. Purely combinational.
//
// Ports: in[N] (in), sel (in, SEL_W bits), out (out).
module ro_mux #(
  parameter int N     = 200,
  parameter int SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     in,
  input  logic [SEL_W-1:0] sel,
  output logic             out
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    out = 1'b0;
    if (int'(sel) < N) out = in[sel];
  end

endmodule
