// ro_array -- the bank of N_RO ring oscillators of the PUF.
//
// Behavioural model: each oscillator is a ro_cell whose stage delay is
// taken from ropuf_pkg::stage_delay_ps() for the grid location that the
// selection strategy STRATEGY assigns to it, on the simulated device
// DEVICE_SEED. Changing DEVICE_SEED models another chip of the same design;
// changing STRATEGY models another placement of the same netlist.
//
// Oscillator i sits at ropuf_pkg::ro_location(STRATEGY, i). Each oscillator
// has its own enable, so that only the oscillators being measured run.
//
// Ports: enable[N_RO] (in), ro_out[N_RO] (out), one bit per oscillator.
// No clock. The default of 200 oscillators and the placement strategy
// "first same-domain" are those of the source design.
module ro_array
  import ropuf_pkg::*;
#(
  parameter int          N_RO        = 200,
  parameter strategy_e   STRATEGY    = STRAT_FIRST_SAME_DOMAIN,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic [N_RO-1:0] enable,
  output logic [N_RO-1:0] ro_out
);
  timeunit 1ps;
  timeprecision 1fs;

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    localparam int  LOC   = ro_location(STRATEGY, i);
    localparam real DELAY = stage_delay_ps(DEVICE_SEED, LOC);
    ro_cell #(.STAGE_DELAY_PS(DELAY)) u_ro (
      .enable (enable[i]),
      .ro_out (ro_out[i])
    );
  end

endmodule
