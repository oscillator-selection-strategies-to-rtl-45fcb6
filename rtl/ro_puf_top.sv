// ro_puf_top -- ring-oscillator physically unclonable function.
//
// N_RO identical ring oscillators, placed on the chip by the selection
// strategy STRATEGY, are compared in disjoint pairs to give an
// N_RO/2-bit device-unique response. For bit k the controller enables
// only oscillators 2k and 2k+1, routes them through MUXA and MUXB to two
// edge counters for GATE_CYCLES system clocks, stops them, and stores
// (count_a > count_b) as response[k].
//
//   ro_array --+--> MUXA (sel_a) --> counter A --+
//              +--> MUXB (sel_b) --> counter B --+--> fA > fB --> response
//   controller: sel_a, sel_b, per-oscillator enables, counter clear
//
// Defaults are those of the source design: 200 oscillators, 100-bit
// response, "first same-domain" placement. GATE_CYCLES, SETTLE_CYCLES and
// CNT_W are this design's choices (4096 cycles at 100 MHz is about 41 us,
// about 25,000 counts at 610 MHz, inside 16 bits).
//
// The oscillator bank is a behavioural model (ro_array / ro_cell); the rest
// is synthesizable. On a real FPGA ro_array is replaced by placed LUT rings,
// each a deliberate combinational loop. cnt_clr is a flip-flop output used
// as the counters' asynchronous clear (lint notes it as both synchronous and
// asynchronous): the counters run on the oscillator clocks, so they are
// reset from the system clock domain while the oscillators are stopped.
//
// Ports: clk, rst_n (active-low synchronous), start; response (N_RO/2 bits,
// valid when done pulses), busy, done; bit_valid, bit_index, count_a,
// count_b expose each comparison's raw counts, which are the oscillator
// frequencies in counts per window, for enrolment and characterisation.
// Latency from start to done: N_RO/2 * (GATE_CYCLES + SETTLE_CYCLES + 2)
// + 1 cycles.
module ro_puf_top
  import ropuf_pkg::*;
#(
  parameter int          N_RO          = 200,
  parameter strategy_e   STRATEGY      = STRAT_FIRST_SAME_DOMAIN,
  parameter int unsigned DEVICE_SEED   = 1,
  parameter int          GATE_CYCLES   = 4096,
  parameter int          SETTLE_CYCLES = 4,
  parameter int          CNT_W         = 16,
  localparam int         N_BITS        = N_RO / 2,
  localparam int         SEL_W         = (N_RO > 1) ? $clog2(N_RO) : 1,
  localparam int         IDX_W         = (N_BITS > 1) ? $clog2(N_BITS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [N_BITS-1:0] response,
  output logic              busy,
  output logic              done,
  output logic              bit_valid,
  output logic [IDX_W-1:0]  bit_index,
  output logic [CNT_W-1:0]  count_a,
  output logic [CNT_W-1:0]  count_b
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_RO-1:0]  ro_en, ro_out;
  logic [SEL_W-1:0] sel_a, sel_b;
  logic             ro_run, cnt_clr, f_a, f_b, cmp_gt;

  // Only the two oscillators of the pair under measurement run.
  always_comb begin
    ro_en = '0;
    if (ro_run) begin
      ro_en[sel_a] = 1'b1;
      ro_en[sel_b] = 1'b1;
    end
  end

  ro_array #(
    .N_RO        (N_RO),
    .STRATEGY    (STRATEGY),
    .DEVICE_SEED (DEVICE_SEED)
  ) u_ro_array (
    .enable (ro_en),
    .ro_out (ro_out)
  );

  ro_mux #(.N(N_RO), .SEL_W(SEL_W)) u_mux_a (.in(ro_out), .sel(sel_a), .out(f_a));
  ro_mux #(.N(N_RO), .SEL_W(SEL_W)) u_mux_b (.in(ro_out), .sel(sel_b), .out(f_b));

  freq_counter #(.W(CNT_W)) u_cnt_a (.ro_clk(f_a), .clr(cnt_clr), .count(count_a));
  freq_counter #(.W(CNT_W)) u_cnt_b (.ro_clk(f_b), .clr(cnt_clr), .count(count_b));

  freq_comparator #(.W(CNT_W)) u_cmp (.count_a(count_a), .count_b(count_b), .gt(cmp_gt));

  puf_controller #(
    .N_RO          (N_RO),
    .N_BITS        (N_BITS),
    .GATE_CYCLES   (GATE_CYCLES),
    .SETTLE_CYCLES (SETTLE_CYCLES),
    .SEL_W         (SEL_W),
    .IDX_W         (IDX_W)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .cmp_gt    (cmp_gt),
    .sel_a     (sel_a),
    .sel_b     (sel_b),
    .ro_run    (ro_run),
    .cnt_clr   (cnt_clr),
    .response  (response),
    .bit_valid (bit_valid),
    .bit_index (bit_index),
    .busy      (busy),
    .done      (done)
  );

endmodule
