// puf_controller -- sequences the pairwise comparisons of the RO-PUF.
//
// On start it produces one response bit per disjoint pair of oscillators
// (2-masking: oscillators 2k and 2k+1 give bit k, no oscillator is used
// twice), for k = 0 .. N_BITS-1. Per bit it
//   CLEAR   (1 cycle)             sets sel_a = 2k, sel_b = 2k+1 and clears
//                                 both counters while all oscillators rest;
//   RUN     (GATE_CYCLES cycles)  enables the two selected oscillators only;
//   SETTLE  (SETTLE_CYCLES)       waits with the oscillators stopped so the
//                                 counts are stable in this clock domain;
//   CAPTURE (1 cycle)             writes cmp_gt into response[k] and moves
//                                 to the next pair; bit_valid is high and
//                                 bit_index = k, so the pair's counts and
//                                 its bit can be read off the datapath.
// One bit takes GATE_CYCLES + SETTLE_CYCLES + 2 cycles. done pulses the
// cycle after the last CAPTURE, N_BITS * (GATE_CYCLES + SETTLE_CYCLES + 2)
// + 1 cycles after the edge that sees start; start is ignored while busy.
//
// The pairing, the one-hot enabling of the measured oscillators and the
// 100-bit response follow the source design. The gate length, the settle
// time, the state sequence and the handshake (start / busy / done) are this
// design's own choices; the source does not give them. ro_run and cnt_clr
// come straight from flip-flops, so the oscillator enables and the
// counters' asynchronous clear never glitch. The clear acts on a rising
// edge of cnt_clr: reset drives it low and start raises it, so the first
// window of a response begins from zero whatever the power-up state; after
// each CAPTURE it rises again and stays high through idle and CLEAR.
//
// Ports: clk, rst_n (active-low synchronous reset), start (in); cmp_gt (in,
// from the comparator); sel_a, sel_b, ro_run, cnt_clr (out, to muxes,
// oscillator enables and counters); response, bit_valid, bit_index, busy,
// done (out).
module puf_controller #(
  parameter int N_RO          = 200,
  parameter int N_BITS        = N_RO / 2,
  parameter int GATE_CYCLES   = 4096,
  parameter int SETTLE_CYCLES = 4,
  parameter int SEL_W         = (N_RO > 1) ? $clog2(N_RO) : 1,
  parameter int IDX_W         = (N_BITS > 1) ? $clog2(N_BITS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              cmp_gt,
  output logic [SEL_W-1:0]  sel_a,
  output logic [SEL_W-1:0]  sel_b,
  output logic              ro_run,
  output logic              cnt_clr,
  output logic [N_BITS-1:0] response,
  output logic              bit_valid,
  output logic [IDX_W-1:0]  bit_index,
  output logic              busy,
  output logic              done
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_RUN, S_SETTLE, S_CAPTURE
  } state_e;

  localparam int TMR_W = $clog2(GATE_CYCLES + SETTLE_CYCLES + 1) + 1;

  state_e            state;
  logic [TMR_W-1:0]  timer;
  logic [IDX_W-1:0]  k;

  initial begin
    assert (2 * N_BITS <= N_RO)
      else $error("puf_controller: %0d bits need %0d oscillators", N_BITS, 2 * N_BITS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      timer     <= '0;
      k         <= '0;
      response  <= '0;
      done      <= 1'b0;
      ro_run    <= 1'b0;
      cnt_clr   <= 1'b0;
    end else begin
      done      <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          k       <= '0;
          cnt_clr <= 1'b1;
          state   <= S_CLEAR;
        end
        S_CLEAR: begin
          timer   <= TMR_W'(GATE_CYCLES - 1);
          cnt_clr <= 1'b0;
          ro_run  <= 1'b1;
          state   <= S_RUN;
        end
        S_RUN: begin
          if (timer == '0) begin
            ro_run <= 1'b0;
            timer  <= TMR_W'(SETTLE_CYCLES - 1);
            state <= (SETTLE_CYCLES > 0) ? S_SETTLE : S_CAPTURE;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        S_SETTLE: begin
          if (timer == '0) state <= S_CAPTURE;
          else             timer <= timer - 1'b1;
        end
        S_CAPTURE: begin
          response[k] <= cmp_gt;
          cnt_clr     <= 1'b1;
          if (int'(k) == N_BITS - 1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            k     <= k + 1'b1;
            state <= S_CLEAR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign sel_a     = SEL_W'(2 * int'(k));
  assign sel_b     = SEL_W'(2 * int'(k) + 1);
  assign busy      = (state != S_IDLE);
  assign bit_valid = (state == S_CAPTURE);
  assign bit_index = k;

  // The counters may only be cleared while no oscillator runs.
  a_clr_not_run: assert property (@(posedge clk) disable iff (!rst_n) !(cnt_clr && ro_run));
  // The pair under measurement never changes during a window.
  a_sel_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == S_RUN) |=> $stable(sel_a) && $stable(sel_b));

endmodule
