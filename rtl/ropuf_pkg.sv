// ropuf_pkg -- constants, types and location functions shared by the RO-PUF.
//
// The oscillators of the PUF sit on a grid of candidate slice locations,
// GRID_ROWS rows by GRID_COLS columns. Location index i maps to column
// x = i % GRID_COLS and row y = i / GRID_COLS, so index 0 is the lower-left
// slice and index N_LOCATIONS-1 the upper-right one. Slices with odd x
// (Slice(1)) oscillate faster than slices with even x (Slice(0)); the two
// groups are the two "frequency domains".
//
// ro_location() gives, for a selection strategy, the location of the i-th
// oscillator of the PUF. Consecutive oscillators 2k and 2k+1 are compared to
// give response bit k (disjoint pairs, "2-masking"), so the strategy decides
// which locations are compared with which:
//   STRAT_FIRST              locations 0, 1, 2, ...            (neighbours,
//                            so every pair is Slice(0) against Slice(1))
//   STRAT_RANDOM             a fixed scattered permutation of all locations
//   STRAT_RANDOM_SAME_DOMAIN a fixed scattered permutation of odd locations
//   STRAT_FIRST_SAME_DOMAIN  locations 1, 3, 5, ...          (the default:
//                            nearby oscillators, all in Slice(1))
// The four strategies and the grid follow the source design. The source
// draws the "random" placements at random; here a fixed scrambling
// permutation (permute(), below) stands in for that draw, so the same
// locations come out in every build. Pairs of the random placement mix the
// two frequency domains about half of the time, as a random draw would.
//
// ro_freq_mhz() is the location-dependent frequency used by the ring
// oscillator behavioural model. It reproduces the trends measured on the
// real device: about 612 MHz in Slice(1) and 584 MHz in Slice(0) near
// location 0, a fall of about 12 MHz across the grid, about 4 MHz extra in
// the leftmost 14 columns, plus a device-specific random part (sigma about
// 3 MHz) drawn from a hash of (device seed, location). The values are read
// from the published frequency plots; the hash and the shape of the random
// part are this model's own choice. The model is for simulation only.
package ropuf_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int GRID_COLS   = 100;
  localparam int GRID_ROWS   = 40;
  localparam int N_LOCATIONS = GRID_COLS * GRID_ROWS;

  typedef enum logic [1:0] {
    STRAT_FIRST              = 2'd0,
    STRAT_RANDOM             = 2'd1,
    STRAT_RANDOM_SAME_DOMAIN = 2'd2,
    STRAT_FIRST_SAME_DOMAIN  = 2'd3
  } strategy_e;

  // Constants of the scrambling permutation used by the scattered strategies.
  localparam int PERM_MUL0 = 'h5a5;   // odd, so invertible modulo 2^n
  localparam int PERM_MUL1 = 'h3b7;   // odd
  localparam int PERM_ADD  = 'h1d1;

  // Frequency model constants, MHz.
  localparam real F_SLICE1_MHZ   = 612.0;
  localparam real F_SLICE0_MHZ   = 584.0;
  localparam real F_GRADIENT_MHZ = 12.0;
  localparam real F_EDGE_MHZ     = 4.0;
  localparam int  EDGE_COLS      = 14;
  localparam real F_SIGMA_MHZ    = 3.0;

  function automatic int loc_x(input int loc);
    return loc % GRID_COLS;
  endfunction

  function automatic int loc_y(input int loc);
    return loc / GRID_COLS;
  endfunction

  // 1 for a Slice(1) location (odd column), 0 for Slice(0).
  function automatic bit is_slice1(input int loc);
    return (loc_x(loc) % 2) == 1;
  endfunction

  // One round of a bijection on n-bit numbers: multiply by an odd number,
  // xor-shift, multiply-add, xor-shift (each step is invertible mod 2^n).
  function automatic int scramble(input int v, input int nbits);
    int mask;
    mask = (1 << nbits) - 1;
    v = (v * PERM_MUL0) & mask;
    v = v ^ (v >> (nbits / 2));
    v = (v * PERM_MUL1 + PERM_ADD) & mask;
    v = v ^ (v >> (nbits / 2 - 1));
    return v;
  endfunction

  // Permutation of 0 .. range-1 (range <= 2^nbits): scramble, and scramble
  // again while the result is out of range ("cycle walking"). Distinct
  // inputs give distinct outputs.
  function automatic int permute(input int i, input int range, input int nbits);
    int v;
    v = scramble(i, nbits);
    while (v >= range) v = scramble(v, nbits);
    return v;
  endfunction

  function automatic int ro_location(input strategy_e strat, input int i);
    case (strat)
      STRAT_FIRST:              return i;
      STRAT_RANDOM:             return permute(i, N_LOCATIONS, 12);
      STRAT_RANDOM_SAME_DOMAIN: return 2 * permute(i, N_LOCATIONS / 2, 11) + 1;
      default:                  return 2 * i + 1;
    endcase
  endfunction

  // 32-bit integer hash (xorshift-multiply mixer).
  function automatic int unsigned mix32(input int unsigned v);
    int unsigned h;
    h = v;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Approximately normal, zero mean, unit variance: sum of four uniforms.
  function automatic real unit_gauss(input int unsigned seed, input int loc);
    real acc;
    int unsigned h;
    acc = 0.0;
    h = mix32(seed * 32'h9e3779b9 + 32'(loc));
    for (int k = 0; k < 4; k++) begin
      h = mix32(h + 32'(k));
      acc += real'(int'(h >> 8)) / 16777216.0;
    end
    return (acc - 2.0) / 0.57735;
  endfunction

  function automatic real ro_freq_mhz(input int unsigned seed, input int loc);
    real f;
    f = is_slice1(loc) ? F_SLICE1_MHZ : F_SLICE0_MHZ;
    f -= F_GRADIENT_MHZ * real'(loc) / real'(N_LOCATIONS);
    if (loc_x(loc) < EDGE_COLS) f += F_EDGE_MHZ;
    f += F_SIGMA_MHZ * unit_gauss(seed, loc);
    return f;
  endfunction

  // Delay of one of the four ring stages (AND + three inverters) in ps:
  // one period is two trips round the ring, 8 stage delays.
  function automatic real stage_delay_ps(input int unsigned seed, input int loc);
    return 1.0e6 / (8.0 * ro_freq_mhz(seed, loc));
  endfunction

endpackage
