// fir_interp: low-pass interpolation FIR of the Loopback Design.
//
// Follows the zero-insertion upsampler: the 245.76 Msps stream arrives two
// samples per 64-bit beat (earlier sample in bits [31:0]) and leaves the same
// way. Every beat the filter computes the two outputs
//   y[m] = sum_{k=0}^{TAPS-1} h[k] * x[m-k]
// for the two new sample instants, separately for I and Q, with a direct-form
// sum over a delay line of the last TAPS+1 samples. The 200 taps and the
// 100 MHz passband (one-sided cutoff 50 MHz at 245.76 MHz) are the document's.
// The coefficients are this design's: a windowed sinc,
//   h[n] = 2 * wc * sinc(wc * (n - (TAPS-1)/2)) * w_kaiser(n, beta = 3.5),
//   wc = 2 * 50 / 245.76,
// scaled so that the DC gain is 2 (restoring the amplitude halved by the zero
// insertion) and rounded to COEF_W-bit two's complement with COEF_FRAC
// fractional bits. The table is computed at elaboration by a constant
// function (sine by range reduction and Taylor series, the Kaiser window's
// I0 by its power series), so changing TAPS, CUTOFF_MHZ or KAISER_BETA
// redesigns the filter. The Kaiser window with beta = 3.5 is the window the
// document chose for its filters.
// Outputs are rounded half up and saturated to 16 bits.
//
// The sum is pipelined in two register stages: the first forms partial sums
// of GROUP consecutive taps (GROUP products and their adds, a DSP-slice
// cascade in an FPGA), the second adds the TAPS/GROUP partial sums, rounds
// and saturates. The grouping is this design's choice.
//
// Timing: one beat in, one beat out per clock; out_valid follows in_valid by
// two clocks.
`timescale 1ps/1ps
module fir_interp
  import probe_pkg::*;
#(
  parameter int unsigned TAPS      = 200,
  parameter int unsigned COEF_W    = 18,
  parameter int unsigned COEF_FRAC = 16,
  parameter real         FS_MHZ      = 245.76,
  parameter real         CUTOFF_MHZ  = 50.0,
  parameter real         KAISER_BETA = 3.5,
  parameter int unsigned GROUP     = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] in_data,
  output logic        out_valid,
  output logic [63:0] out_data
);

  localparam int unsigned ACC_W = 16 + COEF_W + $clog2(TAPS) + 1;
  localparam int unsigned NGRP  = (TAPS + GROUP - 1) / GROUP;

  typedef logic signed [COEF_W-1:0] coef_t [TAPS];

  localparam real PI = 3.141592653589793;

  function automatic real sin_r(input real x);
    real t, s, x2;
    int  n;
    n = int'(x / (2.0 * PI));
    x = x - 2.0 * PI * n;
    if (x > PI)  x = x - 2.0 * PI;
    if (x < -PI) x = x + 2.0 * PI;
    t  = x;
    s  = x;
    x2 = x * x;
    for (int k = 1; k < 15; k++) begin
      t = -t * x2 / ((2 * k) * (2 * k + 1));
      s = s + t;
    end
    return s;
  endfunction

  function automatic real bessel_i0(input real x);
    real s, t;
    s = 1.0;
    t = 1.0;
    for (int k = 1; k < 30; k++) begin
      t = t * (x / 2.0) * (x / 2.0) / (k * k);
      s = s + t;
    end
    return s;
  endfunction

  function automatic real sqrt_r(input real x);
    real r;
    if (x <= 0.0) return 0.0;
    r = (x > 1.0) ? x : 1.0;
    for (int k = 0; k < 40; k++) r = 0.5 * (r + x / r);
    return r;
  endfunction

  function automatic coef_t design_coefs();
    coef_t c;
    real   h [TAPS];
    real   sum, wc, m, u;
    wc  = 2.0 * CUTOFF_MHZ / FS_MHZ;
    sum = 0.0;
    for (int n = 0; n < int'(TAPS); n++) begin
      m    = n - (TAPS - 1) / 2.0;
      u    = 2.0 * n / (TAPS - 1) - 1.0;
      h[n] = ((m == 0.0) ? wc : sin_r(PI * wc * m) / (PI * m))
           * bessel_i0(KAISER_BETA * sqrt_r(1.0 - u * u)) / bessel_i0(KAISER_BETA);
      sum  = sum + h[n];
    end
    for (int n = 0; n < int'(TAPS); n++)
      c[n] = COEF_W'($rtoi(h[n] * 2.0 / sum * (2.0 ** COEF_FRAC) + ((h[n] >= 0.0) ? 0.5 : -0.5)));
    return c;
  endfunction

  localparam coef_t COEF = design_coefs();

  iq_t hist [TAPS];        // hist[0] is the most recent sample of the last beat
  iq_t win  [TAPS+1];      // window ending at the later sample of this beat

  typedef logic signed [ACC_W-1:0] acc_t;
  acc_t part_i [2][NGRP], part_q [2][NGRP];   // stage 1 partial sums
  acc_t psum_i [2][NGRP], psum_q [2][NGRP];   // stage 1 registers
  logic v1;
  iq_t  y [2];

  function automatic logic signed [15:0] round_sat(input acc_t acc);
    acc_t r;
    r = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > 32767)       return 16'sh7fff;
    else if (r < -32768) return 16'sh8000;
    else                 return r[15:0];
  endfunction

  // stage 1: partial sums over groups of GROUP taps
  always_comb begin
    win[0] = iq_t'(in_data[63:32]);
    win[1] = iq_t'(in_data[31:0]);
    for (int k = 2; k <= int'(TAPS); k++) win[k] = hist[k-2];
    // p = 1: later sample (window starts at win[0]); p = 0: earlier one
    for (int p = 0; p < 2; p++)
      for (int g = 0; g < int'(NGRP); g++) begin
        part_i[p][g] = '0;
        part_q[p][g] = '0;
        for (int j = 0; j < int'(GROUP); j++)
          if (g * GROUP + j < TAPS) begin
            part_i[p][g] += ACC_W'(COEF[g*GROUP + j] * win[g*GROUP + j + 1 - p].i);
            part_q[p][g] += ACC_W'(COEF[g*GROUP + j] * win[g*GROUP + j + 1 - p].q);
          end
      end
  end

  // stage 2: total, rounding and saturation
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      acc_t acc_i, acc_q;
      acc_i = '0;
      acc_q = '0;
      for (int g = 0; g < int'(NGRP); g++) begin
        acc_i += psum_i[p][g];
        acc_q += psum_q[p][g];
      end
      y[p].i = round_sat(acc_i);
      y[p].q = round_sat(acc_q);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS); k++) hist[k] <= '0;
      for (int p = 0; p < 2; p++)
        for (int g = 0; g < int'(NGRP); g++) begin
          psum_i[p][g] <= '0;
          psum_q[p][g] <= '0;
        end
      v1        <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        for (int k = 0; k < int'(TAPS); k++) hist[k] <= win[k];
        psum_i <= part_i;
        psum_q <= part_q;
      end
      if (v1) out_data <= {y[1], y[0]};
    end
  end

endmodule
