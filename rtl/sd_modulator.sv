// 3rd order multi-bit band-pass sigma-delta modulator (6th order band-pass).
//
// Low-pass prototype: a chain of three delaying integrators z^-1/(1-z^-1) with
// distributed feedback gains a = (1, 3, 3) from the quantizer output, unit
// gains between stages, and the input fed into the first integrator. Its noise
// transfer function is (1-z^-1)^3 and its signal transfer function z^-3. Each
// delay z^-1 is replaced by -z^-2, which turns each integrator into a resonator
// -z^-2/(1+z^-2) at Fs/4; the modulator then has NTF = (1+z^-2)^3 (all zeros at
// Fs/4) and, with the input fed negated, STF = z^-6.
//
// Number format: all loop values are signed fixed point with FRAC fractional
// bits; one quantizer step (one current cell) is 2^FRAC. The input u is read
// in the same format, so a 16-bit full-scale input is +/-8 steps. The quantizer
// rounds y + dither to the nearest step, clipped to -16..15; code = level + 16
// is the number of cells to switch on (0..31). Dither is the low FRAC-1 bits of
// an LFSR taken as signed (+/-1/4 step). With |u| <= 8 steps the quantizer
// input stays within 13.5 steps, so the clip is never reached.
//
// Timing: code is registered; code[n+1] carries u[n-6] plus shaped noise.
// One input per clock. From the document: 3rd order, 5-bit quantizer, CRFB
// origin, the z^-1 -> -z^-2 transform and dither before the quantizer. The
// coefficient values, number format and dither amplitude are this design's.
module sd_modulator
  import bpdac_pkg::*;
#(
  parameter int unsigned IN_W = 16,
  parameter int unsigned FRAC = 12,
  parameter int unsigned SW   = 24
) (
  input  logic                   clk,
  input  logic                   rst,        // synchronous, active high
  input  logic signed [IN_W-1:0] u,          // input sample, FRAC fractional bits
  input  logic                   dither_en,
  output code_t                  code,       // 0..31 cells on
  output logic                   clipped     // quantizer clip was hit (status)
);
  typedef logic signed [SW-1:0] st_t;

  // resonator k: x_k[n] = p_k[n-1], p_k[n] = -(x_k[n-1] + in_k[n-1])
  st_t p1, p2, p3, x1, x2, x3;
  st_t in1, in2, in3, fb, q, dith, lvl_full;
  logic signed [5:0] lvl;
  logic [15:0] lfsr;

  dither_lfsr u_dither (.clk, .rst, .en(1'b1), .state(lfsr));

  always_comb begin
    dith = dither_en ? st_t'($signed(lfsr[FRAC-2:0])) : '0;
    q    = x3 + dith;
    lvl_full = (q + st_t'(2**(FRAC-1))) >>> FRAC;
    if (lvl_full > 15)       lvl = 6'sd15;
    else if (lvl_full < -16) lvl = -6'sd16;
    else                     lvl = 6'(lvl_full);
    fb  = st_t'(lvl) <<< FRAC;
    in1 = -st_t'(u) - fb;
    in2 = x1 - 3 * fb;
    in3 = x2 - 3 * fb;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {p1, p2, p3, x1, x2, x3} <= '0;
      code    <= code_t'(16);
      clipped <= 1'b0;
    end else begin
      p1 <= -(x1 + in1);  x1 <= p1;
      p2 <= -(x2 + in2);  x2 <= p2;
      p3 <= -(x3 + in3);  x3 <= p3;
      code    <= code_t'(lvl + 6'sd16);
      clipped <= (lvl_full > 15) || (lvl_full < -16);
    end
  end
endmodule
