// Behavioural model (not synthesizable logic) of the 5-bit unary
// current-steering DAC: N_ELEM equal PMOS cascode current cells, each with a
// differential switch. A cell whose sw_p is high adds its current to iout_p,
// one whose sw_n is high adds it to iout_n. Cell i carries iunit * (1 + err),
// where err is the sum of two optional mismatch terms: CORRUPT_ERR for the
// one cell CORRUPT_IDX (a deliberately corrupted element), and a Gaussian
// random error of standard deviation MISMATCH_SIGMA for every cell. The
// Gaussian errors are fixed at time 0 from MISMATCH_SEED with a 32-bit linear
// congruential generator (s = 1664525 s + 1013904223) and the Box-Muller
// transform, so one seed always gives the same chip. Both are zero by
// default: an ideal DAC.
// Output resistance, glitches, charge feed-through and switching asymmetry are
// not modelled. The outputs follow the inputs with no delay.
module cdac #(
  parameter int unsigned N_ELEM      = 32,
  parameter int          CORRUPT_IDX = -1,
  parameter real         CORRUPT_ERR = 0.0,
  parameter real         MISMATCH_SIGMA = 0.0,
  parameter int unsigned MISMATCH_SEED  = 1
) (
  input  logic [N_ELEM-1:0] sw_p,
  input  logic [N_ELEM-1:0] sw_n,
  input  real               iunit,
  output real               iout_p,
  output real               iout_n
);
  localparam real TWO_PI = 6.283185307179586;

  real gain [N_ELEM];   // relative current of each cell

  initial begin
    int unsigned s;
    real u1, u2;
    s = MISMATCH_SEED;
    for (int i = 0; i < N_ELEM; i++) begin
      s = s * 32'd1664525 + 32'd1013904223;
      u1 = (real'(s >> 8) + 0.5) / 16777216.0;
      s = s * 32'd1664525 + 32'd1013904223;
      u2 = (real'(s >> 8) + 0.5) / 16777216.0;
      gain[i] = 1.0 + MISMATCH_SIGMA * $sqrt(-2.0 * $ln(u1)) * $cos(TWO_PI * u2)
                    + ((i == CORRUPT_IDX) ? CORRUPT_ERR : 0.0);
    end
  end

  always_comb begin
    iout_p = 0.0;
    iout_n = 0.0;
    for (int i = 0; i < N_ELEM; i++) begin
      if (sw_p[i]) iout_p += iunit * gain[i];
      if (sw_n[i]) iout_n += iunit * gain[i];
    end
  end
endmodule
