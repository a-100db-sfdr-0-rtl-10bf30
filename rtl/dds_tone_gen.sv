// DDS tone generator: the digital sine source that feeds the band-pass modulator.
//
// A PHASE_W-bit phase accumulator advances by the frequency tuning word ftw each
// clock, so the tone is f = ftw / 2^PHASE_W * Fs (Fs/4 is ftw = 2^(PHASE_W-2)).
// The top LUT_AW+2 phase bits address a quarter-wave sine table
// (sine_qtr.hex, entry k = round(32767 * sin(2*pi*(k+0.5)/2^(LUT_AW+2))));
// the two quadrant bits mirror the address and negate the result. The sample
// is then scaled by amp (0..32768 = 0..1.0) for input-level sweeps.
//
// Timing: sample is valid 3 clocks after the phase it belongs to (table read,
// sign, multiply). The document gives only the function of this block; the
// accumulator, table and scaling are this design's own choices.
module dds_tone_gen #(
  parameter int unsigned PHASE_W = 32,
  parameter int unsigned OUT_W   = 16,
  parameter int unsigned LUT_AW  = 10
) (
  input  logic                    clk,
  input  logic                    rst,      // synchronous, active high
  input  logic [PHASE_W-1:0]      ftw,      // frequency tuning word
  input  logic [16:0]             amp,      // amplitude, 32768 = full scale
  output logic signed [OUT_W-1:0] sample
);
  logic [PHASE_W-1:0] phase;
  logic [15:0]        lut [2**LUT_AW];
  initial $readmemh("rtl/sine_qtr.hex", lut);

  logic [LUT_AW-1:0] addr;
  logic [15:0]       mag_q;
  logic              neg_q;
  logic signed [16:0] sin_q;
  logic signed [35:0] prod;

  always_comb begin
    addr = phase[PHASE_W-3 -: LUT_AW];
    if (phase[PHASE_W-2]) addr = ~addr;          // 2nd and 4th quadrant: mirror
  end

  assign prod = sin_q * $signed({1'b0, amp, 1'b0});

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= '0;
      mag_q  <= '0;
      neg_q  <= 1'b0;
      sin_q  <= '0;
      sample <= '0;
    end else begin
      phase  <= phase + ftw;
      mag_q  <= lut[addr];
      neg_q  <= phase[PHASE_W-1];      // 3rd and 4th quadrant: negate
      sin_q  <= neg_q ? -$signed({1'b0, mag_q}) : $signed({1'b0, mag_q});
      sample <= OUT_W'(prod >>> 16);
    end
  end
endmodule
