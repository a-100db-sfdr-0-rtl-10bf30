// Band-pass DAC, complete: FPGA-side digital signal path plus the DAC chip.
//
// Signal path: the DDS makes a sine sample each clock; the 3rd order band-pass
// sigma-delta modulator turns it into a 5-bit code (number of cells to switch
// on) whose quantisation noise is pushed away from Fs/4; three switching
// schemes map each code onto the 32 unit current cells (the 4th order CRFB
// vector-feedback DEM, the 2nd order ERFB DEM and plain thermometer coding);
// the DEM mux picks one for the 32-bit DATA bus; the chip retimes DATA and
// steers the cell currents into Iout+ / Iout-.
//
// Timing, one sample per clock: DDS 3 clocks, modulator 1 register (its STF
// delay is 6 samples), DEM output register 1, mux 1, chip input register at the
// next rising edge. Reset is synchronous and active high on the FPGA side and
// goes to the chip's RESET pin as well. vref/rext stand for the chip's analog
// VREF and REXT pins; iout_p/iout_n are real-valued currents.
module bpdac_top
  import bpdac_pkg::*;
#(
  parameter int unsigned N_ELEM      = N_CELLS,
  parameter int          CORRUPT_IDX = -1,
  parameter real         CORRUPT_ERR = 0.0,
  parameter real         MISMATCH_SIGMA = 0.0,
  parameter int unsigned MISMATCH_SEED  = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [31:0]       ftw,        // DDS frequency tuning word
  input  logic [16:0]       amp,        // DDS amplitude, 32768 = full scale
  input  logic              dither_en,
  input  dem_mode_e         mode,
  input  logic              div_sel,    // chip clock manager divider select
  input  real               vref,
  input  real               rext,
  output code_t             code,       // modulator code (observation)
  output logic              clipped,
  output logic [N_ELEM-1:0] data,       // DATA[31:0] bus to the chip
  output real               iout_p,
  output real               iout_n,
  output logic              trig
);
  logic signed [15:0] sample;
  logic [N_ELEM-1:0] sv_crfb, sv_erfb, d_crfb, d_erfb, d_thermo;   // sv_*: unregistered selections, not used

  dds_tone_gen #(.PHASE_W(32), .OUT_W(16), .LUT_AW(10)) u_dds (
    .clk, .rst, .ftw, .amp, .sample
  );

  sd_modulator #(.IN_W(16), .FRAC(12), .SW(24)) u_mod (
    .clk, .rst, .u(sample), .dither_en, .code, .clipped
  );

  dem_crfb4 #(.N_ELEM(N_ELEM)) u_dem4 (.clk, .rst, .code, .sv(sv_crfb), .data(d_crfb));
  dem_erfb2 #(.N_ELEM(N_ELEM)) u_dem2 (.clk, .rst, .code, .sv(sv_erfb), .data(d_erfb));
  thermo_coder #(.N_ELEM(N_ELEM)) u_thermo (.clk, .rst, .code, .data(d_thermo));

  dem_mux #(.N_ELEM(N_ELEM)) u_mux (
    .clk, .rst, .mode, .crfb4(d_crfb), .erfb2(d_erfb), .thermo(d_thermo), .data
  );

  bpdac_chip #(.N_ELEM(N_ELEM), .CORRUPT_IDX(CORRUPT_IDX), .CORRUPT_ERR(CORRUPT_ERR),
             .MISMATCH_SIGMA(MISMATCH_SIGMA), .MISMATCH_SEED(MISMATCH_SEED)) u_chip (
    .clk, .reset(rst), .div_sel, .data, .vref, .rext, .iout_p, .iout_n, .trig
  );
endmodule
