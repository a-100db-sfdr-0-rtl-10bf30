// Shared constants and types of the band-pass DAC.
// N_CELLS unit current cells are driven by a 5-bit modulator code; the code is
// the number of cells switched on (0..31). dem_mode_e selects which switching
// scheme drives the cells: the 4th order CRFB vector-feedback DEM (the main
// scheme), the 2nd order error-feedback DEM, or plain thermometer coding.
package bpdac_pkg;
  localparam int unsigned N_CELLS = 32;
  localparam int unsigned CODE_W = 5;

  typedef logic [CODE_W-1:0] code_t;

  typedef enum logic [1:0] {
    DEM_CRFB4  = 2'd0,
    DEM_ERFB2  = 2'd1,
    DEM_THERMO = 2'd2
  } dem_mode_e;
endpackage
