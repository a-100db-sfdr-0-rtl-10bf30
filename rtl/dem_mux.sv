// DEM output multiplexer: chooses which switching scheme drives the 32-bit
// cell data bus to the DAC chip (4th order CRFB DEM, 2nd order ERFB DEM or
// thermometer), and registers the result (1 clock latency). A mode change
// takes effect on the next clock; all three schemes run all the time, so the
// new scheme's history is already valid. The document shows the mux; the
// select encoding and the output register are this design's.
module dem_mux
  import bpdac_pkg::*;
#(
  parameter int unsigned N_ELEM = 32
) (
  input  logic              clk,
  input  logic              rst,     // synchronous, active high
  input  dem_mode_e         mode,
  input  logic [N_ELEM-1:0] crfb4,
  input  logic [N_ELEM-1:0] erfb2,
  input  logic [N_ELEM-1:0] thermo,
  output logic [N_ELEM-1:0] data
);
  always_ff @(posedge clk) begin
    if (rst) data <= '0;
    else begin
      unique case (mode)
        DEM_CRFB4:  data <= crfb4;
        DEM_ERFB2:  data <= erfb2;
        DEM_THERMO: data <= thermo;
        default:    data <= crfb4;
      endcase
    end
  end
endmodule
