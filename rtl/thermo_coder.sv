// Thermometer coder: the no-DEM reference scheme. Cells 0 .. code-1 are
// switched on, so each code always uses the same cells and their mismatch
// appears directly as distortion. data is registered (1 clock latency).
// The largest code is 31, so the last cell (index 31) is never switched on
// in this mode; its output bit is constant 0.
// The document names the scheme; the cell order is this design's choice.
module thermo_coder
  import bpdac_pkg::*;
#(
  parameter int unsigned N_ELEM = 32
) (
  input  logic              clk,
  input  logic              rst,     // synchronous, active high
  input  code_t             code,
  output logic [N_ELEM-1:0] data
);
  always_ff @(posedge clk) begin
    if (rst) data <= '0;
    else
      for (int i = 0; i < N_ELEM; i++) data[i] <= i < int'(code);
  end
endmodule
