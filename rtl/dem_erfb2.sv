// 2nd order band-pass error-feedback vector DEM (the conventional scheme the
// main DEM is measured against; selectable through the DEM mux).
//
// Per cell i: sf_i = H(z) se_i with H(z) = -(2 z^-2 + z^-4); sy_i = sf_i -
// min_j sf_j; the vector quantizer switches on the `code` cells with the
// largest sy (ties to the lower index); se_i = sy_i - sv_i. The usage of each
// cell is then v + (1+z^-2)^2 e: its mismatch error is pushed away from Fs/4.
// All values are small integers (VW-bit signed).
//
// Interface and timing: code each clock; sv is the selection for it in the
// same cycle (combinational); data is sv registered. The structure (minimum,
// VQ, subtraction, filter) follows the document's 2nd order DEM; the exact
// H(z), widths and tie rule are this design's.
module dem_erfb2
  import bpdac_pkg::*;
#(
  parameter int unsigned N_ELEM = 32,
  parameter int unsigned VW     = 9
) (
  input  logic              clk,
  input  logic              rst,     // synchronous, active high
  input  code_t             code,
  output logic [N_ELEM-1:0] sv,
  output logic [N_ELEM-1:0] data
);
  typedef logic signed [VW-1:0] v_t;
  localparam int unsigned RW = $clog2(N_ELEM + 1);

  v_t se1 [N_ELEM], se2 [N_ELEM], se3 [N_ELEM], se4 [N_ELEM];
  v_t sf [N_ELEM], sy [N_ELEM], se_n [N_ELEM];
  v_t mn;
  logic [RW-1:0] rank [N_ELEM];

  always_comb begin
    for (int i = 0; i < N_ELEM; i++) sf[i] = -((se2[i] <<< 1) + se4[i]);
    mn = sf[0];
    for (int i = 1; i < N_ELEM; i++) if (sf[i] < mn) mn = sf[i];
    for (int i = 0; i < N_ELEM; i++) sy[i] = sf[i] - mn;
    for (int i = 0; i < N_ELEM; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N_ELEM; j++)
        if (j != i && (sy[j] > sy[i] || (sy[j] == sy[i] && j < i)))
          rank[i] = rank[i] + 1'b1;
      sv[i]   = rank[i] < RW'(code);
      se_n[i] = sy[i] - (sv[i] ? v_t'(1) : v_t'(0));
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_ELEM; i++) begin
      if (rst) begin
        se1[i] <= '0; se2[i] <= '0; se3[i] <= '0; se4[i] <= '0;
      end else begin
        se1[i] <= se_n[i]; se2[i] <= se1[i]; se3[i] <= se2[i]; se4[i] <= se3[i];
      end
    end
    if (rst) data <= '0;
    else     data <= sv;
  end
endmodule
