// Behavioural model (not synthesizable logic) of the bias generation: a
// gain-enhanced folded-cascode OTA forces the voltage across the external
// resistor REXT to VREF, and the resulting reference current VREF/REXT is
// mirrored to every current cell. The model outputs that unit current,
// scaled by MIRROR_RATIO, once en is high, and zero before. OTA gain, settling,
// the CEXT compensation and the cascode bias voltages Vb1/Vb2 are not modelled.
module bias_gen #(
  parameter real MIRROR_RATIO = 1.0
) (
  input  logic en,
  input  real  vref,    // volts
  input  real  rext,    // ohms
  output real  iunit    // amperes per current cell
);
  always_comb begin
    if (en && rext > 0.0) iunit = MIRROR_RATIO * vref / rext;
    else                  iunit = 0.0;
  end
endmodule
