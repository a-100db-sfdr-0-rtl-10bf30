// Switch drivers of the DAC chip: for each current cell, a pair of
// complementary controls for its differential switch. sw_p steers the cell's
// current to Iout+, sw_n to Iout-. An AND with en and an inverter give
// sw_p = d & en and sw_n = ~sw_p, so exactly one switch of a pair is on and,
// while en is low (reset), every cell is steered to Iout-. Purely
// combinational. The crossing-point shaping of the real driver is analog and
// not represented. The AND-inverter structure follows the document.
module switch_driver #(
  parameter int unsigned N_ELEM = 32
) (
  input  logic              en,
  input  logic [N_ELEM-1:0] d,
  output logic [N_ELEM-1:0] sw_p,
  output logic [N_ELEM-1:0] sw_n
);
  assign sw_p = d & {N_ELEM{en}};
  assign sw_n = ~sw_p;
endmodule
