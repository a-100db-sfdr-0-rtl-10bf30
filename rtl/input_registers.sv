// Input register cells of the DAC chip: one per current cell.
// Each cell is two cascaded latches opened on opposite clock phases: the master
// follows d while phi_m is high (clock low) and the slave copies the master
// while phi_s is high (clock high). Together they take d at the rising edge of
// the chip clock and hold it for a full cycle, which retimes the 32 data lines
// from the FPGA onto the chip's own clock before the switch drivers.
// The two-latch structure follows the document; the phase assignment is this
// design's. The latches are intended (the tools report them as latches).
module input_registers #(
  parameter int unsigned N_ELEM = 32
) (
  input  logic              phi_m,   // master latch open (clock low)
  input  logic              phi_s,   // slave latch open (clock high)
  input  logic [N_ELEM-1:0] d,
  output logic [N_ELEM-1:0] q
);
  logic [N_ELEM-1:0] m;

  always_latch begin
    if (phi_m) m = d;
  end

  always_latch begin
    if (phi_s) q = m;
  end
endmodule
