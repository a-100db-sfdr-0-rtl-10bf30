// Pseudo-random dither source for the sigma-delta quantizer.
// A 16-bit Galois LFSR (polynomial x^16 + x^14 + x^13 + x^11 + 1, mask 16'hB400)
// shifts right once per enabled clock; seed 16'hACE1 after reset. The whole
// state is output; the modulator uses its low bits as a small signed dither.
// The document asks only that dither be added before the quantizer; the
// generator is this design's own choice.
module dither_lfsr (
  input  logic        clk,
  input  logic        rst,   // synchronous, active high
  input  logic        en,
  output logic [15:0] state
);
  always_ff @(posedge clk) begin
    if (rst)     state <= 16'hACE1;
    else if (en) state <= (state >> 1) ^ (state[0] ? 16'hB400 : 16'h0000);
  end
endmodule
