// 4th order band-pass vector-feedback DEM (the design's main switching scheme).
//
// Each of the N_ELEM current cells has its own loop filter, a 4th order
// cascade-of-resonators-with-feedback (CRFB) IIR filter whose only input is the
// cell's own 1-bit usage sv (single-bit feedback path). Low-pass prototype per
// cell: x1 = I'(-a1 sv - g1 x2), x2 = I(x1 - a2 sv), x3 = I'(x2 - a3 sv -
// g2 x4), x4 = I(x3 - a4 sv), sy = x4, with I = z^-1/(1-z^-1) (delay in the
// forward path) and I' = 1/(1-z^-1) (delay in the feedback path). Every z^-1
// is replaced by -z^-2, so the filters resonate at Fs/4 and the usage error of
// each cell is shaped by a 4th order band-pass NTF with zeros around Fs/4 and
// an out-of-band gain of about 1.5. All gains are powers of two (a = 2^-A*_SH,
// g = 2^-G*_SH, c = 1), so the filters need only shifts and adders.
//
// The vector quantizer (vq2) switches on the `code` cells with the largest sy.
// Because vq2 takes two cycles, it reads the register between the two delays
// of the last -z^-2 section, which already holds next cycle's sy; the loop
// therefore has no extra delay. After each update the minimum over the cells
// (rounded down to a whole number of cell units) is subtracted from every
// state. This removes the common mode, which the resonators would otherwise
// grow without bound; the differences between cells, and so the choices, are
// unchanged. States are signed with FB fractional bits (1 cell unit = 2^FB).
//
// Interface: code (0..N_ELEM-1) each clock; sv is the selection for that code
// in the same cycle (combinational); data is sv registered (1 cycle later).
// From the document: single-loop CRFB filter, power-of-two gains, out-of-band
// gain 1.5, minimum subtraction, 2-stage VQ read one register early. The gain
// values, number format and tie rule are this design's.
module dem_crfb4
  import bpdac_pkg::*;
#(
  parameter int unsigned N_ELEM = 32,
  parameter int unsigned FB     = 12,
  parameter int unsigned DW     = 24,
  parameter int unsigned A1_SH  = 9,
  parameter int unsigned A2_SH  = 6,
  parameter int unsigned A3_SH  = 2,
  parameter int unsigned A4_SH  = 1,
  parameter int unsigned G1_SH  = 11,
  parameter int unsigned G2_SH  = 8
) (
  input  logic              clk,
  input  logic              rst,     // synchronous, active high
  input  code_t             code,
  output logic [N_ELEM-1:0] sv,      // current selection
  output logic [N_ELEM-1:0] data     // registered selection, to the DAC
);
  typedef logic signed [DW-1:0] st_t;
  localparam st_t A1 = st_t'(1) <<< (FB - A1_SH);
  localparam st_t A2 = st_t'(1) <<< (FB - A2_SH);
  localparam st_t A3 = st_t'(1) <<< (FB - A3_SH);
  localparam st_t A4 = st_t'(1) <<< (FB - A4_SH);
  localparam st_t UNIT_MASK = ~((st_t'(1) <<< FB) - st_t'(1));

  // per-cell state: x1 history (h1a=x1[n-1], h1b=x1[n-2]), x2 section (p2,r2),
  // x3 history (h3a,h3b), x4 section (p4,r4); r = value now, p = value next cycle
  st_t h1a [N_ELEM], h1b [N_ELEM], p2 [N_ELEM], r2 [N_ELEM];
  st_t h3a [N_ELEM], h3b [N_ELEM], p4 [N_ELEM], r4 [N_ELEM];
  st_t x1 [N_ELEM], x3 [N_ELEM], np2 [N_ELEM], np4 [N_ELEM];
  st_t u1, u2, u3, u4;
  st_t m1, m2, m3, m4;

  always_comb begin
    for (int i = 0; i < N_ELEM; i++) begin
      u1     = -(sv[i] ? A1 : st_t'(0)) - (r2[i] >>> G1_SH);
      x1[i]  = u1 - h1b[i];
      u2     = x1[i] - (sv[i] ? A2 : st_t'(0));
      np2[i] = -(r2[i] + u2);
      u3     = r2[i] - (sv[i] ? A3 : st_t'(0)) - (r4[i] >>> G2_SH);
      x3[i]  = u3 - h3b[i];
      u4     = x3[i] - (sv[i] ? A4 : st_t'(0));
      np4[i] = -(r4[i] + u4);
    end
    m1 = x1[0]; m2 = np2[0]; m3 = x3[0]; m4 = np4[0];
    for (int i = 1; i < N_ELEM; i++) begin
      if (x1[i]  < m1) m1 = x1[i];
      if (np2[i] < m2) m2 = np2[i];
      if (x3[i]  < m3) m3 = x3[i];
      if (np4[i] < m4) m4 = np4[i];
    end
    m1 &= UNIT_MASK; m2 &= UNIT_MASK; m3 &= UNIT_MASK; m4 &= UNIT_MASK;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_ELEM; i++) begin
      if (rst) begin
        h1a[i] <= '0; h1b[i] <= '0; p2[i] <= '0; r2[i] <= '0;
        h3a[i] <= '0; h3b[i] <= '0; p4[i] <= '0; r4[i] <= '0;
      end else begin
        h1a[i] <= x1[i] - m1;   h1b[i] <= h1a[i];
        p2[i]  <= np2[i] - m2;  r2[i]  <= p2[i];
        h3a[i] <= x3[i] - m3;   h3b[i] <= h3a[i];
        p4[i]  <= np4[i] - m4;  r4[i]  <= p4[i];
      end
    end
  end

  vq2 #(.N_ELEM(N_ELEM), .DW(DW), .COARSE_W(5)) u_vq (
    .clk, .rst, .sy(p4), .code, .sv
  );

  always_ff @(posedge clk) begin
    if (rst) data <= '0;
    else     data <= sv;
  end
endmodule
