// Two-stage vector quantizer of the 4th order DEM.
//
// Chooses which `code` of the N_ELEM elements to switch on: those whose
// filter outputs sy are largest (ties go to the lower element index).
// Stage 1 (bit reduction and coarse sort): the minimum of the vector is
// subtracted from every entry; the entries then share leading zero bits, and
// all are shifted left by the leading-zero count of their OR, which drops the
// redundant MSBs without losing any LSB. The top COARSE_W bits of each entry
// are compared pairwise (greater / equal), and these flags plus the remaining
// low bits are registered. Stage 2 (fine sort and output): a pair whose coarse
// bits are equal is decided on the low bits, then on the index; each element's
// rank is the number of elements that beat it, and it is switched on when its
// rank is below code.
//
// Timing: sy presented in cycle n produces sv in cycle n+1, combinationally
// from the pipeline register and from the code presented in cycle n+1. The
// caller must therefore present next cycle's sy. Reset loads the "all equal"
// state. The pipeline split, the bit reduction and the 5-MSB coarse sort follow
// the document; the pairwise-matrix form of the ranking is this design's.
module vq2
  import bpdac_pkg::*;
#(
  parameter int unsigned N_ELEM   = 32,
  parameter int unsigned DW       = 24,
  parameter int unsigned COARSE_W = 5
) (
  input  logic                 clk,
  input  logic                 rst,              // synchronous, active high
  input  logic signed [DW-1:0] sy [N_ELEM],      // stage-1 input
  input  code_t                code,             // stage-2 input
  output logic [N_ELEM-1:0]    sv                // elements switched on
);
  localparam int unsigned FW = DW - COARSE_W;
  localparam int unsigned RW = $clog2(N_ELEM + 1);

  // ---------------- stage 1: minimum, bit reduction, coarse compare --------
  logic signed [DW-1:0] mn;
  logic [DW-1:0]        d   [N_ELEM];
  logic [DW-1:0]        nrm [N_ELEM];
  logic [DW-1:0]        orv;
  logic [$clog2(DW)-1:0] lz;
  logic [COARSE_W-1:0]  crs [N_ELEM];
  logic [N_ELEM-1:0]    gt_d [N_ELEM];
  logic [N_ELEM-1:0]    eq_d [N_ELEM];

  always_comb begin
    mn = sy[0];
    for (int i = 1; i < N_ELEM; i++) if (sy[i] < mn) mn = sy[i];
    orv = '0;
    for (int i = 0; i < N_ELEM; i++) begin
      d[i] = DW'(sy[i] - mn);
      orv  = orv | d[i];
    end
    lz = '0;
    for (int b = 0; b < DW; b++) if (orv[b]) lz = $clog2(DW)'(DW - 1 - b);
    for (int i = 0; i < N_ELEM; i++) begin
      nrm[i] = d[i] << lz;
      crs[i] = nrm[i][DW-1 -: COARSE_W];
    end
    for (int i = 0; i < N_ELEM; i++)
      for (int j = 0; j < N_ELEM; j++) begin
        gt_d[i][j] = crs[i] > crs[j];
        eq_d[i][j] = crs[i] == crs[j];
      end
  end

  logic [N_ELEM-1:0] gt_q [N_ELEM];
  logic [N_ELEM-1:0] eq_q [N_ELEM];
  logic [FW-1:0]     fn_q [N_ELEM];

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_ELEM; i++) begin
      if (rst) begin
        gt_q[i] <= '0;
        eq_q[i] <= '1;
        fn_q[i] <= '0;
      end else begin
        gt_q[i] <= gt_d[i];
        eq_q[i] <= eq_d[i];
        fn_q[i] <= nrm[i][FW-1:0];
      end
    end
  end

  // ---------------- stage 2: fine compare, rank, select -------------------
  logic [RW-1:0] rank [N_ELEM];
  always_comb begin
    for (int i = 0; i < N_ELEM; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N_ELEM; j++)
        if (j != i && (gt_q[j][i] ||
                       (eq_q[j][i] && (fn_q[j] > fn_q[i] ||
                                       (fn_q[j] == fn_q[i] && j < i)))))
          rank[i] = rank[i] + 1'b1;
      sv[i] = rank[i] < RW'(code);
    end
  end
endmodule
