// Narrow-band SFDR of the complete band-pass DAC with mismatched current
// cells, for the three switching schemes and a sweep of input levels.
//
// Three complete DACs run side by side from the same stimulus. One has a 2%
// Gaussian random mismatch on all 32 cells. The other has a single cell
// deliberately 2% too strong (cell 16, which thermometer coding switches
// near mid-scale) and all others ideal. The third has ideal cells, as the
// reference. Each one's differential
// output current (Iout+ - Iout-) is sampled once per clock.
//
// For every scheme (4th order CRFB DEM, 2nd order ERFB DEM, thermometer)
// and every input level, 8192 samples are captured. The tone sits exactly
// on a DFT bin (0.2517 Fs), so the Hann window puts all its power into
// three bins. The narrow-band SFDR is the tone power against the strongest
// other bin within +/-2.5% of the tone frequency.
//
// Checks:
//   * every clock, the summed output current is 32 unit currents times the
//     mean cell gain;
//   * at the largest input level, both DEMs must beat thermometer coding by
//     at least 15 dB on both DACs;
//   * at that level, both DEMs must reach 90 dB on both DACs.
// All SFDR values are printed.
module tb_bpdac_mismatch;
  import bpdac_pkg::*;
  localparam int N = 8192;
  localparam int M = 32;
  localparam int NLEV = 4;
  localparam real PI = 3.141592653589793;
  localparam real IU = 0.25 / 12.5e3;
  localparam int KT = 2062;                                    // tone bin
  localparam logic [31:0] FTW = 32'(KT) << 19;                 // KT * 2^32 / N
  localparam int HALF = 51;                                    // 2.5% of KT

  logic clk = 1'b0, rst = 1'b1, dither_en = 1'b1, div_sel = 1'b0;
  logic [31:0] ftw = FTW;
  logic [16:0] amp;
  dem_mode_e mode = DEM_CRFB4;
  code_t code_g, code_c, code_i;
  logic clip_g, clip_c, clip_i, trig_g, trig_c, trig_i;
  logic [M-1:0] data_g, data_c, data_i;
  real ip_g, in_g, ip_c, in_c, ip_i, in_i;
  int checks = 0, failures = 0;

  // 2% Gaussian mismatch on every cell
  bpdac_top #(.MISMATCH_SIGMA(0.02), .MISMATCH_SEED(7)) dut_g (
    .clk, .rst, .ftw, .amp, .dither_en, .mode, .div_sel, .vref(0.25), .rext(12.5e3),
    .code(code_g), .clipped(clip_g), .data(data_g), .iout_p(ip_g), .iout_n(in_g), .trig(trig_g));
  // one corrupted cell
  bpdac_top #(.CORRUPT_IDX(16), .CORRUPT_ERR(0.02)) dut_c (
    .clk, .rst, .ftw, .amp, .dither_en, .mode, .div_sel, .vref(0.25), .rext(12.5e3),
    .code(code_c), .clipped(clip_c), .data(data_c), .iout_p(ip_c), .iout_n(in_c), .trig(trig_c));
  // ideal cells, for the reference
  bpdac_top dut_i (
    .clk, .rst, .ftw, .amp, .dither_en, .mode, .div_sel, .vref(0.25), .rext(12.5e3),
    .code(code_i), .clipped(clip_i), .data(data_i), .iout_p(ip_i), .iout_n(in_i), .trig(trig_i));

  always #5 clk = ~clk;

  initial begin
    #(10 * (3 * NLEV * (N + 400) + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the summed current does not depend on the data
  real sum_g, sum_c;
  initial begin
    #1;
    sum_g = 0.0;
    for (int i = 0; i < M; i++) sum_g += dut_g.u_chip.u_dac.gain[i];
    sum_c = M + 0.02;
  end
  bit running = 0;
  always @(posedge clk) begin
    #1;
    if (running) begin
      checks++;
      if ((ip_g + in_g - sum_g * IU) > 1e-12 || (sum_g * IU - ip_g - in_g) > 1e-12 ||
          (ip_c + in_c - sum_c * IU) > 1e-12 || (sum_c * IU - ip_c - in_c) > 1e-12) begin
        failures++;
        if (failures < 10) $display("%0t: summed currents %g %g", $time, ip_g + in_g, ip_c + in_c);
      end
    end
  end

  real xs [3][N];   // differential output, per DAC
  real w [N];

  task automatic capture();
    for (int n = 0; n < N; n++) begin
      @(posedge clk); #2;
      xs[0][n] = (ip_g - in_g) / IU;
      xs[1][n] = (ip_c - in_c) / IU;
      xs[2][n] = (ip_i - in_i) / IU;
    end
  endtask

  function automatic real bin_pow(int d, int k);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < N; n++) begin
      re += w[n] * xs[d][n] * $cos(2.0 * PI * real'((k * n) % N) / N);
      im -= w[n] * xs[d][n] * $sin(2.0 * PI * real'((k * n) % N) / N);
    end
    return re * re + im * im;
  endfunction

  function automatic real db(real p);
    return 10.0 * $ln(p) / $ln(10.0);
  endfunction

  function automatic real sfdr(int d);
    real tone = 0.0, spur = 0.0, p;
    for (int k = KT - HALF; k <= KT + HALF; k++) begin
      p = bin_pow(d, k);
      if (k >= KT - 1 && k <= KT + 1) tone += p;
      else if (p > spur) spur = p;
    end
    return db(tone / spur);
  endfunction

  // input levels, dB below the DDS full scale
  int lev_db [NLEV] = '{2, 20, 40, 60};
  real res [3][3][NLEV];   // [dac][scheme][level]
  string dac_name [3] = '{"2% Gaussian mismatch", "one cell +2%        ", "ideal cells         "};
  string scheme_name [3] = '{"4th order CRFB DEM", "2nd order ERFB DEM", "thermometer       "};

  initial begin
    for (int n = 0; n < N; n++) w[n] = 0.5 - 0.5 * $cos(2.0 * PI * n / N);
    amp = 17'd32768;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (4) @(posedge clk);
    running = 1;
    for (int l = 0; l < NLEV; l++) begin
      amp = 17'(int'(32768.0 * $pow(10.0, -lev_db[l] / 20.0)));
      for (int m = 0; m < 3; m++) begin
        mode = dem_mode_e'(m);
        repeat (300) @(posedge clk);
        capture();
        for (int d = 0; d < 3; d++) res[d][m][l] = sfdr(d);
      end
    end
    running = 0;
    for (int d = 0; d < 3; d++) begin
      $display("narrow-band SFDR (dBc), %s:", dac_name[d]);
      for (int m = 0; m < 3; m++)
        $display("  %s  at -%0d/-%0d/-%0d/-%0d dB input: %.1f %.1f %.1f %.1f", scheme_name[m],
                 lev_db[0], lev_db[1], lev_db[2], lev_db[3],
                 res[d][m][0], res[d][m][1], res[d][m][2], res[d][m][3]);
    end
    for (int d = 0; d < 2; d++) begin
      for (int m = 0; m < 2; m++) begin
        checks++;
        if (res[d][m][0] < res[d][2][0] + 15.0) begin
          failures++;
          $display("%s: %s does not beat thermometer coding", dac_name[d], scheme_name[m]);
        end
        checks++;
        if (res[d][m][0] < 90.0) begin
          failures++;
          $display("%s: %s below 90 dB", dac_name[d], scheme_name[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
