// End-to-end test of the band-pass DAC at its default parameters.
//
// A DDS tone just above Fs/4 is run through the whole path once per switching
// scheme (4th order CRFB DEM, 2nd order ERFB DEM, thermometer), with dither
// on, then a stretch with dither off and one with the chip clock divided.
// Every cycle: the number of cells on the DATA bus must equal the modulator
// code two clocks earlier (DEM register + mux register), the chip currents
// must be popcount(DATA of the previous clock) unit currents and their sum
// 32 unit currents, and the quantizer must never clip.
// Per scheme, over 4096 samples, the test measures with a Hann-windowed DFT
// (a) the tone against the in-band noise of the code (modulator noise
// shaping) and (b) the in-band power of each cell's usage error sv_i[n] -
// code[n]/32, averaged over the cells: this is what a mismatched cell adds
// to the output, so both DEMs must hold it at least 20 dB below thermometer
// coding (the 4th order against 2nd order difference is printed). The band is +/-2.5% of the tone frequency.
// Mechanisms counted (each must occur): every DEM mode, a mode switch, dither
// on and off, the divided chip clock (trig period doubles).
module tb_bpdac_top;
  import bpdac_pkg::*;
  localparam int N = 4096;
  localparam int M = 32;
  localparam real PI = 3.141592653589793;
  localparam real IU = 0.25 / 12.5e3;
  localparam logic [31:0] FTW = 32'h4000_0000 + 32'h0070_0000;   // f = 0.25 + 0.0017

  logic clk = 1'b0, rst = 1'b1, dither_en = 1'b1, div_sel = 1'b0;
  logic [31:0] ftw = FTW;
  logic [16:0] amp = 17'd26000;
  dem_mode_e mode = DEM_CRFB4;
  code_t code;
  logic clipped, trig;
  logic [M-1:0] data;
  real iout_p, iout_n;
  int checks = 0, failures = 0;

  bpdac_top dut (.clk, .rst, .ftw, .amp, .dither_en, .mode, .div_sel, .vref(0.25), .rext(12.5e3),
                 .code, .clipped, .data, .iout_p, .iout_n, .trig);
  always #5 clk = ~clk;

  initial begin
    #(10 * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-cycle checks
  code_t code_d1, code_d2;
  logic [M-1:0] data_d1;
  bit running = 0;
  int n_clip = 0;
  always @(posedge clk) begin
    #1;
    if (running) begin
      checks++;
      if ($countones(data) != int'(code_d2)) begin
        failures++;
        if (failures < 10) $display("%0t: %0d cells on, code two clocks earlier %0d", $time, $countones(data), code_d2);
      end
      checks++;
      if ((iout_p - $countones(data_d1) * IU) > 1e-12 || ($countones(data_d1) * IU - iout_p) > 1e-12 ||
          (iout_p + iout_n - M * IU) > 1e-12 || (M * IU - iout_p - iout_n) > 1e-12) begin
        failures++;
        if (failures < 10) $display("%0t: iout_p %g iout_n %g for %0d cells", $time, iout_p, iout_n, $countones(data_d1));
      end
      if (clipped) n_clip++;
    end
  end
  always @(posedge clk) begin
    code_d2 <= code_d1;
    code_d1 <= code;
    data_d1 <= data;
  end

  // captured sequences of one measurement
  int cseq [N];
  logic [M-1:0] dseq [N];
  real w [N];
  int kt;   // tone bin

  task automatic capture();
    for (int n = 0; n < N; n++) begin
      @(posedge clk); #2;
      dseq[n] = data;
      cseq[n] = int'(code_d2);   // the code these cells belong to
    end
  endtask

  function automatic real bin_pow(int k, int which);   // which < 0: code, else cell index
    real re = 0.0, im = 0.0, x;
    for (int n = 0; n < N; n++) begin
      x = (which < 0) ? real'(cseq[n]) : (real'(dseq[n][which]) - real'(cseq[n]) / M);
      re += w[n] * x * $cos(2.0 * PI * k * n / N);
      im -= w[n] * x * $sin(2.0 * PI * k * n / N);
    end
    return re * re + im * im;
  endfunction

  function automatic real db(real p);
    return 10.0 * $ln(p) / $ln(10.0);
  endfunction

  // in-band usage-error power, averaged over the cells, excluding nothing
  function automatic real mismatch_band(int half);
    real s = 0.0;
    for (int i = 0; i < M; i++)
      for (int k = kt - half; k <= kt + half; k++) s += bin_pow(k, i);
    return s / M;
  endfunction

  real p_dem [3];
  real snr_db;
  int mode_seen [3];
  int n_switch = 0, n_dither_off = 0, n_div = 0;

  initial begin
    int half;
    real tone, noise;
    for (int n = 0; n < N; n++) w[n] = 0.5 - 0.5 * $cos(2.0 * PI * n / N);
    kt = int'(real'(FTW) / 4294967296.0 * N + 0.5);
    half = int'(0.025 * real'(kt));
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (4) @(posedge clk);
    running = 1;
    for (int m = 0; m < 3; m++) begin
      if (m > 0) n_switch++;
      mode = dem_mode_e'(m);
      repeat (300) @(posedge clk);   // let the new scheme's data reach the bus
      capture();
      mode_seen[m]++;
      p_dem[m] = mismatch_band(half);
      if (m == 0) begin
        tone = bin_pow(kt - 1, -1) + bin_pow(kt, -1) + bin_pow(kt + 1, -1);
        noise = 0.0;
        for (int k = kt - half; k <= kt + half; k++)
          if (k < kt - 2 || k > kt + 2) noise += bin_pow(k, -1);
        snr_db = db(tone / noise);
        $display("modulator in-band tone/noise %.1f dB", snr_db);
        checks++;
        if (snr_db < 60.0) begin failures++; $display("modulator noise shaping too weak"); end
      end
      $display("mode %0d: in-band cell usage error %.1f dB", m, db(p_dem[m]));
    end
    checks++;
    if (!(db(p_dem[0]) < db(p_dem[2]) - 20.0 && db(p_dem[1]) < db(p_dem[2]) - 20.0)) begin
      failures++;
      $display("a DEM does not shape the cell mismatch away from the band");
    end
    $display("4th order DEM against 2nd order DEM in band: %.1f dB", db(p_dem[0]) - db(p_dem[1]));
    // dither off
    mode = DEM_CRFB4;
    dither_en = 1'b0;
    n_dither_off++;
    repeat (2000) @(posedge clk);
    dither_en = 1'b1;
    // divided chip clock: the measurement trigger comes half as often
    begin
      int t0, t1, c;
      t0 = -1;
      t1 = -1;
      c = 0;
      running = 0;
      div_sel = 1'b1;
      while (t1 < 0 && c < 3000) begin
        @(posedge clk); #1; c++;
        if (trig) begin if (t0 < 0) t0 = c; else if (c - t0 > 2) t1 = c; end
      end
      checks++;
      if (t1 - t0 != 512) begin failures++; $display("divided trig period %0d", t1 - t0); end
      else n_div++;
      div_sel = 1'b0;
    end
    checks++;
    if (n_clip != 0) begin failures++; $display("quantizer clipped %0d times", n_clip); end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("mode %0d never used", m); end
    end
    checks++;
    if (n_switch == 0 || n_dither_off == 0 || n_div == 0) begin failures++; $display("a mechanism never happened"); end
    $display("mechanisms: modes %0d/%0d/%0d, mode switches %0d, dither off %0d, divided clock %0d",
             mode_seen[0], mode_seen[1], mode_seen[2], n_switch, n_dither_off, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
