// Self-checking test of sd_modulator.
// Reference: the error-feedback form of the same noise-shaping loop, written
// independently of the CRFB resonator chain: y[n] = u[n-6] + 3e[n-2] + 3e[n-4]
// + e[n-6], level = clip(round(y + dither)), e = level*2^12 - y. For integer
// arithmetic this is exactly the CRFB loop with NTF (1+z^-2)^3 and STF z^-6,
// so every output code must match. Stimulus: full-scale sines near Fs/4 and
// random full-range samples, with dither switched on and off. Also checks that
// the quantizer never clips and that each code lies in 0..31.
module tb_sd_modulator;
  localparam int FRAC = 12;
  localparam int NCYC = 6000;
  logic clk = 1'b0, rst = 1'b1, dither_en = 1'b0;
  logic signed [15:0] u = '0;
  logic [4:0] code;
  logic clipped;
  int checks = 0, failures = 0;

  sd_modulator dut (.clk, .rst, .u, .dither_en, .code, .clipped);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint uh [7];   // u history, uh[k] = u[n-k]
  longint eh [7];   // e history
  logic [15:0] lfsr;
  longint y, q, lv, exp_code;

  initial begin
    foreach (uh[k]) uh[k] = 0;
    foreach (eh[k]) eh[k] = 0;
    lfsr = 16'hACE1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      // stimulus for cycle n
      if (n < 2000)      u = 16'(int'($floor(32767.0 * $sin(2.0 * 3.14159265 * 0.2513 * n) + 0.5)));
      else if (n < 4000) u = 16'($urandom);
      else               u = 16'(int'($floor(30000.0 * $sin(2.0 * 3.14159265 * 0.2461 * n) + 0.5)));
      dither_en = (n / 700) % 2 == 1;
      // reference for cycle n
      uh[0] = longint'(u);
      y = uh[6] + 3 * eh[2] + 3 * eh[4] + eh[6];
      q = y + (dither_en ? longint'($signed(lfsr[10:0])) : 0);
      lv = (q + 2048) >>> FRAC;
      if (lv > 15) lv = 15;
      if (lv < -16) lv = -16;
      eh[0] = lv * 4096 - y;
      exp_code = lv + 16;
      @(posedge clk);
      #1;
      checks++;
      if (code !== 5'(exp_code) || clipped) begin
        failures++;
        if (failures < 10) $display("cycle %0d: code %0d expected %0d clipped %b", n, code, exp_code, clipped);
      end
      for (int k = 6; k > 0; k--) begin uh[k] = uh[k-1]; eh[k] = eh[k-1]; end
      lfsr = (lfsr >> 1) ^ (lfsr[0] ? 16'hB400 : 16'h0000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
