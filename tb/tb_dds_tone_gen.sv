// Self-checking test of dds_tone_gen. The reference is an ideal sine of the
// phase accumulated three clocks earlier (the generator's latency), taken at
// the centre of the table cell the phase falls in and scaled by amp:
// 32767 * amp/32768 * sin(2*pi*(floor(phase/2^20) + 0.5)/4096). Every sample
// must lie within 2 LSB of it. Several tuning words (around Fs/4 and low
// tones) and amplitudes are run; the phase accumulator wraps many times.
module tb_dds_tone_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] ftw = '0;
  logic [16:0] amp = 17'd32768;
  logic signed [15:0] sample;
  int checks = 0, failures = 0;

  dds_tone_gen dut (.clk, .rst, .ftw, .amp, .sample);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ftws [4] = '{32'h4000_0000, 32'h4123_4567, 32'h0100_0000, 32'h3C00_1234};
    logic [16:0] amps [4] = '{17'd32768, 17'd16384, 17'd32768, 17'd3277};
    for (int t = 0; t < 4; t++) begin
      ftw = ftws[t];
      amp = amps[t];
      rst = 1'b1;
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      for (int e = 1; e <= 600; e++) begin
        @(posedge clk);
        #1;
        if (e >= 3) begin
          logic [31:0] ph;
          real ideal, diff;
          ph = 32'((e - 3) * ftw);
          ideal = 32767.0 * real'(amp) / 32768.0
                  * $sin(2.0 * 3.141592653589793 * (real'(ph[31:20]) + 0.5) / 4096.0);
          diff = real'(sample) - ideal;
          checks++;
          if (diff > 2.0 || diff < -2.0) begin
            failures++;
            if (failures < 10) $display("ftw %h e %0d sample %0d ideal %f", ftw, e, sample, ideal);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
