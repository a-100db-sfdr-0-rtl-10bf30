// Self-checking test of the current-steering DAC model: for random switch
// patterns, iout_p must equal the sum of the unit currents of the cells
// steered to it (cell 3 deliberately 10% high) and iout_n the rest, so that
// iout_p + iout_n is constant. A second instance with 2% Gaussian mismatch
// is probed one cell at a time: the 32 measured cell currents must have a
// mean within 1.5% of the unit current and a spread between 1% and 3.5%, and
// every pattern must put the rest of the total current on iout_n.
module tb_cdac;
  logic [31:0] sw_p, sw_n;
  real iunit = 20.0e-6, iout_p, iout_n;
  int checks = 0, failures = 0;

  cdac #(.CORRUPT_IDX(3), .CORRUPT_ERR(0.1)) dut (.sw_p, .sw_n, .iunit, .iout_p, .iout_n);

  logic [31:0] gp, gn;
  real gout_p, gout_n;
  cdac #(.MISMATCH_SIGMA(0.02), .MISMATCH_SEED(7)) dut_g (.sw_p(gp), .sw_n(gn), .iunit,
                                                         .iout_p(gout_p), .iout_n(gout_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      real ep, en;
      sw_p = $urandom;
      sw_n = ~sw_p;
      #1;
      ep = iunit * ($countones(sw_p) + (sw_p[3] ? 0.1 : 0.0));
      en = iunit * ($countones(sw_n) + (sw_n[3] ? 0.1 : 0.0));
      checks++;
      if ((iout_p - ep) > 1e-12 || (ep - iout_p) > 1e-12 || (iout_n - en) > 1e-12 || (en - iout_n) > 1e-12) begin
        failures++;
        $display("sw %h iout_p %g exp %g iout_n %g exp %g", sw_p, iout_p, ep, iout_n, en);
      end
    end
    begin
      real g [32];
      real tot, mean, var_s, sd;
      mean = 0.0;
      var_s = 0.0;
      gp = '1;
      gn = '0;
      #1 tot = gout_p;
      for (int i = 0; i < 32; i++) begin
        gp = 32'(1) << i;
        gn = ~gp;
        #1;
        g[i] = gout_p / iunit;
        mean += g[i] / 32.0;
        checks++;
        if ((gout_p + gout_n - tot) > 1e-12 || (tot - gout_p - gout_n) > 1e-12) begin
          failures++;
          $display("cell %0d: iout_p + iout_n = %g, total %g", i, gout_p + gout_n, tot);
        end
      end
      for (int i = 0; i < 32; i++) var_s += (g[i] - mean) * (g[i] - mean) / 31.0;
      sd = $sqrt(var_s);
      $display("Gaussian mismatch: mean cell %.4f, spread %.4f", mean, sd);
      checks++;
      if (mean < 0.985 || mean > 1.015 || sd < 0.01 || sd > 0.035) begin
        failures++;
        $display("cell currents do not follow the 2%% mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
