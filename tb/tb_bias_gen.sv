// Self-checking test of the bias generation model: with en high the unit
// current must be VREF/REXT for a range of values; with en low it must be 0.
module tb_bias_gen;
  logic en = 1'b0;
  real vref, rext, iunit;
  int checks = 0, failures = 0;

  bias_gen dut (.en, .vref, .rext, .iunit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      real e;
      en = n % 4 != 0;
      vref = 0.2 + 0.05 * (n % 7);
      rext = 5.0e3 + 1.0e3 * (n % 5);
      #1;
      e = en ? vref / rext : 0.0;
      checks++;
      if ((iunit - e) > 1e-15 || (e - iunit) > 1e-15) begin
        failures++;
        $display("vref %g rext %g iunit %g expected %g", vref, rext, iunit, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
