// Self-checking test of the DAC chip. Data words change just after each
// rising clock edge, as they do coming from the FPGA; after the next rising
// edge the output currents must be popcount(data) and 32 - popcount(data)
// unit currents (VREF/REXT = 0.25 V / 12.5 kOhm = 20 uA). During reset and for
// two clocks after it every cell must be steered to iout_n. trig must pulse.
module tb_bpdac_chip;
  logic clk = 1'b0, reset = 1'b1;
  logic [31:0] data = '0, prev;
  real iout_p, iout_n;
  logic trig;
  int checks = 0, failures = 0, ntrig = 0;
  localparam real IU = 0.25 / 12.5e3;

  bpdac_chip dut (.clk, .reset, .div_sel(1'b0), .data, .vref(0.25), .rext(12.5e3), .iout_p, .iout_n, .trig);
  always #5 clk = ~clk;
  always @(posedge clk) if (trig) ntrig++;

  function automatic bit near(real a, real b);
    return (a - b) < 1e-12 && (b - a) < 1e-12;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = 32'hFFFF_FFFF;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!near(iout_p, 0.0) || !near(iout_n, 32 * IU)) begin failures++; $display("not steered to iout_n in reset"); end
    reset = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (!near(iout_p, 0.0) || !near(iout_n, 32 * IU)) begin failures++; $display("not steered to iout_n after reset %g %g", iout_p, iout_n); end
    @(posedge clk); #1;
    prev = data;
    for (int n = 0; n < 600; n++) begin
      data = $urandom;
      @(posedge clk); #1;
      checks++;
      if (!near(iout_p, $countones(data) * IU) || !near(iout_n, (32 - $countones(data)) * IU)) begin
        failures++;
        if (failures < 10) $display("n %0d data %h iout_p %g iout_n %g", n, data, iout_p, iout_n);
      end
    end
    checks++;
    if (ntrig < 2) begin failures++; $display("trig did not pulse"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
