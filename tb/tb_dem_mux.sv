// Self-checking test of dem_mux: random words on the three inputs and every
// mode in turn; one clock later data must equal the selected input.
module tb_dem_mux;
  import bpdac_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  dem_mode_e mode = DEM_CRFB4;
  logic [31:0] a, b, c, data, expd;
  int checks = 0, failures = 0;

  dem_mux dut (.clk, .rst, .mode, .crfb4(a), .erfb2(b), .thermo(c), .data);
  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      a = $urandom; b = $urandom; c = $urandom;
      mode = dem_mode_e'(n % 3);
      expd = (n % 3 == 0) ? a : (n % 3 == 1) ? b : c;
      @(posedge clk);
      #1;
      checks++;
      if (data !== expd) begin
        failures++;
        $display("mode %0d data %h expected %h", n % 3, data, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
