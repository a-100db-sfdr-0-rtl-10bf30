// Self-checking test of thermo_coder: after each clock, data must have
// exactly the cells 0..code-1 on; every code 0..31 is visited, then random
// codes. The reference is a shift-built mask (2^code - 1).
module tb_thermo_coder;
  logic clk = 1'b0, rst = 1'b1;
  logic [4:0] code = '0;
  logic [31:0] data;
  int checks = 0, failures = 0;

  thermo_coder dut (.clk, .rst, .code, .data);
  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      logic [32:0] mask;
      code = (n < 32) ? 5'(n) : 5'($urandom);
      mask = (33'd1 << code) - 33'd1;
      @(posedge clk);
      #1;
      checks++;
      if (data !== mask[31:0]) begin
        failures++;
        $display("code %0d data %h", code, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
