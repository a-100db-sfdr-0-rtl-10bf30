// Self-checking test of input_registers (two cascaded latches per cell).
// A clock drives phi_s and its inverse phi_m. Data changes at random times
// inside the clock period; q must show the value d had just before each rising
// edge and hold it steady through the whole following period, including while
// d changes in the high phase.
module tb_input_registers;
  logic clk = 1'b0;
  logic [31:0] d = '0, q, captured;
  int checks = 0, failures = 0;

  input_registers dut (.phi_m(~clk), .phi_s(clk), .d, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      #3 d = $urandom;            // low phase, master open
      #6 d = $urandom;            // still low
      captured = d;
      #1 clk = 1'b1;              // rising edge
      #2 d = $urandom;            // high phase: must not pass
      #2;
      checks++;
      if (q !== captured) begin failures++; $display("n %0d q %h expected %h", n, q, captured); end
      #6 clk = 1'b0;
      #1;
      checks++;
      if (q !== captured) begin failures++; $display("n %0d low q %h expected %h", n, q, captured); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
