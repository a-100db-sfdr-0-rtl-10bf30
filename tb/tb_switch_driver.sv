// Self-checking test of switch_driver: for random data, with en high sw_p must
// equal d and sw_n its complement; with en low every cell must be steered to
// Iout- (sw_p all 0, sw_n all 1). Exactly one switch of each pair is on.
module tb_switch_driver;
  logic en;
  logic [31:0] d, sw_p, sw_n;
  int checks = 0, failures = 0;

  switch_driver dut (.en, .d, .sw_p, .sw_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      d = $urandom;
      en = (n % 5) != 0;
      #1;
      checks++;
      if (sw_p !== (en ? d : 32'h0) || sw_n !== ~sw_p || (sw_p & sw_n) != 0) begin
        failures++;
        $display("en %b d %h sw_p %h sw_n %h", en, d, sw_p, sw_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
