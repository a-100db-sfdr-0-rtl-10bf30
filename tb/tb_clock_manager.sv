// Self-checking test of clock_manager. With div_sel = 0: clk_int equals the
// pad clock, phi_m is its inverse, rst_sync is released on the second clock
// edge after the pad reset, and trig pulses once every 256 clocks. With
// div_sel = 1: clk_int toggles once per pad clock edge (half frequency) and
// trig pulses every 256 clk_int cycles.
module tb_clock_manager;
  logic clk = 1'b0, rst = 1'b1, div_sel = 1'b0;
  logic clk_int, phi_m, phi_s, rst_sync, trig;
  int checks = 0, failures = 0;
  int last_trig, n_trig, edges;

  clock_manager dut (.clk_in(clk), .rst_in(rst), .div_sel, .clk_int, .phi_m, .phi_s, .rst_sync, .trig);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(rst_sync, "rst_sync held after pad reset");
    @(posedge clk); #1 check(rst_sync, "rst_sync after 1 edge");
    @(posedge clk); #1 check(!rst_sync, "rst_sync released after 2 edges");
    last_trig = -1; n_trig = 0;
    for (int c = 0; c < 1100; c++) begin
      @(posedge clk); #1;
      check(clk_int == clk && phi_s == clk && phi_m == ~clk, "phases");
      if (trig) begin
        if (last_trig >= 0) check(c - last_trig == 256, "trig period");
        last_trig = c; n_trig++;
      end
    end
    check(n_trig == 4, "trig count");
    // divided clock
    rst = 1'b1; div_sel = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    edges = 0; n_trig = 0;
    for (int c = 0; c < 1200; c++) begin
      @(posedge clk); #1;
      if (clk_int) edges++;
    end
    check(edges == 600, "divided clock high on every second edge");
    for (int c = 0; c < 1200; c++) begin
      @(posedge clk_int); #1;
      if (trig) n_trig++;
    end
    check(n_trig >= 4 && n_trig <= 5, "trig count divided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
