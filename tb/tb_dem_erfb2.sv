// Self-checking test of dem_erfb2, the 2nd order error-feedback DEM.
// Reference: sf[n] = -(2 se[n-2] + se[n-4]), sy = sf - min(sf), the `code`
// largest sy switched on (ties to the lower index, found by repeated maximum
// search), se = sy - sv, all on time-indexed integer histories. Every cycle
// sv must match, sum(sv) must equal the code and data must be last cycle's sv.
// Stimulus: band-pass codes around Fs/4, random codes, then 0/31 extremes.
module tb_dem_erfb2;
  localparam int M = 32;
  localparam int NCYC = 3000;
  logic clk = 1'b0, rst = 1'b1;
  logic [4:0] code = '0;
  logic [M-1:0] sv, data, sv_prev, msv;
  int checks = 0, failures = 0;
  longint se [M][5];   // se[i][k] = se[n-k]
  longint sf [M], sy [M];

  dem_erfb2 dut (.clk, .rst, .code, .sv, .data);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step(input int c);
    longint mn;
    msv = '0;
    for (int i = 0; i < M; i++) sf[i] = -(2 * se[i][2] + se[i][4]);
    mn = sf[0];
    for (int i = 1; i < M; i++) if (sf[i] < mn) mn = sf[i];
    for (int i = 0; i < M; i++) sy[i] = sf[i] - mn;
    for (int k = 0; k < c; k++) begin
      int best = -1;
      for (int i = 0; i < M; i++) if (!msv[i] && (best < 0 || sy[i] > sy[best])) best = i;
      msv[best] = 1'b1;
    end
    for (int i = 0; i < M; i++) begin
      for (int k = 4; k > 1; k--) se[i][k] = se[i][k-1];
      se[i][1] = sy[i] - (msv[i] ? 1 : 0);
    end
  endtask

  initial begin
    for (int i = 0; i < M; i++) for (int k = 0; k < 5; k++) se[i][k] = 0;
    sv_prev = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      int c;
      if (n < 1500)      c = int'($floor(15.5 + 14.0 * $sin(2.0 * 3.14159265 * 0.2531 * n)
                                        + ($urandom % 1000) / 1000.0));
      else if (n < 2700) c = int'($urandom % 32);
      else               c = ((n / 23) % 2 == 0) ? 0 : 31;
      if (c > 31) c = 31;
      if (c < 0) c = 0;
      code = 5'(c);
      model_step(c);
      #1;
      checks++;
      if (sv !== msv || $countones(sv) != c || data !== sv_prev) begin
        failures++;
        if (failures < 10) $display("cycle %0d code %0d: sv %h model %h", n, c, sv, msv);
      end
      sv_prev = sv;
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
