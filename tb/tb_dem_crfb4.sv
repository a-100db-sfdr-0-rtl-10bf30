// Self-checking test of dem_crfb4.
// Reference model: the per-cell band-pass CRFB recursions written as
// difference equations over time-indexed histories (x1[n] = u1[n] - x1[n-2],
// x2[n+2] = -(x2[n] + u2[n]), ...), with the minimum over the cells, rounded
// down to a whole unit, removed from x1[n], x3[n], x2[n+2] and x4[n+2], and a
// selection made by repeatedly picking the largest remaining sy (lowest index
// on ties) instead of a ranking matrix. Every cycle the DUT's sv
// must equal the model's, sum(sv) must equal the code, and data must be the
// previous cycle's sv. Stimulus: a band-pass code sequence around Fs/4 like the
// modulator's, then random codes, then the extremes 0 and 31.
module tb_dem_crfb4;
  localparam int M = 32;
  localparam int FB = 12;
  localparam int NCYC = 3000;
  logic clk = 1'b0, rst = 1'b1;
  logic [4:0] code = '0;
  logic [M-1:0] sv, data, sv_prev;
  int checks = 0, failures = 0;

  dem_crfb4 dut (.clk, .rst, .code, .sv, .data);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // histories [element][k], k = 1 -> n-1, k = 2 -> n-2
  longint hx1 [M][3], hx2 [M][3], hx3 [M][3], hx4 [M][3];
  longint x1 [M], x2 [M], x3 [M], x4 [M], u2 [M], u4 [M];
  logic [M-1:0] msv;

  function automatic longint fdiv(longint a, int sh);
    return a >>> sh;   // floor division by 2^sh
  endfunction

  task automatic normalize(ref longint v [M]);
    longint mn = v[0];
    for (int i = 1; i < M; i++) if (v[i] < mn) mn = v[i];
    mn = fdiv(mn, FB) <<< FB;
    for (int i = 0; i < M; i++) v[i] -= mn;
  endtask

  task automatic model_step(input int c);
    logic [M-1:0] taken = '0;
    longint u1, u3, x2n2 [M], x4n2 [M];
    // x2[n] and x4[n] were computed two cycles ago
    for (int i = 0; i < M; i++) begin
      x2[i] = hx2[i][2];
      x4[i] = hx4[i][2];
    end
    for (int k = 0; k < c; k++) begin
      int best = -1;
      for (int i = 0; i < M; i++)
        if (!taken[i] && (best < 0 || x4[i] > x4[best])) best = i;
      taken[best] = 1'b1;
    end
    msv = taken;
    for (int i = 0; i < M; i++) begin
      u1 = -(msv[i] ? 8 : 0) - fdiv(x2[i], 11);
      x1[i] = u1 - hx1[i][2];
      u2[i] = x1[i] - (msv[i] ? 64 : 0);
      u3 = x2[i] - (msv[i] ? 1024 : 0) - fdiv(x4[i], 8);
      x3[i] = u3 - hx3[i][2];
      u4[i] = x3[i] - (msv[i] ? 2048 : 0);
      x2n2[i] = -(x2[i] + u2[i]);      // x2[n+2]
      x4n2[i] = -(x4[i] + u4[i]);      // x4[n+2]
    end
    normalize(x1); normalize(x3); normalize(x2n2); normalize(x4n2);
    for (int i = 0; i < M; i++) begin
      hx1[i][2] = hx1[i][1]; hx1[i][1] = x1[i];
      hx3[i][2] = hx3[i][1]; hx3[i][1] = x3[i];
      hx2[i][2] = hx2[i][1]; hx2[i][1] = x2n2[i];
      hx4[i][2] = hx4[i][1]; hx4[i][1] = x4n2[i];
    end
  endtask

  initial begin
    for (int i = 0; i < M; i++)
      for (int k = 0; k < 3; k++) begin
        hx1[i][k] = 0; hx2[i][k] = 0; hx3[i][k] = 0; hx4[i][k] = 0;
      end
    sv_prev = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      int c;
      if (n < 1500)      c = int'($floor(15.5 + 13.0 * $sin(2.0 * 3.14159265 * 0.2517 * n)
                                        + ($urandom % 1000) / 1000.0));
      else if (n < 2700) c = int'($urandom % 32);
      else               c = ((n / 37) % 2 == 0) ? 0 : 31;
      if (c > 31) c = 31;
      if (c < 0) c = 0;
      code = 5'(c);
      model_step(c);
      #1;
      checks++;
      if (sv !== msv || $countones(sv) != c || data !== sv_prev) begin
        failures++;
        if (failures < 10) $display("cycle %0d code %0d: sv %h model %h data %h", n, c, sv, msv, data);
      end
      sv_prev = sv;
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
