// Self-checking test of vq2, the two-stage vector quantizer.
// Random vectors (narrow ranges with many ties, wide ranges, and negative
// values) are presented each cycle; one cycle later, with a random code, sv
// must switch on exactly the `code` largest entries, ties going to the lower
// index. The reference picks the largest remaining entry `code` times.
// Also checks the one-cycle latency: sv must not follow the current vector.
module tb_vq2;
  localparam int M = 32;
  localparam int DW = 24;
  localparam int NCYC = 3000;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [DW-1:0] sy [M];
  logic [4:0] code = '0;
  logic [M-1:0] sv, exp_sv;
  int checks = 0, failures = 0;
  longint prev [M];

  vq2 dut (.clk, .rst, .sy, .code, .sv);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] pick(longint v [M], int c);
    logic [M-1:0] t = '0;
    for (int k = 0; k < c; k++) begin
      int best = -1;
      for (int i = 0; i < M; i++) if (!t[i] && (best < 0 || v[i] > v[best])) best = i;
      t[best] = 1'b1;
    end
    return t;
  endfunction

  initial begin
    for (int i = 0; i < M; i++) begin sy[i] = '0; prev[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      int mode = n % 4;
      int base = int'($urandom % 20000) - 10000;
      for (int i = 0; i < M; i++) begin
        case (mode)
          0: sy[i] = DW'(base + int'($urandom % 4));
          1: sy[i] = DW'(base + int'($urandom % 60000) - 30000);
          2: sy[i] = DW'(base + int'($urandom % 300));
          default: sy[i] = DW'(base + (int'($urandom % 8) << 9));
        endcase
      end
      code = 5'($urandom);
      #1;
      if (n > 0) begin
        exp_sv = pick(prev, int'(code));
        checks++;
        if (sv !== exp_sv) begin
          failures++;
          if (failures < 10) $display("cycle %0d code %0d: sv %h expected %h", n, code, sv, exp_sv);
        end
      end
      for (int i = 0; i < M; i++) prev[i] = longint'(sy[i]);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
