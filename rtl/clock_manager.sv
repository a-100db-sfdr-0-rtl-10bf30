// Clock manager of the DAC chip.
// clk_int is either the pad clock or the pad clock divided by two (div_sel),
// chosen by a 2-input mux. The two latches of every input register cell are
// opened on opposite phases of clk_int (phi_s = clk_int for the slave latch,
// phi_m = ~clk_int for the master). rst_sync is the pad reset, asserted at
// once and released two clk_int rising edges after the pad reset goes low.
// The phase generator counts clk_int cycles and pulses trig for one cycle every
// 2^TRIG_W cycles, as a trigger for external measurement equipment.
// The document names the divider, mux, synchroniser and phase generator; the
// divide ratio, synchroniser depth and trigger period are this design's.
module clock_manager #(
  parameter int unsigned TRIG_W = 8
) (
  input  logic clk_in,     // pad clock
  input  logic rst_in,     // pad reset, active high, asynchronous
  input  logic div_sel,    // 1: use clk_in / 2
  output logic clk_int,
  output logic phi_m,
  output logic phi_s,
  output logic rst_sync,   // active high
  output logic trig
);
  logic clk_div;
  logic [1:0] sync_q;
  logic [TRIG_W-1:0] cnt;

  always_ff @(posedge clk_in or posedge rst_in) begin
    if (rst_in) clk_div <= 1'b0;
    else        clk_div <= ~clk_div;
  end

  assign clk_int = div_sel ? clk_div : clk_in;
  assign phi_s   = clk_int;
  assign phi_m   = ~clk_int;

  always_ff @(posedge clk_int or posedge rst_in) begin
    if (rst_in) sync_q <= 2'b11;
    else        sync_q <= {sync_q[0], 1'b0};
  end
  assign rst_sync = sync_q[1];

  always_ff @(posedge clk_int) begin
    if (rst_sync) begin
      cnt  <= '0;
      trig <= 1'b0;
    end else begin
      cnt  <= cnt + 1'b1;
      trig <= cnt == '1;
    end
  end
endmodule
