// The DAC chip (mixed-signal; contains behavioural analog models).
// The 32-bit cell data from the FPGA is retimed by the input registers on the
// chip clock from the clock manager, turned into complementary switch controls
// by the drivers and steers the 32 unit currents of the current-steering DAC,
// biased from VREF and REXT, into Iout+ / Iout-. While reset is high (and two
// clocks after) every cell is steered to Iout-. Latency from data to the
// outputs: one chip-clock rising edge. trig is the measurement trigger.
module bpdac_chip #(
  parameter int unsigned N_ELEM      = 32,
  parameter int          CORRUPT_IDX = -1,
  parameter real         CORRUPT_ERR = 0.0,
  parameter real         MISMATCH_SIGMA = 0.0,
  parameter int unsigned MISMATCH_SEED  = 1
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              div_sel,
  input  logic [N_ELEM-1:0] data,
  input  real               vref,
  input  real               rext,
  output real               iout_p,
  output real               iout_n,
  output logic              trig
);
  logic clk_int, phi_m, phi_s, rst_sync;   // clk_int: not needed here, the latches use the phases
  logic [N_ELEM-1:0] q, sw_p, sw_n;
  real iunit;

  clock_manager u_clk (
    .clk_in(clk), .rst_in(reset), .div_sel, .clk_int, .phi_m, .phi_s, .rst_sync, .trig
  );
  input_registers #(.N_ELEM(N_ELEM)) u_regs (.phi_m, .phi_s, .d(data), .q);
  switch_driver   #(.N_ELEM(N_ELEM)) u_drv  (.en(~rst_sync), .d(q), .sw_p, .sw_n);
  bias_gen u_bias (.en(1'b1), .vref, .rext, .iunit);   // bias runs whenever powered
  cdac #(.N_ELEM(N_ELEM), .CORRUPT_IDX(CORRUPT_IDX), .CORRUPT_ERR(CORRUPT_ERR),
             .MISMATCH_SIGMA(MISMATCH_SIGMA), .MISMATCH_SEED(MISMATCH_SEED)) u_dac (
    .sw_p, .sw_n, .iunit, .iout_p, .iout_n
  );
endmodule
