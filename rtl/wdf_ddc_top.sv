// wdf_ddc_top -- synchronous DDC front end of a five-channel wideband direction
// finder, built from two FPGA modules.
//
// Module A digitises and down-converts channels 0..CH_A-1, module B the
// remaining CH_B channels. Both run from one 120 MHz sample clock (each module
// locks its own PLL to the common 10 MHz reference; `pll_locked_a/b` report
// this) and both start on one shared trigger, so every NCO in the system has
// the same phase on the same clock tick and all (CH_A+CH_B) x 4 = 20 DDC
// outputs are written to their FIFOs on the same ticks at 6 MS/s. That
// coherence is what lets the direction-finding stage compare the phase of one
// signal across antennas. Tuning words, phase offsets, CIC rate, coarse gain
// and the CFIR/PFIR coefficients are broadcast to both modules. The split
// 3 + 2 and the sharing of clock and trigger follow the published design.
//
// Interface: per module, ADC sample arrays in, FIFO read strobes in, FIFO
// heads and flags out. DDC d of a module carries its channel d/4, sub-band d%4.
module wdf_ddc_top
  import ddc_pkg::*;
#(
  parameter int CH_A = 3,
  parameter int CH_B = 2,
  localparam int ND_A = CH_A * NUM_NCO,
  localparam int ND_B = CH_B * NUM_NCO
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pll_locked_a,
  input  logic                     pll_locked_b,
  input  logic                     start_trig,
  input  ddc_cfg_t                 cfg,
  input  logic                     coef_we,
  input  coef_sel_e                coef_sel,
  input  logic [COEF_AW-1:0]       coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  // module A
  input  logic signed [ADC_W-1:0]  adc_a [CH_A],
  input  logic                     adc_valid_a,
  input  logic [ND_A-1:0]          out_rd_a,
  output iq_t                      out_iq_a [ND_A],
  output logic [ND_A-1:0]          out_empty_a,
  output logic [ND_A-1:0]          out_full_a,
  output logic [ND_A-1:0]          out_wr_a,
  output logic                     running_a,
  output logic                     armed_a,
  output logic [ND_A-1:0]          fifo_overflow_a,
  output logic [ND_A-1:0]          gain_sat_a,
  output logic [ND_A-1:0]          fir_overrun_a,
  // module B
  input  logic signed [ADC_W-1:0]  adc_b [CH_B],
  input  logic                     adc_valid_b,
  input  logic [ND_B-1:0]          out_rd_b,
  output iq_t                      out_iq_b [ND_B],
  output logic [ND_B-1:0]          out_empty_b,
  output logic [ND_B-1:0]          out_full_b,
  output logic [ND_B-1:0]          out_wr_b,
  output logic                     running_b,
  output logic                     armed_b,
  output logic [ND_B-1:0]          fifo_overflow_b,
  output logic [ND_B-1:0]          gain_sat_b,
  output logic [ND_B-1:0]          fir_overrun_b
);

  ddc_module #(.CH(CH_A)) u_mod_a (
    .clk, .rst_n, .pll_locked(pll_locked_a), .start_trig,
    .adc(adc_a), .adc_valid(adc_valid_a), .cfg,
    .coef_we, .coef_sel, .coef_addr, .coef_data,
    .out_rd(out_rd_a), .out_iq(out_iq_a), .out_empty(out_empty_a),
    .running(running_a), .armed(armed_a), .out_wr(out_wr_a), .out_full(out_full_a),
    .fifo_overflow(fifo_overflow_a), .gain_sat(gain_sat_a), .fir_overrun(fir_overrun_a)
  );

  ddc_module #(.CH(CH_B)) u_mod_b (
    .clk, .rst_n, .pll_locked(pll_locked_b), .start_trig,
    .adc(adc_b), .adc_valid(adc_valid_b), .cfg,
    .coef_we, .coef_sel, .coef_addr, .coef_data,
    .out_rd(out_rd_b), .out_iq(out_iq_b), .out_empty(out_empty_b),
    .running(running_b), .armed(armed_b), .out_wr(out_wr_b), .out_full(out_full_b),
    .fifo_overflow(fifo_overflow_b), .gain_sat(gain_sat_b), .fir_overrun(fir_overrun_b)
  );

endmodule
