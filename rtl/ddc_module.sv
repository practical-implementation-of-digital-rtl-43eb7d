// ddc_module -- the DDC bank of one FPGA module of the direction finder.
//
// CH acquisition channels each deliver one real 16-bit ADC sample per 120 MHz
// clock. NUM_NCO shared oscillators, one per sub-band, feed CH x NUM_NCO
// mixers: every channel is mixed with every NCO, and each of the resulting
// complex signals runs through its own ddc_chain and output FIFO. With four
// 6 MS/s sub-bands side by side, the four DDCs of a channel together cover the
// 20 MHz instantaneous bandwidth. DDC number c*NUM_NCO + n carries channel c,
// sub-band n.
//
// acq_ctrl starts the bank: after PLL lock, the start trigger produces one
// `sync` clock that zeroes every NCO phase and every decimator, then ADC samples
// flow while `running` is high. All chains therefore write their FIFOs on
// the same clock ticks, in this and in any other module driven by the same
// clock and trigger. The configuration (tuning words, phase offsets, CIC rate,
// coarse gain) and the coefficient load bus are common to all chains; the
// filter bank that reads the FIFOs is outside this design. The structure
// follows the published design; flags and sizes are this design's choice.
//
// Timing: ADC samples are taken on every clock with `running` and adc_valid
// high; an NCO output lags its phase accumulator by NCO_ITER+2 clocks.
module ddc_module
  import ddc_pkg::*;
#(
  parameter int CH         = 3,
  parameter int NCO_ITER   = 16,
  parameter int FIFO_DEPTH = 16,
  parameter int CFIR_TAPS  = ddc_pkg::CFIR_TAPS_DEF,
  parameter int CFIR_LANES = 48,
  parameter int PFIR_TAPS  = ddc_pkg::PFIR_TAPS_DEF,
  parameter int PFIR_LANES = 4,
  localparam int NDDC      = CH * NUM_NCO
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pll_locked,
  input  logic                     start_trig,
  input  logic signed [ADC_W-1:0]  adc [CH],
  input  logic                     adc_valid,
  input  ddc_cfg_t                 cfg,
  input  logic                     coef_we,
  input  coef_sel_e                coef_sel,
  input  logic [COEF_AW-1:0]       coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic [NDDC-1:0]          out_rd,
  output iq_t                      out_iq [NDDC],
  output logic [NDDC-1:0]          out_empty,
  output logic                     running,
  output logic                     armed,        // PLL locked, waiting for the trigger
  output logic [NDDC-1:0]          out_wr,       // a chain wrote its FIFO this clock
  output logic [NDDC-1:0]          out_full,
  output logic [NDDC-1:0]          fifo_overflow,
  output logic [NDDC-1:0]          gain_sat,
  output logic [NDDC-1:0]          fir_overrun
);

  logic sync;
  logic signed [NCO_W-1:0] nco_cos [NUM_NCO];
  logic signed [NCO_W-1:0] nco_sin [NUM_NCO];

  acq_ctrl u_ctrl (
    .clk, .rst_n, .pll_locked, .start_trig,
    .run(running), .sync, .armed
  );

  for (genvar n = 0; n < NUM_NCO; n++) begin : g_nco
    nco #(.PHASE_W(PHASE_W), .OUT_W(NCO_W), .ITER(NCO_ITER)) u_nco (
      .clk, .rst_n, .en(running), .sync,
      .ftw(cfg.nco[n].ftw), .poff(cfg.nco[n].poff),
      .cos_o(nco_cos[n]), .sin_o(nco_sin[n])
    );
  end

  for (genvar c = 0; c < CH; c++) begin : g_ch
    for (genvar n = 0; n < NUM_NCO; n++) begin : g_sub
      localparam int D = c * NUM_NCO + n;
      logic mix_v;
      iq_t  mix_d;
      iq_t  chain_d;

      iq_mixer #(.IN_W(ADC_W), .NCO_W(NCO_W), .OUT_W(DATA_W)) u_mix (
        .clk, .rst_n,
        .in_valid(running && adc_valid && !sync), .x(adc[c]),
        .cos_i(nco_cos[n]), .sin_i(nco_sin[n]),
        .out_valid(mix_v), .i_o(mix_d.i), .q_o(mix_d.q)
      );

      ddc_chain #(
        .CFIR_TAPS(CFIR_TAPS), .CFIR_LANES(CFIR_LANES),
        .PFIR_TAPS(PFIR_TAPS), .PFIR_LANES(PFIR_LANES)
      ) u_chain (
        .clk, .rst_n, .sync,
        .rate(cfg.cic_rate), .gain(cfg.gain),
        .in_valid(mix_v), .din(mix_d),
        .coef_we, .coef_sel, .coef_addr, .coef_data,
        .out_valid(out_wr[D]), .dout(chain_d),
        .gain_sat(gain_sat[D]), .overrun(fir_overrun[D])
      );

      out_fifo #(.WIDTH($bits(iq_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst_n,
        .wr_en(out_wr[D]), .din(chain_d),
        .rd_en(out_rd[D]), .dout(out_iq[D]),
        .empty(out_empty[D]), .full(out_full[D]), .overflow(fifo_overflow[D])
      );
    end
  end

endmodule
