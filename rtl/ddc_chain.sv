// ddc_chain -- one decimating filter chain for one complex (I/Q) signal.
//
// CIC (decimate by 5/10/20/40) -> coarse gain -> CFIR (/2) -> PFIR (/2), the
// order of the published DDC. At the main setting (CIC rate 5) a 120 MS/s
// complex input leaves at 24, 12 and finally 6 MS/s, i.e. one output every 20
// input samples. The chain holds its own CFIR and PFIR coefficient banks; the
// load bus writes the bank picked by `coef_sel`. The addresses are COEF_AW
// bits wide; the PFIR uses the low bits. Flags report coarse-gain clipping and
// FIR overruns (the latter cannot happen while the input comes at most once per
// clock with CIC rate >= 5 and the default tap and lane counts).
//
// Timing: with inputs every clock and rate 5 the first output appears after
// the 20th input plus the pipeline delay of the stages
// (CIC N+1, gain 1, each FIR NCYC+2 clocks after its second input of a pair).
module ddc_chain
  import ddc_pkg::*;
#(
  parameter int CIC_N      = 6,
  parameter int CIC_M      = 2,
  parameter int CFIR_TAPS  = ddc_pkg::CFIR_TAPS_DEF,
  parameter int CFIR_LANES = 48,
  parameter int PFIR_TAPS  = ddc_pkg::PFIR_TAPS_DEF,
  parameter int PFIR_LANES = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sync,
  input  cic_rate_e                rate,
  input  logic [GAIN_W-1:0]        gain,
  input  logic                     in_valid,
  input  iq_t                      din,
  input  logic                     coef_we,
  input  coef_sel_e                coef_sel,
  input  logic [COEF_AW-1:0]       coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  output logic                     out_valid,
  output iq_t                      dout,
  output logic                     gain_sat,
  output logic                     overrun
);

  localparam int CAW = $clog2(CFIR_TAPS);
  localparam int PAW = $clog2(PFIR_TAPS);

  initial assert (CAW <= COEF_AW && PAW <= COEF_AW)
    else $error("ddc_chain: coefficient address bus too narrow");

  logic                        cic_v;
  logic signed [CIC_OUT_W-1:0] cic_i, cic_q;
  logic                        g_v;
  iq_t                         g_d;
  logic                        c_v;
  iq_t                         c_d;
  logic                        c_ovr, p_ovr;

  cic_decimator #(
    .N(CIC_N), .M(CIC_M), .R_MAX(40), .IN_W(DATA_W), .OUT_W(CIC_OUT_W)
  ) u_cic (
    .clk, .rst_n, .sync, .rate,
    .in_valid (in_valid), .in_i (din.i), .in_q (din.q),
    .out_valid(cic_v),    .out_i(cic_i), .out_q(cic_q)
  );

  coarse_gain #(
    .IN_W(CIC_OUT_W), .GAIN_W(GAIN_W), .GAIN_FRAC(GAIN_FRAC), .OUT_W(DATA_W)
  ) u_gain (
    .clk, .rst_n, .gain,
    .in_valid (cic_v), .in_i (cic_i), .in_q (cic_q),
    .out_valid(g_v),   .out_i(g_d.i), .out_q(g_d.q), .sat(gain_sat)
  );

  fir_decim2 #(
    .TAPS(CFIR_TAPS), .LANES(CFIR_LANES), .DATA_W(DATA_W),
    .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC), .OUT_W(DATA_W)
  ) u_cfir (
    .clk, .rst_n, .sync,
    .in_valid (g_v), .in_i(g_d.i), .in_q(g_d.q),
    .coef_we  (coef_we && coef_sel == SEL_CFIR),
    .coef_addr(coef_addr[CAW-1:0]), .coef_data,
    .out_valid(c_v), .out_i(c_d.i), .out_q(c_d.q), .overrun(c_ovr)
  );

  fir_decim2 #(
    .TAPS(PFIR_TAPS), .LANES(PFIR_LANES), .DATA_W(DATA_W),
    .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC), .OUT_W(DATA_W)
  ) u_pfir (
    .clk, .rst_n, .sync,
    .in_valid (c_v), .in_i(c_d.i), .in_q(c_d.q),
    .coef_we  (coef_we && coef_sel == SEL_PFIR),
    .coef_addr(coef_addr[PAW-1:0]), .coef_data,
    .out_valid(out_valid), .out_i(dout.i), .out_q(dout.q), .overrun(p_ovr)
  );

  assign overrun = c_ovr | p_ovr;

endmodule
