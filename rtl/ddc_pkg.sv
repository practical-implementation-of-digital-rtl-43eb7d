// ddc_pkg -- widths, complex sample types and configuration records shared by
// the wideband direction-finder digital down converter (DDC).
//
// The sample clock is 120 MHz and every ADC delivers one real 16-bit sample per
// clock. Each module has four numerically controlled oscillators (NCOs); every
// channel is mixed with all four, and each product runs through its own chain
// CIC -> coarse gain -> CFIR (/2) -> PFIR (/2). The 16-bit ADC width, the four
// NCOs and the CIC rates 5/10/20/40 follow the published design; the internal
// widths (24-bit data, 18-bit coefficients, 32-bit phase) are this design's own
// choice, sized for the 18x25 multipliers of common FPGA DSP slices.
package ddc_pkg;

  localparam int ADC_W     = 16;  // ADC sample width
  localparam int NCO_W     = 16;  // NCO sine/cosine width
  localparam int PHASE_W   = 32;  // NCO phase accumulator width
  localparam int DATA_W    = 24;  // mixer output and FIR data width
  localparam int CIC_OUT_W = 32;  // MSBs kept at the CIC output
  localparam int GAIN_W    = 20;  // coarse gain word, unsigned
  localparam int GAIN_FRAC = 8;   // fractional bits of the gain word (gain 1.0 = 256)
  localparam int COEF_W    = 18;  // FIR coefficient width, signed
  localparam int COEF_FRAC = 17;  // fractional bits of a coefficient (1.0 = 2^17)
  localparam int NUM_NCO   = 4;   // sub-band NCOs per module
  localparam int CFIR_TAPS_DEF = 384;
  localparam int PFIR_TAPS_DEF = 64;
  localparam int COEF_AW   = 9;   // coefficient address bus, covers the longer filter

  // One complex sample on the filter data path.
  typedef struct packed {
    logic signed [DATA_W-1:0] i;
    logic signed [DATA_W-1:0] q;
  } iq_t;

  // Run-time CIC decimation factor (5 gives the 20 MHz instantaneous bandwidth).
  typedef enum logic [1:0] {
    CIC_R5  = 2'd0,
    CIC_R10 = 2'd1,
    CIC_R20 = 2'd2,
    CIC_R40 = 2'd3
  } cic_rate_e;

  function automatic int unsigned cic_rate_value(cic_rate_e r);
    case (r)
      CIC_R5:  return 5;
      CIC_R10: return 10;
      CIC_R20: return 20;
      default: return 40;
    endcase
  endfunction

  // Frequency tuning word and phase offset of one NCO (units: 2^-32 cycle).
  typedef struct packed {
    logic [PHASE_W-1:0] ftw;
    logic [PHASE_W-1:0] poff;
  } nco_cfg_t;

  // Run-time configuration shared by all DDC chains of a module.
  typedef struct packed {
    nco_cfg_t [NUM_NCO-1:0] nco;
    cic_rate_e              cic_rate;
    logic [GAIN_W-1:0]      gain;
  } ddc_cfg_t;

  // Coefficient load bus: one write per clock into the CFIR or PFIR bank.
  typedef enum logic {
    SEL_CFIR = 1'b0,
    SEL_PFIR = 1'b1
  } coef_sel_e;

endpackage
