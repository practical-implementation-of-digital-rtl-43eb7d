// fir_decim2 -- complex decimate-by-2 FIR filter with reloadable coefficients.
//
// The same engine serves as the compensation FIR (CFIR), which flattens the
// CIC passband droop, and as the programmable channel FIR (PFIR); both halve the
// sample rate. The I and Q rails share one set of TAPS coefficients, loaded one
// per clock through coef_we/coef_addr/coef_data. A write takes effect on the
// next clock; a write while an output is being computed may mix old and new
// values in that one output, so reload between outputs or before `sync`. Coefficients are signed, COEF_FRAC
// fractional bits.
//
// Operation: each input sample is written into a circular buffer of at least
// TAPS+2 entries. Every second input (the 2nd, 4th, ... after `sync`) starts a
// computation of y = sum_k h[k] * x[n-k] over the newest TAPS samples, LANES
// taps per clock (2*LANES multipliers), so one output takes
// NCYC = ceil(TAPS/LANES) clocks. Samples from before the last `sync` count as
// zero. The sum is rounded half up, shifted right by COEF_FRAC and saturated to
// OUT_W bits. Time-sharing the multipliers over the many clocks each output
// sample allows mirrors how FPGA FIR cores are built; the structure, sizes and
// rounding are this design's choice, not taken from the published design.
//
// Timing: out_valid rises NCYC+2 clocks after the in_valid of the second
// sample of a pair. Inputs must come at least (NCYC+1)/2 clocks apart on
// average; a computation requested while the previous one is still running is
// dropped and `overrun` pulses. With the 120 MHz clock the defaults leave ample
// margin: CFIR 384 taps / 48 lanes needs 8 of the 10 clocks between its 12 MHz
// outputs, PFIR 64 taps / 4 lanes 16 of 20.
module fir_decim2 #(
  parameter int TAPS      = 384,
  parameter int LANES     = 48,
  parameter int DATA_W    = 24,
  parameter int COEF_W    = 18,
  parameter int COEF_FRAC = 17,
  parameter int OUT_W     = 24,
  localparam int AW       = $clog2(TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sync,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  input  logic                     coef_we,
  input  logic [AW-1:0]            coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_i,
  output logic signed [OUT_W-1:0]  out_q,
  output logic                     overrun
);

  localparam int NCYC  = (TAPS + LANES - 1) / LANES;
  localparam int BW    = $clog2(TAPS + 2);   // buffer address width
  localparam int DEPTH = 2 ** BW;
  localparam int CW    = $clog2(NCYC + 1);
  localparam int NW    = $clog2(TAPS + 1);
  localparam int ACC_W = DATA_W + COEF_W + $clog2(TAPS) + 1;

  typedef logic signed [ACC_W-1:0] acc_t;

  logic signed [COEF_W-1:0] coef  [TAPS];
  logic signed [DATA_W-1:0] buf_i [DEPTH];
  logic signed [DATA_W-1:0] buf_q [DEPTH];

  logic [BW-1:0] wp;          // next write address
  logic          phase;       // 1: the next input completes a pair
  logic [NW-1:0] nsamp;       // samples since sync, saturating at TAPS
  logic          start_req;
  logic [BW-1:0] start_base;
  logic [NW-1:0] start_n;

  logic          busy;
  logic [CW-1:0] cyc;
  logic [BW-1:0] base;        // address of x[n]
  logic [NW-1:0] navail;      // taps k < navail hold real samples
  acc_t          acc_i, acc_q;
  logic          done;

  // Coefficient bank.
  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_addr] <= coef_data;
  end

  // Sample buffer and pairing.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      buf_i[wp] <= in_i;
      buf_q[wp] <= in_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; phase <= 1'b0; nsamp <= '0;
      start_req <= 1'b0; start_base <= '0; start_n <= '0;
    end else if (sync) begin
      phase <= 1'b0; nsamp <= '0; start_req <= 1'b0;
    end else begin
      start_req <= 1'b0;
      if (in_valid) begin
        wp    <= wp + 1'b1;
        phase <= ~phase;
        if (nsamp < NW'(TAPS)) nsamp <= nsamp + 1'b1;
        if (phase) begin
          start_req  <= 1'b1;
          start_base <= wp;
          start_n    <= (nsamp < NW'(TAPS)) ? nsamp + 1'b1 : nsamp;
        end
      end
    end
  end

  // Multiply-accumulate over LANES taps per clock.
  acc_t lane_i, lane_q;
  always_comb begin
    lane_i = '0;
    lane_q = '0;
    for (int l = 0; l < LANES; l++) begin
      int unsigned k;
      logic [BW-1:0] a;
      k = int'(cyc) * LANES + l;
      a = base - BW'(k);
      if (k < TAPS && k < int'(navail)) begin
        lane_i += acc_t'(buf_i[a]) * acc_t'(coef[k]);
        lane_q += acc_t'(buf_q[a]) * acc_t'(coef[k]);
      end
    end
  end

  function automatic logic signed [OUT_W-1:0] round_sat(acc_t v);
    acc_t r;
    r = (v + acc_t'(2 ** (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > acc_t'(2 ** (OUT_W - 1) - 1))  return {1'b0, {(OUT_W-1){1'b1}}};
    else if (r < -acc_t'(2 ** (OUT_W - 1))) return {1'b1, {(OUT_W-1){1'b0}}};
    else                                    return r[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cyc <= '0; base <= '0; navail <= '0;
      acc_i <= '0; acc_q <= '0; done <= 1'b0; overrun <= 1'b0;
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else if (sync) begin
      busy <= 1'b0; done <= 1'b0; overrun <= 1'b0; out_valid <= 1'b0;
    end else begin
      done      <= 1'b0;
      overrun   <= 1'b0;
      out_valid <= 1'b0;
      if (busy) begin
        acc_i <= acc_i + lane_i;
        acc_q <= acc_q + lane_q;
        if (int'(cyc) == NCYC - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cyc <= cyc + 1'b1;
        end
      end
      if (start_req) begin
        if (busy && int'(cyc) != NCYC - 1) begin
          overrun <= 1'b1;
        end else begin
          busy   <= 1'b1;
          cyc    <= '0;
          base   <= start_base;
          navail <= start_n;
          acc_i  <= '0;
          acc_q  <= '0;
        end
      end
      if (done) begin
        out_valid <= 1'b1;
        out_i     <= round_sat(acc_i);
        out_q     <= round_sat(acc_q);
      end
    end
  end

endmodule
