// nco -- numerically controlled oscillator producing cosine and sine.
//
// A PHASE_W-bit phase accumulator adds the frequency tuning word `ftw` on every
// clock with `en` high, so the output frequency is ftw / 2^PHASE_W times the
// sample clock (a negative, i.e. two's-complement, word tunes below zero).
// `poff` is added to the accumulated phase, and `sync` clears the accumulator so
// that every NCO in every module restarts at phase zero on the same clock tick;
// this keeps all DDC channels coherent, as direction finding by phase needs.
//
// The sine/cosine generator is a pipelined CORDIC in rotation mode: the top
// ANG_W bits of the phase are folded into [-pi/2, pi/2) (flipping the sign of
// the result for the other half circle), then ITER shift-add micro-rotations
// turn the vector (A/K, 0) by that angle. No table of sine values is needed;
// only the ITER arctangent constants atan(2^-i)/(2*pi)*2^24 are stored. The
// published design uses a vendor DDS core; the CORDIC is this design's choice
// and meets the same interface (tuning word, phase offset, cos/sin out).
//
// Timing: cos/sin reflect the accumulator value of ITER+2 clocks earlier.
// Amplitude A = 2^(OUT_W-1)-2; error is a few LSB for ITER >= 14.
module nco #(
  parameter int PHASE_W = 32,
  parameter int OUT_W   = 16,
  parameter int ITER    = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,    // advance the phase this clock
  input  logic                      sync,  // clear the phase accumulator
  input  logic [PHASE_W-1:0]        ftw,   // frequency tuning word
  input  logic [PHASE_W-1:0]        poff,  // phase offset
  output logic signed [OUT_W-1:0]   cos_o,
  output logic signed [OUT_W-1:0]   sin_o
);

  localparam int ANG_W = 24;           // CORDIC angle resolution
  localparam int G     = 3;            // fractional guard bits of x/y
  localparam int IW    = OUT_W + G + 2; // x/y width: sign, growth, guard
  localparam int AMP   = 2 ** (OUT_W - 1) - 2;
  // Start vector x0 = AMP / K, with K = prod sqrt(1 + 2^-2i) = 1.6467602.
  localparam int X0    = int'(real'(AMP) * 0.6072529350088813 * real'(2 ** G));

  typedef logic signed [ANG_W-1:0] ang_t;
  localparam ang_t ATAN [20] = '{
    24'sd2097152, 24'sd1238021, 24'sd654136, 24'sd332050, 24'sd166669,
    24'sd83416,   24'sd41718,   24'sd20860,  24'sd10430,  24'sd5215,
    24'sd2608,    24'sd1304,    24'sd652,    24'sd326,    24'sd163,
    24'sd81,      24'sd41,      24'sd20,     24'sd10,     24'sd5
  };

  initial assert (ITER >= 1 && ITER <= 20) else $error("nco: ITER must be 1..20");

  logic [PHASE_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (sync) acc <= '0;
    else if (en)   acc <= acc + ftw;
  end

  // Stage 0: add the offset and fold the angle into the right half plane.
  logic signed [IW-1:0] x [ITER+1];
  logic signed [IW-1:0] y [ITER+1];
  ang_t                 z [ITER+1];
  logic                 flip [ITER+1];

  logic [PHASE_W-1:0] phase;
  ang_t               ang;
  assign phase = acc + poff;
  assign ang   = ang_t'(phase[PHASE_W-1 -: ANG_W]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; flip[0] <= 1'b0;
    end else begin
      x[0] <= IW'(X0);
      y[0] <= '0;
      // Quadrants 2 and 3 (top bits 01 or 10): rotate by angle - pi and negate.
      flip[0] <= ang[ANG_W-1] ^ ang[ANG_W-2];
      z[0]    <= (ang[ANG_W-1] ^ ang[ANG_W-2]) ? {~ang[ANG_W-1], ang[ANG_W-2:0]} : ang;
    end
  end

  // Stages 1..ITER: micro-rotations.
  for (genvar s = 0; s < ITER; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[s+1] <= '0; y[s+1] <= '0; z[s+1] <= '0; flip[s+1] <= 1'b0;
      end else begin
        flip[s+1] <= flip[s];
        if (!z[s][ANG_W-1]) begin
          x[s+1] <= x[s] - (y[s] >>> s);
          y[s+1] <= y[s] + (x[s] >>> s);
          z[s+1] <= z[s] - ATAN[s];
        end else begin
          x[s+1] <= x[s] + (y[s] >>> s);
          y[s+1] <= y[s] - (x[s] >>> s);
          z[s+1] <= z[s] + ATAN[s];
        end
      end
    end
  end

  // Output stage: undo the fold, round off the guard bits, saturate.
  function automatic logic signed [OUT_W-1:0] finish(logic signed [IW-1:0] v, logic neg);
    logic signed [IW:0] r;
    r = (neg ? -(IW+1)'(v) : (IW+1)'(v)) + (IW+1)'(2 ** (G - 1));
    r = r >>> G;
    if (r > (IW+1)'(2 ** (OUT_W - 1) - 1))       return {1'b0, {(OUT_W-1){1'b1}}};
    else if (r < -(IW+1)'(2 ** (OUT_W - 1) - 1)) return {1'b1, {(OUT_W-2){1'b0}}, 1'b1};
    else                                         return r[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      cos_o <= finish(x[ITER], flip[ITER]);
      sin_o <= finish(y[ITER], flip[ITER]);
    end
  end

endmodule
