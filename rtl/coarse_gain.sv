// coarse_gain -- programmable gain after the CIC decimator.
//
// The CIC keeps only the top bits of its full-growth register, so at small
// decimation factors a weak signal leaves it badly attenuated. This stage
// multiplies both rails by an unsigned fixed-point gain word (GAIN_FRAC
// fractional bits, so 2^GAIN_FRAC is unity), rounds half up and saturates to
// OUT_W bits. `sat` pulses for any output sample that had to be clipped. The
// multiply follows the published description ("multiplying complex CIC output
// signal with gain value"); word widths and rounding are this design's choice.
//
// Timing: one register stage; out_valid follows in_valid one clock later.
module coarse_gain #(
  parameter int IN_W      = 32,
  parameter int GAIN_W    = 20,
  parameter int GAIN_FRAC = 8,
  parameter int OUT_W     = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [GAIN_W-1:0]       gain,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q,
  output logic                    sat
);

  localparam int PW = IN_W + GAIN_W + 1;
  typedef logic signed [PW-1:0] prod_t;
  localparam prod_t MAXV = prod_t'(2 ** (OUT_W - 1) - 1);
  localparam prod_t MINV = -prod_t'(2 ** (OUT_W - 1));

  logic signed [GAIN_W:0] g_s;
  assign g_s = $signed({1'b0, gain});

  // Scaled, rounded value before clipping.
  function automatic prod_t scale(logic signed [IN_W-1:0] v, logic signed [GAIN_W:0] g);
    prod_t p;
    p = prod_t'(v) * prod_t'(g);
    if (GAIN_FRAC > 0) p = (p + prod_t'(2 ** (GAIN_FRAC - 1))) >>> GAIN_FRAC;
    return p;
  endfunction

  function automatic logic signed [OUT_W-1:0] clip(prod_t p);
    if (p > MAXV)      return OUT_W'(MAXV);
    else if (p < MINV) return OUT_W'(MINV);
    else               return OUT_W'(p);
  endfunction

  prod_t si, sq;
  assign si = scale(in_i, g_s);
  assign sq = scale(in_q, g_s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i <= '0;
      out_q <= '0;
      sat <= 1'b0;
    end else begin
      out_valid <= in_valid;
      sat       <= 1'b0;
      if (in_valid) begin
        out_i <= clip(si);
        out_q <= clip(sq);
        sat   <= (si > MAXV) || (si < MINV) || (sq > MAXV) || (sq < MINV);
      end
    end
  end

endmodule
