// iq_mixer -- quadrature mixer: real ADC sample times the NCO cosine and sine.
//
// I = x*cos, Q = -x*sin, so a tone at +f_nco moves to 0 Hz (complex
// down-conversion by exp(-j*2*pi*f_nco*t)). The NCO never reaches -2^(NCO_W-1),
// so the IN_W+NCO_W-bit product has one redundant sign bit; that bit and the
// LSBs below OUT_W are dropped (arithmetic shift right, i.e. truncation). With
// the default 16x16 -> 24-bit sizing seven LSBs go, well below the ADC noise. The two
// multipliers follow the published block diagram; the widths and truncation are
// this design's choice.
//
// Timing: one register stage; out_valid follows in_valid one clock later.
module iq_mixer #(
  parameter int IN_W  = 16,
  parameter int NCO_W = 16,
  parameter int OUT_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [NCO_W-1:0] cos_i,
  input  logic signed [NCO_W-1:0] sin_i,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] i_o,
  output logic signed [OUT_W-1:0] q_o
);

  localparam int PW = IN_W + NCO_W;
  localparam int SH = PW - 1 - OUT_W;  // drop the redundant sign bit and the LSBs

  initial assert (SH >= 0) else $error("iq_mixer: OUT_W too wide for the product");

  logic signed [PW-1:0] pi_w, pq_w;
  assign pi_w = x * cos_i;
  assign pq_w = -(x * sin_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      i_o <= '0;
      q_o <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_o <= OUT_W'(pi_w >>> SH);
        q_o <= OUT_W'(pq_w >>> SH);
      end
    end
  end

endmodule
