// cic_decimator -- complex cascaded integrator-comb (Hogenauer) decimator.
//
// N integrators run at the input rate, a rate changer keeps one sample in R,
// and N combs with differential delay M run at the output rate, giving
// H(z) = ((1 - z^-RM) / (1 - z^-1))^N with no multipliers. R is chosen at run
// time from 5/10/20/40 (`rate`); 5 takes the 120 MHz input to 24 MHz for the
// 20 MHz instantaneous bandwidth. N = 6 and M = 2 are this design's reading of
// the published CIC magnitude response (nulls every 12 MHz at 120 MHz input,
// first sidelobe near -78 dB).
//
// Registers are REG_W = IN_W + ceil(N*log2(R_MAX*M)) bits, so no rate can
// overflow (wrap-around in the integrators cancels in the combs). The output is
// the top OUT_W bits of that register, which matches full scale at R = 40; at
// smaller R the output is smaller by (40/R)^N, which the coarse gain stage after
// the CIC makes up for.
//
// `sync` clears every state and the decimation counter so that all chains
// decimate on the same clock tick. The integrators are pipelined (each adds the
// previous stage's registered value), which delays the response by N-1 input
// samples: output k is the filter response at input (k+1)*R - 1 - (N-1),
// counting inputs from the sync. Timing: out_valid rises N+1 clocks after the
// in_valid that completes a group of R inputs.
module cic_decimator
  import ddc_pkg::*;
#(
  parameter int N     = 6,
  parameter int M     = 2,
  parameter int R_MAX = 40,
  parameter int IN_W  = 24,
  parameter int OUT_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sync,
  input  cic_rate_e               rate,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);

  // Bits of growth: smallest g with 2^g >= (R_MAX*M)^N.
  function automatic int growth_bits(int r, int m, int n);
    longint unsigned p;
    int g;
    p = 1;
    for (int k = 0; k < n; k++) p = p * longint'(r * m);
    g = 0;
    while ((longint'(1) << g) < p) g++;
    return g;
  endfunction

  localparam int REG_W = IN_W + growth_bits(R_MAX, M, N);
  localparam int SH    = REG_W - OUT_W;

  initial assert (SH >= 0 && N >= 2) else $error("cic_decimator: need N >= 2 and OUT_W <= register width");

  typedef logic signed [REG_W-1:0] reg_t;

  reg_t integ_i [N], integ_q [N];
  reg_t comb_i  [N+1], comb_q [N+1];       // comb_x[k] is the input of comb stage k
  reg_t dly_i   [N][M], dly_q [N][M];
  logic comb_v  [N+1];
  logic [$clog2(R_MAX)-1:0] cnt;
  logic [$clog2(R_MAX)-1:0] r_last;

  assign r_last = ($clog2(R_MAX))'(cic_rate_value(rate) - 1);

  // Integrators and rate changer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin integ_i[k] <= '0; integ_q[k] <= '0; end
      cnt       <= '0;
      comb_v[0] <= 1'b0;
      comb_i[0] <= '0;
      comb_q[0] <= '0;
    end else if (sync) begin
      for (int k = 0; k < N; k++) begin integ_i[k] <= '0; integ_q[k] <= '0; end
      cnt       <= '0;
      comb_v[0] <= 1'b0;
    end else begin
      comb_v[0] <= 1'b0;
      if (in_valid) begin
        integ_i[0] <= integ_i[0] + reg_t'(in_i);
        integ_q[0] <= integ_q[0] + reg_t'(in_q);
        for (int k = 1; k < N; k++) begin
          integ_i[k] <= integ_i[k] + integ_i[k-1];
          integ_q[k] <= integ_q[k] + integ_q[k-1];
        end
        if (cnt >= r_last) begin
          cnt       <= '0;
          comb_v[0] <= 1'b1;
          comb_i[0] <= integ_i[N-1] + integ_i[N-2];  // value the last integrator takes this clock
          comb_q[0] <= integ_q[N-1] + integ_q[N-2];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // Combs, one register stage each.
  for (genvar k = 0; k < N; k++) begin : g_comb
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        comb_v[k+1] <= 1'b0;
        comb_i[k+1] <= '0;
        comb_q[k+1] <= '0;
        for (int j = 0; j < M; j++) begin dly_i[k][j] <= '0; dly_q[k][j] <= '0; end
      end else if (sync) begin
        comb_v[k+1] <= 1'b0;
        for (int j = 0; j < M; j++) begin dly_i[k][j] <= '0; dly_q[k][j] <= '0; end
      end else begin
        comb_v[k+1] <= comb_v[k];
        if (comb_v[k]) begin
          comb_i[k+1] <= comb_i[k] - dly_i[k][M-1];
          comb_q[k+1] <= comb_q[k] - dly_q[k][M-1];
          dly_i[k][0] <= comb_i[k];
          dly_q[k][0] <= comb_q[k];
          for (int j = 1; j < M; j++) begin
            dly_i[k][j] <= dly_i[k][j-1];
            dly_q[k][j] <= dly_q[k][j-1];
          end
        end
      end
    end
  end

  assign out_valid = comb_v[N];
  assign out_i     = comb_i[N][REG_W-1 -: OUT_W];
  assign out_q     = comb_q[N][REG_W-1 -: OUT_W];

endmodule
