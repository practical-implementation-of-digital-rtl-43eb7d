// tb_cic_decimator -- self-checking test of the complex CIC decimator.
//
// For decimation factors 5, 10, 20 and 40 the test feeds random full-scale
// 24-bit I and Q samples (with and without idle clocks between them) and
// compares every output with a reference built independently: the CIC impulse
// response h = (box of R*M ones) convolved N times, applied by direct
// convolution to the stored input. Output k is expected to equal
// floor(y[(k+1)*R - 1 - (N-1)] / 2^(REG_W-OUT_W)), i.e. the top 32 bits of the
// 62-bit full-growth value, and exactly one output must come per R inputs. A
// DC input checks the gain (R*M)^N explicitly.
module tb_cic_decimator;
  import ddc_pkg::*;
  localparam int N = 6, M = 2, IN_W = 24, OUT_W = 32;
  localparam int REG_W = 62;
  localparam int SH = REG_W - OUT_W;

  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, in_valid = 1'b0;
  cic_rate_e rate = CIC_R5;
  logic signed [IN_W-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;

  cic_decimator #(.N(N), .M(M), .R_MAX(40), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [];
  longint xi [$], xq [$];
  int nout;

  function automatic void make_h(int r);
    longint t [];
    int len;
    h = new [1];
    h[0] = 1;
    for (int s = 0; s < N; s++) begin
      len = h.size() + r * M - 1;
      t = new [len];
      foreach (t[j]) t[j] = 0;
      foreach (h[j]) for (int b = 0; b < r * M; b++) t[j + b] += h[j];
      h = t;
    end
  endfunction

  function automatic longint ref_y(ref longint x [$], input int n);
    longint acc = 0;
    for (int j = 0; j < h.size(); j++)
      if (n - j >= 0 && n - j < x.size()) acc += h[j] * x[n - j];
    return acc;
  endfunction

  // Compare outputs as they appear.
  int cur_r;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint yi, yq;
      int n;
      n  = (nout + 1) * cur_r - 1 - (N - 1);
      yi = ref_y(xi, n) >>> SH;
      yq = ref_y(xq, n) >>> SH;
      checks++;
      if (longint'(out_i) != yi || longint'(out_q) != yq) begin
        failures++;
        if (failures < 10) $display("R=%0d out %0d: got %0d/%0d exp %0d/%0d", cur_r, nout, out_i, out_q, yi, yq);
      end
      nout++;
    end
  end

  task automatic run_rate(cic_rate_e r, int nin, bit gaps, bit dc);
    rate  = r;
    cur_r = int'(cic_rate_value(r));
    make_h(cur_r);
    @(negedge clk); sync = 1'b1;
    @(negedge clk); sync = 1'b0;
    xi.delete(); xq.delete(); nout = 0;
    for (int n = 0; n < nin; n++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) @(negedge clk);
      in_valid = 1'b1;
      in_i = dc ? 24'sd8000000 : IN_W'($urandom);
      in_q = dc ? -24'sd8388608 : IN_W'($urandom);
      xi.push_back(longint'(in_i));
      xq.push_back(longint'(in_q));
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (N + 4) @(negedge clk);
    checks++;
    if (nout != nin / cur_r) begin
      failures++;
      $display("R=%0d: %0d outputs for %0d inputs", cur_r, nout, nin);
    end
    if (dc) begin
      longint g = 1;
      for (int s = 0; s < N; s++) g *= longint'(cur_r * M);
      checks++;
      if (longint'(out_i) != ((longint'(8000000) * g) >>> SH) || longint'(out_q) != ((-longint'(8388608) * g) >>> SH)) begin
        failures++;
        $display("R=%0d DC gain: got %0d/%0d", cur_r, out_i, out_q);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_rate(CIC_R5, 1000, 0, 0);
    run_rate(CIC_R10, 1000, 1, 0);
    run_rate(CIC_R20, 1200, 0, 0);
    run_rate(CIC_R40, 2400, 0, 0);
    run_rate(CIC_R5, 400, 0, 1);
    run_rate(CIC_R40, 1200, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
