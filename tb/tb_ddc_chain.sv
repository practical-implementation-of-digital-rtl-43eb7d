// tb_ddc_chain -- self-checking test of one DDC chain
// (CIC -> coarse gain -> CFIR /2 -> PFIR /2) at its default sizes.
//
// The testbench designs its own filters: windowed-sinc low-pass coefficients
// (CFIR: 384 taps, Blackman window, cut-off 3 MHz at 24 MS/s; PFIR: 64 taps,
// Hamming window, cut-off 2.8 MHz at 12 MS/s), computed with $sin/$cos and
// loaded through the coefficient bus. With a complex input on every 120 MHz
// clock it then checks:
//  * DC: the settled output equals the value worked out stage by stage
//    (floor(c*(R*M)^N / 2^30), gain and round, then the two FIR sums);
//  * rate: one output per 20, 40, 80 and 160 inputs at CIC rates 5, 10, 20, 40;
//  * a 1 MHz complex tone comes through with the gain expected from the CIC
//    droop, and a 5 MHz tone (outside the +/-3 MHz channel) is suppressed by
//    more than 40 dB;
//  * a large gain word makes `gain_sat` pulse.
module tb_ddc_chain;
  import ddc_pkg::*;
  localparam real PI = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, in_valid = 1'b0;
  cic_rate_e rate = CIC_R5;
  logic [GAIN_W-1:0] gain = 20'd256;
  iq_t din = '0;
  logic coef_we = 1'b0;
  coef_sel_e coef_sel = SEL_CFIR;
  logic [COEF_AW-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic out_valid, gain_sat, overrun;
  iq_t dout;
  int checks = 0, failures = 0, nsat = 0, novr = 0;
  longint cyc = 0;

  ddc_chain dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hc [CFIR_TAPS_DEF], hp [PFIR_TAPS_DEF];
  longint sum_c, sum_p;

  // Windowed-sinc low-pass, scaled to 2^17 at DC (centre tap absorbs rounding).
  task automatic lp_design(ref longint h [], input int taps, input real fc, input bit blackman, output longint s);
    real c = real'(taps - 1) / 2.0;
    real w, t, v;
    s = 0;
    for (int k = 0; k < taps; k++) begin
      t = real'(k) - c;
      w = blackman ? 0.42 - 0.5 * $cos(2.0 * PI * k / (taps - 1)) + 0.08 * $cos(4.0 * PI * k / (taps - 1))
                   : 0.54 - 0.46 * $cos(2.0 * PI * k / (taps - 1));
      v = (t == 0.0) ? 2.0 * fc : $sin(2.0 * PI * fc * t) / (PI * t);
      h[k] = longint'($rtoi(v * w * 131072.0 + (v * w >= 0 ? 0.5 : -0.5)));
      s += h[k];
    end
    h[taps / 2] += 131072 - s;
    s = 131072;
  endtask

  task automatic load(coef_sel_e sel, ref longint h [], input int taps);
    for (int k = 0; k < taps; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_sel = sel; coef_addr = COEF_AW'(k); coef_data = COEF_W'(h[k]);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // Output log.
  longint t_last, spacing_bad, nout;
  int want_spacing;
  real mag_acc; int mag_n;
  always @(negedge clk) begin
    if (gain_sat) nsat++;
    if (overrun) novr++;
    if (out_valid) begin
      if (nout > 4 && want_spacing > 0 && cyc - t_last != want_spacing) spacing_bad++;
      t_last = cyc;
      nout++;
      mag_acc += $sqrt(real'(dout.i) * real'(dout.i) + real'(dout.q) * real'(dout.q));
      mag_n++;
    end
  end

  task automatic restart(cic_rate_e r, logic [GAIN_W-1:0] g, int spacing);
    rate = r; gain = g;
    @(negedge clk); sync = 1'b1;
    @(negedge clk); sync = 1'b0;
    nout = 0; spacing_bad = 0; want_spacing = spacing;
  endtask

  // n samples of a complex tone (f in units of the input rate) or DC.
  task automatic drive(int n, real f, real amp, longint dci, longint dcq, bit tone);
    for (int k = 0; k < n; k++) begin
      in_valid = 1'b1;
      if (tone) begin
        din.i = DATA_W'($rtoi(amp * $cos(2.0 * PI * f * k)));
        din.q = DATA_W'($rtoi(amp * $sin(2.0 * PI * f * k)));
      end else begin
        din.i = DATA_W'(dci); din.q = DATA_W'(dcq);
      end
      if (k == n - 400) begin mag_acc = 0.0; mag_n = 0; end
      @(negedge clk);
    end
  endtask

  function automatic longint fir_dc(longint x, longint s);
    longint r = (x * s + 65536) >>> 17;
    if (r > 8388607) r = 8388607;
    if (r < -8388608) r = -8388608;
    return r;
  endfunction

  function automatic longint dc_expect(longint c, int r, longint g);
    longint cic, gg, p;
    p = 1;
    for (int s = 0; s < 6; s++) p *= longint'(r * 2);
    cic = (c * p) >>> 30;
    gg = (cic * g + 128) >>> 8;
    if (gg > 8388607) gg = 8388607;
    if (gg < -8388608) gg = -8388608;
    return fir_dc(fir_dc(gg, sum_c), sum_p);
  endfunction

  task automatic check_dc(longint ci, longint cq, int r, longint g);
    checks++;
    if (longint'(dout.i) != dc_expect(ci, r, g) || longint'(dout.q) != dc_expect(cq, r, g)) begin
      failures++;
      $display("DC R=%0d: got %0d/%0d exp %0d/%0d", r, dout.i, dout.q, dc_expect(ci, r, g), dc_expect(cq, r, g));
    end
  endtask

  task automatic check_rate(int n_in, int per);
    checks++;
    if (spacing_bad != 0 || nout < n_in / per - 2 || nout > n_in / per) begin
      failures++;
      $display("rate 1/%0d: %0d outputs for %0d inputs, %0d bad spacings", per, nout, n_in, spacing_bad);
    end
  endtask

  initial begin
    longint dyn_h [];
    real m_pass, m_stop, expect_pass, droop;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    dyn_h = new [CFIR_TAPS_DEF];
    lp_design(dyn_h, CFIR_TAPS_DEF, 3.0 / 24.0, 1, sum_c);
    foreach (hc[k]) hc[k] = dyn_h[k];
    load(SEL_CFIR, dyn_h, CFIR_TAPS_DEF);
    dyn_h = new [PFIR_TAPS_DEF];
    lp_design(dyn_h, PFIR_TAPS_DEF, 2.8 / 12.0, 0, sum_p);
    foreach (hp[k]) hp[k] = dyn_h[k];
    load(SEL_PFIR, dyn_h, PFIR_TAPS_DEF);

    // DC at rate 5, gain 1024
    restart(CIC_R5, 20'd262144, 20);
    drive(6000, 0.0, 0.0, 3000000, -1500000, 0);
    check_dc(3000000, -1500000, 5, 262144);
    check_rate(6000, 20);
    // passband tone 1 MHz
    restart(CIC_R5, 20'd262144, 20);
    drive(6000, 1.0 / 120.0, 2097152.0, 0, 0, 1);
    m_pass = mag_acc / mag_n;
    droop = $pow($sin(PI * 10.0 / 120.0) / (10.0 * $sin(PI / 120.0)), 6.0);
    expect_pass = 2097152.0 * 1.0e6 / 1073741824.0 * 1024.0 * droop;
    checks++;
    if (m_pass < 0.9 * expect_pass || m_pass > 1.1 * expect_pass) begin
      failures++; $display("passband magnitude %f, expected about %f", m_pass, expect_pass);
    end
    // stopband tone 5 MHz
    restart(CIC_R5, 20'd262144, 20);
    drive(6000, 5.0 / 120.0, 2097152.0, 0, 0, 1);
    m_stop = mag_acc / mag_n;
    checks++;
    if (m_stop > 0.01 * m_pass) begin
      failures++; $display("stopband magnitude %f vs passband %f", m_stop, m_pass);
    end
    $display("1 MHz magnitude %0.1f (expected %0.1f), 5 MHz magnitude %0.2f", m_pass, expect_pass, m_stop);
    // DC at rate 10, unity gain
    restart(CIC_R10, 20'd256, 40);
    drive(8000, 0.0, 0.0, -2500000, 700000, 0);
    check_dc(-2500000, 700000, 10, 256);
    check_rate(8000, 40);
    // DC at rates 20 and 40 (narrowest bandwidths), gain words for unity overall gain
    restart(CIC_R20, 20'd67, 80);
    drive(24000, 0.0, 0.0, 4000000, -3000000, 0);
    check_dc(4000000, -3000000, 20, 67);
    check_rate(24000, 80);
    restart(CIC_R40, 20'd1, 160);
    drive(40000, 0.0, 0.0, -5000000, 6000000, 0);
    check_dc(-5000000, 6000000, 40, 1);
    check_rate(40000, 160);
    // clipping in the coarse gain
    checks++;
    if (nsat != 0) begin failures++; $display("unexpected gain saturation"); end
    restart(CIC_R10, 20'hFFFFF, 40);
    drive(800, 0.0, 0.0, 3000000, 0, 0);
    in_valid = 1'b0;
    checks++;
    if (nsat == 0) begin failures++; $display("gain saturation never flagged"); end
    checks++;
    if (novr != 0) begin failures++; $display("FIR overrun at the nominal rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
