// tb_ddc_module -- self-checking test of one FPGA module's DDC bank
// (3 channels x 4 sub-bands, default sizes).
//
// The four NCOs are tuned to 22.5, 27.5, 32.5 and 37.5 MHz, so the four 6 MS/s
// sub-bands of a channel tile 20 MHz around 30 MHz. Every channel receives the
// same 31 MHz tone, quantised to 16 bits, each with its own phase (as the
// antennas of a direction finder would see it). After PLL lock and the start
// trigger the testbench reads every FIFO and checks:
//  * nothing is written before the trigger, and all 12 chains write on the
//    same clock ticks, one output per 20 clocks;
//  * the tone appears at -1.5 MHz in sub-band 2 of every channel with the
//    magnitude expected from mixer, CIC droop and gain (within 10 %), and is
//    at least 40 dB down in the sub-bands it does not fall into;
//  * between channels, the sub-band-2 outputs differ in phase by the input
//    phase difference (within 1 degree) and in amplitude by less than 3 %.
module tb_ddc_module;
  import ddc_pkg::*;
  localparam int CH = 3;
  localparam int ND = CH * NUM_NCO;
  localparam real PI = 3.141592653589793;
  localparam real FS = 120.0e6;
  localparam real AMP = 16000.0;

  logic clk = 1'b0, rst_n = 1'b0, pll_locked = 1'b0, start_trig = 1'b0;
  logic signed [ADC_W-1:0] adc [CH];
  logic adc_valid = 1'b1;
  ddc_cfg_t cfg;
  logic coef_we = 1'b0;
  coef_sel_e coef_sel = SEL_CFIR;
  logic [COEF_AW-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic [ND-1:0] out_rd;
  iq_t out_iq [ND];
  logic [ND-1:0] out_empty, out_full, out_wr, fifo_overflow, gain_sat, fir_overrun;
  logic running, armed;
  int checks = 0, failures = 0;
  longint cyc = 0, n_adc = 0;

  ddc_module dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC model: 31 MHz tone, per-channel phase.
  localparam real PHI [CH] = '{0.0, 0.7, -2.1};
  always @(posedge clk) begin
    for (int c = 0; c < CH; c++)
      adc[c] <= ADC_W'($rtoi(AMP * $cos(2.0 * PI * 31.0e6 / FS * real'(n_adc) + PHI[c])));
    n_adc <= n_adc + 1;
  end

  // Same windowed-sinc filters as in the chain test.
  task automatic load_lp(coef_sel_e sel, int taps, real fc, bit blackman);
    real c = real'(taps - 1) / 2.0, w, t, v;
    longint h [], s;
    h = new [taps];
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
    for (int k = 0; k < taps; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_sel = sel; coef_addr = COEF_AW'(k); coef_data = COEF_W'(h[k]);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  function automatic logic [31:0] ftw_of(real f);
    return 32'($rtoi(f / FS * 4294967296.0 + 0.5));
  endfunction

  // Reader: drain every FIFO; keep the last 200 samples of each DDC.
  iq_t last [ND][$];
  int nwr_before = 0, nsplit = 0, nwrites = 0, bad_spacing = 0;
  longint t_wr = -1;
  assign out_rd = ~out_empty;
  always @(negedge clk) begin
    if (rst_n) begin
      if (!running && out_wr != '0) nwr_before++;
      if (out_wr != '0 && out_wr != '1) nsplit++;
      if (out_wr == '1) begin
        if (t_wr >= 0 && nwrites > 4 && cyc - t_wr != 20) bad_spacing++;
        t_wr = cyc;
        nwrites++;
      end
      for (int d = 0; d < ND; d++)
        if (!out_empty[d]) begin
          last[d].push_back(out_iq[d]);
          if (last[d].size() > 200) void'(last[d].pop_front());
        end
    end
  end

  function automatic real mag(iq_t z);
    return $sqrt(real'(z.i) * real'(z.i) + real'(z.q) * real'(z.q));
  endfunction

  initial begin
    real m [ND], expect_m, droop, dphi, ratio, ref_phi;
    cfg = '0;
    cfg.nco[0].ftw = ftw_of(22.5e6);
    cfg.nco[1].ftw = ftw_of(27.5e6);
    cfg.nco[2].ftw = ftw_of(32.5e6);
    cfg.nco[3].ftw = ftw_of(37.5e6);
    cfg.cic_rate = CIC_R5;
    cfg.gain = 20'd262144;   // x1024
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_lp(SEL_CFIR, CFIR_TAPS_DEF, 3.0 / 24.0, 1);
    load_lp(SEL_PFIR, PFIR_TAPS_DEF, 2.8 / 12.0, 0);
    repeat (20) @(negedge clk);
    start_trig = 1'b1;            // ignored: no lock yet
    repeat (50) @(negedge clk);
    start_trig = 1'b0;
    pll_locked = 1'b1;
    repeat (50) @(negedge clk);
    start_trig = 1'b1;
    repeat (8000) @(negedge clk);

    checks++;
    if (nwr_before != 0 || nsplit != 0 || bad_spacing != 0 || nwrites < 350) begin
      failures++;
      $display("writes before start %0d, split ticks %0d, bad spacing %0d, writes %0d", nwr_before, nsplit, bad_spacing, nwrites);
    end
    for (int d = 0; d < ND; d++) begin
      m[d] = 0.0;
      foreach (last[d][k]) m[d] += mag(last[d][k]);
      m[d] /= real'(last[d].size());
    end
    droop = $pow($sin(PI * 10.0 * 1.5 / 120.0) / (10.0 * $sin(PI * 1.5 / 120.0)), 6.0);
    expect_m = AMP * 32766.0 / 128.0 / 2.0 * 1.0e6 / 1073741824.0 * 1024.0 * droop;
    for (int c = 0; c < CH; c++) begin
      checks++;
      if (m[c*4+2] < 0.9 * expect_m || m[c*4+2] > 1.1 * expect_m) begin
        failures++; $display("ch %0d sub-band 2 magnitude %f, expected %f", c, m[c*4+2], expect_m);
      end
      for (int n = 0; n < 4; n++) if (n != 2) begin
        checks++;
        if (m[c*4+n] > 0.01 * expect_m) begin
          failures++; $display("ch %0d sub-band %0d leaks %f", c, n, m[c*4+n]);
        end
      end
    end
    // coherence between channels, sample by sample
    for (int c = 1; c < CH; c++) begin
      real worst_p, worst_a;
      worst_p = 0.0;
      worst_a = 0.0;
      for (int k = 0; k < 100; k++) begin
        iq_t a, b;
        a = last[c*4+2][k];
        b = last[2][k];
        // arg(a * conj(b))
        dphi = $atan2(real'(a.q) * real'(b.i) - real'(a.i) * real'(b.q),
                      real'(a.i) * real'(b.i) + real'(a.q) * real'(b.q));
        ref_phi = PHI[c] - PHI[0];
        dphi = dphi - ref_phi;
        while (dphi > PI) dphi -= 2.0 * PI;
        while (dphi < -PI) dphi += 2.0 * PI;
        if (dphi < 0.0) dphi = -dphi;
        if (dphi > worst_p) worst_p = dphi;
        ratio = mag(a) / mag(b) - 1.0;
        if (ratio < 0.0) ratio = -ratio;
        if (ratio > worst_a) worst_a = ratio;
      end
      checks++;
      if (worst_p * 180.0 / PI > 1.0 || worst_a > 0.03) begin
        failures++;
        $display("ch %0d vs ch 0: phase error %f deg, amplitude error %f", c, worst_p * 180.0 / PI, worst_a);
      end
      $display("ch %0d vs ch 0: worst phase error %0.4f deg, amplitude %0.4f %%", c, worst_p * 180.0 / PI, worst_a * 100.0);
    end
    checks++;
    if (fifo_overflow != '0 || fir_overrun != '0) begin failures++; $display("unexpected flag"); end
    $display("sub-band magnitudes ch0: %0.1f %0.1f %0.1f %0.1f (expected %0.1f in sub-band 2)", m[0], m[1], m[2], m[3], expect_m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
