// tb_wdf_ddc_top -- end-to-end test of the two-module, five-channel DDC system
// at its default sizes (3 + 2 channels, 4 sub-bands, 20 DDC outputs).
//
// As in a bench test of a coherent direction finder, one test signal is split
// to channel 0 of module A and channel 0 of module B: an AM signal (31 MHz
// carrier, 60 kHz, 50 % modulation). Channel 1 of both modules gets a 24 MHz
// tone, channel 2 of module A random noise. The two modules lock their PLLs at
// different times but share the trigger. The testbench drains all 20 FIFOs and
// checks that
//  * every DDC of module B produces, sample for sample and on the same clock
//    tick, exactly the output of the matching DDC of module A (the two modules
//    are coherent);
//  * the AM signal lands in sub-band 2 and the 24 MHz tone in sub-band 0, with
//    the other sub-bands at least 40 dB down;
//  * the outputs come one per 20 clocks at CIC rate 5 and one per 40 after
//    switching to rate 10;
//  * a gain word that is too large makes the coarse gain clip;
//  * a reader that stops makes a FIFO overflow;
//  * losing PLL lock stops a module, and a new trigger restarts it.
// Each of these mechanisms is counted; one that never happens is a failure.
module tb_wdf_ddc_top;
  import ddc_pkg::*;
  localparam int CH_A = 3, CH_B = 2;
  localparam int ND_A = CH_A * NUM_NCO, ND_B = CH_B * NUM_NCO;
  localparam real PI = 3.141592653589793;
  localparam real FS = 120.0e6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pll_locked_a = 1'b0, pll_locked_b = 1'b0, start_trig = 1'b0;
  ddc_cfg_t cfg;
  logic coef_we = 1'b0;
  coef_sel_e coef_sel = SEL_CFIR;
  logic [COEF_AW-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic signed [ADC_W-1:0] adc_a [CH_A];
  logic signed [ADC_W-1:0] adc_b [CH_B];
  logic adc_valid_a = 1'b1, adc_valid_b = 1'b1;
  logic [ND_A-1:0] out_rd_a;
  logic [ND_B-1:0] out_rd_b;
  iq_t out_iq_a [ND_A];
  iq_t out_iq_b [ND_B];
  logic [ND_A-1:0] out_empty_a, out_full_a, out_wr_a, fifo_overflow_a, gain_sat_a, fir_overrun_a;
  logic [ND_B-1:0] out_empty_b, out_full_b, out_wr_b, fifo_overflow_b, gain_sat_b, fir_overrun_b;
  logic running_a, running_b, armed_a, armed_b;
  int checks = 0, failures = 0;
  longint cyc = 0, n_adc = 0;

  wdf_ddc_top dut (.*);

  always #4.1667 clk = ~clk;   // 120 MHz
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC models: the same analog signals reach both modules.
  always @(posedge clk) begin
    real t, am, tone;
    t = real'(n_adc) / FS;
    am   = 12000.0 * (1.0 + 0.5 * $cos(2.0 * PI * 60.0e3 * t)) * $cos(2.0 * PI * 31.0e6 * t);
    tone = 15000.0 * $cos(2.0 * PI * 24.0e6 * t + 0.4);
    adc_a[0] <= ADC_W'($rtoi(am));
    adc_b[0] <= ADC_W'($rtoi(am));
    adc_a[1] <= ADC_W'($rtoi(tone));
    adc_b[1] <= ADC_W'($rtoi(tone));
    adc_a[2] <= ADC_W'(int'($urandom) >>> 18);
    n_adc <= n_adc + 1;
  end

  task automatic load_lp(coef_sel_e sel, int taps, real fc, bit blackman);
    real c, w, t, v;
    longint h [], s;
    c = real'(taps - 1) / 2.0;
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

  // Mechanism counters.
  int n_start = 0, n_coef_load = 0, n_rate5 = 0, n_rate10 = 0, n_sat = 0, n_ovf = 0, n_stop = 0, n_restart = 0;
  // Checking state.
  bit stall_a11 = 1'b0;      // reader of module A DDC 11 stops
  bit compare_ab = 1'b1;
  int mism = 0, ncmp = 0, tick_mism = 0, bad_spacing = 0, want_spacing = 20;
  longint t_wr = -1;
  int nw_run = 0;
  real pw_a [ND_A];
  int  npw = 0;
  bit  measure = 1'b0;
  bit  ra_d = 1'b0, rb_d = 1'b0;

  always_comb begin
    out_rd_a = ~out_empty_a;
    out_rd_b = ~out_empty_b;
    if (stall_a11) out_rd_a[11] = 1'b0;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (running_a && !ra_d) n_start++;
      if (!running_b && rb_d) n_stop++;
      if (running_b && !rb_d && n_stop > 0) n_restart++;
      ra_d = running_a; rb_d = running_b;
      if (gain_sat_a != '0 || gain_sat_b != '0) n_sat++;
      if (fifo_overflow_a != '0 || fifo_overflow_b != '0) n_ovf++;
      if (compare_ab) begin
        // both modules write on the same ticks
        if (out_wr_a[ND_B-1:0] != out_wr_b) tick_mism++;
        for (int d = 0; d < ND_B; d++)
          if (!out_empty_a[d] && !out_empty_b[d]) begin
            ncmp++;
            if (out_iq_a[d] != out_iq_b[d]) mism++;
          end else if (out_empty_a[d] != out_empty_b[d]) mism++;
      end
      if (out_wr_a[0] && running_a) begin
        if (t_wr >= 0 && nw_run > 3 && cyc - t_wr != want_spacing) bad_spacing++;
        if (t_wr >= 0 && nw_run > 3 && cyc - t_wr == 20) n_rate5++;
        if (t_wr >= 0 && nw_run > 3 && cyc - t_wr == 40) n_rate10++;
        t_wr = cyc;
        nw_run++;
      end
      if (measure) begin
        for (int d = 0; d < ND_A; d++)
          if (!out_empty_a[d]) pw_a[d] += real'(out_iq_a[d].i) * real'(out_iq_a[d].i) + real'(out_iq_a[d].q) * real'(out_iq_a[d].q);
        if (!out_empty_a[0]) npw++;
      end
    end
  end

  initial begin
    cfg = '0;
    cfg.nco[0].ftw = ftw_of(22.5e6);
    cfg.nco[1].ftw = ftw_of(27.5e6);
    cfg.nco[2].ftw = ftw_of(32.5e6);
    cfg.nco[3].ftw = ftw_of(37.5e6);
    cfg.nco[1].poff = 32'h2000_0000;
    cfg.cic_rate = CIC_R5;
    cfg.gain = 20'd131072;   // x512
    foreach (pw_a[d]) pw_a[d] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_lp(SEL_CFIR, CFIR_TAPS_DEF, 3.0 / 24.0, 1); n_coef_load++;
    load_lp(SEL_PFIR, PFIR_TAPS_DEF, 2.8 / 12.0, 0); n_coef_load++;
    pll_locked_a = 1'b1;
    repeat (37) @(negedge clk);
    pll_locked_b = 1'b1;
    repeat (20) @(negedge clk);
    checks++;
    if (!armed_a || !armed_b || running_a || running_b) begin failures++; $display("modules not armed before the trigger"); end
    start_trig = 1'b1;
    // run at CIC rate 5; measure sub-band powers once the filters have settled
    repeat (4000) @(negedge clk);
    measure = 1'b1;
    repeat (4000) @(negedge clk);
    measure = 1'b0;
    begin
      real p_am, p_tone;
      p_am = pw_a[2];
      p_tone = pw_a[4];
      checks++;
      if (npw < 150 || p_am == 0.0 || p_tone == 0.0) begin failures++; $display("no output measured"); end
      for (int n = 0; n < 4; n++) begin
        if (n != 2) begin
          checks++;
          if (pw_a[n] > 1.0e-4 * p_am) begin failures++; $display("AM leaks into sub-band %0d: %e vs %e", n, pw_a[n], p_am); end
        end
        if (n != 0) begin
          checks++;
          if (pw_a[4 + n] > 1.0e-4 * p_tone) begin failures++; $display("tone leaks into sub-band %0d: %e vs %e", n, pw_a[4 + n], p_tone); end
        end
      end
      $display("ch0 sub-band powers: %e %e %e %e", pw_a[0], pw_a[1], pw_a[2], pw_a[3]);
      $display("ch1 sub-band powers: %e %e %e %e", pw_a[4], pw_a[5], pw_a[6], pw_a[7]);
    end
    // reader of module A DDC 11 stalls: its FIFO must overflow
    stall_a11 = 1'b1;
    repeat (20 * 24) @(negedge clk);
    stall_a11 = 1'b0;
    // coarse gain too large: clipping
    cfg.gain = 20'hFFFFF;
    repeat (400) @(negedge clk);
    cfg.gain = 20'd131072;
    // switch to CIC rate 10 (10 MHz bandwidth); restart both modules together
    // by dropping lock on both and re-triggering
    start_trig = 1'b0;
    cfg.cic_rate = CIC_R10;
    want_spacing = 40;
    pll_locked_a = 1'b0; pll_locked_b = 1'b0;
    @(negedge clk);
    pll_locked_a = 1'b1; pll_locked_b = 1'b1;
    nw_run = 0; t_wr = -1;
    repeat (10) @(negedge clk);
    start_trig = 1'b1;
    repeat (4000) @(negedge clk);
    // module B alone loses lock: it stops, and restarts on a new trigger
    compare_ab = 1'b0;
    pll_locked_b = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (running_b || !running_a) begin failures++; $display("lock loss not handled"); end
    pll_locked_b = 1'b1;
    start_trig = 1'b0;
    repeat (10) @(negedge clk);
    start_trig = 1'b1;
    repeat (400) @(negedge clk);

    checks++;
    if (mism != 0 || tick_mism != 0 || ncmp < 1000) begin
      failures++; $display("module A/B differ: %0d of %0d samples, %0d ticks", mism, ncmp, tick_mism);
    end
    checks++;
    if (bad_spacing != 0) begin failures++; $display("%0d outputs off the 1/20 or 1/40 rate", bad_spacing); end
    checks++;
    if (fir_overrun_a != '0 || fir_overrun_b != '0) begin failures++; $display("FIR overrun"); end
    $display("compared %0d A/B sample pairs, %0d mismatches", ncmp, mism);
    $display("starts %0d, coefficient loads %0d, 1/20 outputs %0d, 1/40 outputs %0d, gain clips %0d, FIFO overflows %0d, stops %0d, restarts %0d",
             n_start, n_coef_load, n_rate5, n_rate10, n_sat, n_ovf, n_stop, n_restart);
    checks++; if (n_start < 2)     begin failures++; $display("start never seen twice"); end
    checks++; if (n_coef_load < 2) begin failures++; $display("coefficients not loaded"); end
    checks++; if (n_rate5 == 0)    begin failures++; $display("rate 5 never seen"); end
    checks++; if (n_rate10 == 0)   begin failures++; $display("rate 10 never seen"); end
    checks++; if (n_sat == 0)      begin failures++; $display("gain clipping never seen"); end
    checks++; if (n_ovf == 0)      begin failures++; $display("FIFO overflow never seen"); end
    checks++; if (n_stop == 0)     begin failures++; $display("stop on lock loss never seen"); end
    checks++; if (n_restart == 0)  begin failures++; $display("restart never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
