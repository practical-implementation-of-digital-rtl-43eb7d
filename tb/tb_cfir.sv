// tb_cfir -- self-checking test of the decimate-by-2 FIR engine in its CFIR
// configuration (384 taps, 48 lanes).
//
// Random coefficients are loaded, random complex samples arrive every SPACING
// clocks (5 clocks: 24 MS/s into the CFIR at a 120 MHz clock), and each
// output is compared with sum_k h[k]*x[n-k], n = 1, 3, 5, ... counted from the
// sync, rounded (+2^16, >>17) and clipped to 24 bits, all computed in the
// testbench. Also checked: the output latency of NCYC+2 clocks after the second
// sample of each pair; a coefficient rewritten between outputs is used from the
// next output on; samples from before a sync count as zero; inputs on every clock
// make `overrun` pulse and drop outputs.
module tb_cfir;
  localparam int TAPS = 384, LANES = 48, SPACING = 5;
  localparam int NCYC = (TAPS + LANES - 1) / LANES;
  localparam int AW = $clog2(TAPS);

  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, in_valid = 1'b0;
  logic signed [23:0] in_i = '0, in_q = '0;
  logic coef_we = 1'b0;
  logic [AW-1:0] coef_addr = '0;
  logic signed [17:0] coef_data = '0;
  logic out_valid, overrun;
  logic signed [23:0] out_i, out_q;
  int checks = 0, failures = 0, novr = 0, nout = 0, nsat = 0;
  longint cyc = 0;

  fir_decim2 #(.TAPS(TAPS), .LANES(LANES), .DATA_W(24), .COEF_W(18), .COEF_FRAC(17), .OUT_W(24)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [TAPS];
  longint xi [$], xq [$];
  longint exp_i [$], exp_q [$], exp_t [$];
  bit check_latency = 1'b1;

  function automatic longint rs(longint v);
    longint r = (v + (longint'(1) << 16)) >>> 17;
    if (r > 8388607) r = 8388607;
    if (r < -8388608) r = -8388608;
    return r;
  endfunction

  task automatic load_coef(int a, longint v);
    @(negedge clk);
    coef_we = 1'b1; coef_addr = AW'(a); coef_data = 18'(v);
    h[a] = longint'(coef_data);
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (overrun) novr++;
      if (out_valid && !check_latency) nout++;
      else if (out_valid) begin
        nout++;
        checks++;
        if (exp_i.size() == 0) begin
          failures++; $display("unexpected output");
        end else begin
          longint ei, eq, et;
          ei = exp_i.pop_front(); eq = exp_q.pop_front(); et = exp_t.pop_front();
          if (longint'(out_i) != ei || longint'(out_q) != eq) begin
            failures++;
            if (failures < 10) $display("out %0d: got %0d/%0d exp %0d/%0d", nout, out_i, out_q, ei, eq);
          end
          if (longint'(out_i) == 8388607 || longint'(out_i) == -8388608) nsat++;
          if (check_latency) begin
            checks++;
            if (cyc != et + NCYC + 2) begin
              failures++;
              if (failures < 10) $display("latency %0d, expected %0d", cyc - et, NCYC + 2);
            end
          end
        end
      end
    end
  end

  task automatic send(int n, int spacing, int amp_bits);
    for (int s = 0; s < n; s++) begin
      in_valid = 1'b1;
      in_i = 24'(int'($urandom) >>> (32 - amp_bits));
      in_q = 24'(int'($urandom) >>> (32 - amp_bits));
      xi.push_back(longint'(in_i));
      xq.push_back(longint'(in_q));
      if (xi.size() % 2 == 0) begin
        longint ai = 0, aq = 0;
        int last = xi.size() - 1;
        for (int k = 0; k < TAPS; k++)
          if (last - k >= 0) begin
            ai += h[k] * xi[last - k];
            aq += h[k] * xq[last - k];
          end
        exp_i.push_back(rs(ai)); exp_q.push_back(rs(aq)); exp_t.push_back(cyc + 1);
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (spacing - 1) @(negedge clk);
    end
  endtask

  task automatic do_sync();
    @(negedge clk); sync = 1'b1;
    @(negedge clk); sync = 1'b0;
    xi.delete(); xq.delete();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) load_coef(k, longint'($signed(14'($urandom))));
    do_sync();
    send(600, SPACING, 24);
    // rewrite a few coefficients while samples flow
    for (int j = 0; j < 4; j++) begin
      repeat (NCYC + 3) @(negedge clk);   // let the running computation finish
      load_coef($urandom_range(0, TAPS - 1), longint'($signed(18'($urandom))));
      send(20, SPACING, 24);
    end
    repeat (NCYC + 5) @(negedge clk);
    // restart: old samples must count as zero
    do_sync();
    send(300, SPACING, 20);
    repeat (NCYC + 5) @(negedge clk);
    checks++;
    if (exp_i.size() != 0) begin failures++; $display("%0d outputs missing", exp_i.size()); end
    // overrun: one input per clock is faster than the engine
    exp_i.delete(); exp_q.delete(); exp_t.delete();
    check_latency = 1'b0;
    do_sync();
    fork
      begin
        for (int s = 0; s < 40; s++) begin
          in_valid = 1'b1; in_i = 24'($urandom); in_q = 24'($urandom);
          @(negedge clk);
        end
        in_valid = 1'b0;
      end
    join
    repeat (NCYC + 5) @(negedge clk);
    checks++;
    if (novr == 0) begin failures++; $display("overrun never flagged"); end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("outputs %0d, overruns %0d, saturated %0d", nout, novr, nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
