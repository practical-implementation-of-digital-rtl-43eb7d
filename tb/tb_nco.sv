// tb_nco -- self-checking test of the NCO.
//
// Runs the oscillator with several tuning words and phase offsets after a
// `sync`, and compares cos/sin on every clock with A*cos(2*pi*phase/2^32) and
// A*sin(...) computed in floating point, where phase = k*ftw + poff and k is
// the number of enabled clocks since the sync, taken ITER+2 clocks earlier (the
// documented latency). Errors above 4 LSB fail. Also checks that the phase
// holds while `en` is low.
module tb_nco;
  localparam int ITER = 16;
  localparam int LAT  = ITER + 2;
  localparam real AMP = 32766.0;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, sync = 1'b0;
  logic [31:0] ftw = '0, poff = '0;
  logic signed [15:0] cos_o, sin_o;
  int checks = 0, failures = 0;
  int worst = 0;

  nco #(.PHASE_W(32), .OUT_W(16), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase history: acc value after each clock edge, modelled independently.
  logic [31:0] hist [$];
  logic [31:0] acc_m;

  task automatic check_now();
    logic [31:0] ph;
    real a, ec, es;
    int dc, ds;
    if (hist.size() < LAT + 1) return;
    ph = hist[hist.size() - 1 - LAT] + poff;
    a  = TWO_PI * real'(ph) / 4294967296.0;
    ec = AMP * $cos(a);
    es = AMP * $sin(a);
    dc = int'(real'(cos_o) - ec); if (dc < 0) dc = -dc;
    ds = int'(real'(sin_o) - es); if (ds < 0) ds = -ds;
    checks++;
    if (dc > worst) worst = dc;
    if (ds > worst) worst = ds;
    if (dc > 4 || ds > 4) begin
      failures++;
      if (failures < 10) $display("mismatch phase=%h cos=%0d exp=%f sin=%0d exp=%f", ph, cos_o, ec, sin_o, es);
    end
  endtask

  task automatic run_case(logic [31:0] f, logic [31:0] p, int n, bit gaps);
    ftw  = f;
    poff = p;
    // sync pulse
    @(negedge clk); sync = 1'b1; en = 1'b1;
    @(posedge clk); acc_m = '0;
    #1 hist.delete(); hist.push_back(acc_m);
    @(negedge clk); sync = 1'b0;
    for (int c = 0; c < n; c++) begin
      if (gaps) en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) acc_m = acc_m + ftw;
      hist.push_back(acc_m);
      @(negedge clk);
      check_now();
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_case(32'd1163220309, 32'd0, 2000, 0);           // 32.5 MHz at 120 MHz
    run_case(32'd787410671, 32'h4000_0000, 2000, 0);    // 22 MHz, +90 degrees
    run_case(32'hF000_0000, 32'h1234_5678, 2000, 0);    // negative frequency
    run_case(32'd12345679, 32'd0, 3000, 1);             // slow, with enable gaps
    for (int r = 0; r < 5; r++) run_case($urandom, $urandom, 1000, 1);
    $display("worst error %0d LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
