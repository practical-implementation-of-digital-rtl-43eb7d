// tb_acq_ctrl -- self-checking test of the acquisition start controller.
//
// Checks that a trigger before PLL lock is ignored; that after lock the first
// rising edge of the trigger gives exactly one `sync` clock and raises `run`,
// both three clocks after the edge; that a trigger held high or pulsed again
// while running causes no further sync; that losing lock drops `run`; and that
// after relock a new trigger edge is needed.
module tb_acq_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, pll_locked = 1'b0, start_trig = 1'b0;
  logic run, sync, armed;
  int checks = 0, failures = 0, nsync = 0;
  longint cyc = 0, sync_cyc = -1;

  acq_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (sync) begin nsync++; sync_cyc = cyc; end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(bit e_run, bit e_armed, string what);
    checks++;
    if (run != e_run || armed != e_armed) begin
      failures++;
      $display("%s: run=%0b armed=%0b, expected %0b %0b", what, run, armed, e_run, e_armed);
    end
  endtask

  initial begin
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // trigger without lock
    start_trig = 1'b1; repeat (5) @(negedge clk); start_trig = 1'b0;
    repeat (5) @(negedge clk);
    expect_state(0, 0, "no lock");
    checks++; if (nsync != 0) begin failures++; $display("sync without lock"); end
    // lock, then trigger
    pll_locked = 1'b1;
    repeat (3) @(negedge clk);
    expect_state(0, 1, "armed");
    start_trig = 1'b1; t0 = cyc;
    repeat (2) @(negedge clk);
    expect_state(0, 1, "before sync");
    @(negedge clk);
    expect_state(1, 0, "running");
    #1;
    checks++;
    if (nsync != 1 || sync_cyc != t0 + 3) begin failures++; $display("sync count %0d at %0d (edge at %0d)", nsync, sync_cyc, t0); end
    // trigger held, then pulsed again while running
    repeat (10) @(negedge clk);
    start_trig = 1'b0; repeat (4) @(negedge clk);
    start_trig = 1'b1; repeat (4) @(negedge clk); start_trig = 1'b0;
    repeat (4) @(negedge clk);
    expect_state(1, 0, "still running");
    checks++; if (nsync != 1) begin failures++; $display("extra sync while running"); end
    // lose lock while the trigger is high
    start_trig = 1'b1; repeat (4) @(negedge clk);
    pll_locked = 1'b0;
    @(negedge clk);
    expect_state(0, 0, "lock lost");
    // relock with trigger still high: needs a new edge
    pll_locked = 1'b1;
    repeat (6) @(negedge clk);
    expect_state(0, 1, "relocked, trigger level only");
    start_trig = 1'b0; @(negedge clk);
    start_trig = 1'b1; repeat (4) @(negedge clk);
    expect_state(1, 0, "restarted");
    #1;
    checks++; if (nsync != 2) begin failures++; $display("restart sync count %0d", nsync); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
