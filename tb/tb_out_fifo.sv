// tb_out_fifo -- self-checking test of the output FIFO.
//
// Random writes and reads (with phases that fill it and drain it) are checked
// against a queue model: the head word, empty and full on every clock, and the
// overflow pulse on every write into a full FIFO, whose word must be dropped.
module tb_out_fifo;
  localparam int WIDTH = 48, DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0] din = '0, dout;
  logic empty, full, overflow;
  int checks = 0, failures = 0, novf = 0, nfull = 0;

  out_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] q [$];

  initial begin
    bit exp_ovf;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 8000; n++) begin
      int pw;
      @(negedge clk);
      // compare the visible state with the model
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || (q.size() > 0 && dout != q[0])) begin
        failures++;
        if (failures < 10) $display("n=%0d size=%0d empty=%0b full=%0b dout=%h", n, q.size(), empty, full, dout);
      end
      if (full) nfull++;
      pw = ((n / 500) % 2 == 0) ? 80 : 20;   // alternate filling and draining
      wr_en = ($urandom_range(0, 99) < pw);
      rd_en = ($urandom_range(0, 99) < 50);
      din   = {$urandom, 16'($urandom)};
      exp_ovf = wr_en && (q.size() == DEPTH);
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && !exp_ovf) q.push_back(din);
      #1;
      checks++;
      if (overflow != exp_ovf) begin failures++; $display("overflow flag wrong at n=%0d", n); end
      if (overflow) novf++;
    end
    checks++;
    if (novf == 0 || nfull == 0) begin failures++; $display("full/overflow never reached"); end
    $display("overflows %0d", novf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
