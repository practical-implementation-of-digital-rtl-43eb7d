// tb_coarse_gain -- self-checking test of the coarse gain stage.
//
// Random 32-bit inputs and random gain words (small, unity and large) are
// applied; one clock later each rail must equal
// clip((x*gain + 128) >> 8) to the 24-bit range, `sat` must pulse exactly
// when a rail was clipped, and out_valid must follow in_valid.
module tb_coarse_gain;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [19:0] gain = '0;
  logic signed [31:0] in_i = '0, in_q = '0;
  logic out_valid, sat;
  logic signed [23:0] out_i, out_q;
  int checks = 0, failures = 0, nsat = 0;

  coarse_gain #(.IN_W(32), .GAIN_W(20), .GAIN_FRAC(8), .OUT_W(24)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(longint x, longint g, output bit clipped);
    longint p;
    p = (x * g + 128) >>> 8;
    clipped = 1'b0;
    if (p > 8388607)  begin p = 8388607;  clipped = 1'b1; end
    if (p < -8388608) begin p = -8388608; clipped = 1'b1; end
    return p;
  endfunction

  initial begin
    longint ei, eq;
    bit ci, cq;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      case ($urandom_range(0, 3))
        0: gain = 20'd256;
        1: gain = 20'($urandom_range(0, 4095));
        2: gain = 20'($urandom);
        default: gain = 20'hFFFFF;
      endcase
      case ($urandom_range(0, 2))
        0: begin in_i = 32'($urandom); in_q = 32'($urandom); end
        1: begin in_i = 32'($signed(16'($urandom))); in_q = 32'($signed(16'($urandom))); end
        default: begin in_i = 32'($signed(10'($urandom))); in_q = -32'sd2147483648; end
      endcase
      ei = model(longint'(in_i), longint'(gain), ci);
      eq = model(longint'(in_q), longint'(gain), cq);
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("valid mismatch"); end
      if (in_valid) begin
        checks++;
        if (longint'(out_i) != ei || longint'(out_q) != eq || sat != (ci || cq)) begin
          failures++;
          if (failures < 10) $display("x=%0d/%0d g=%0d got %0d/%0d sat %0d exp %0d/%0d %0d", in_i, in_q, gain, out_i, out_q, sat, ei, eq, ci || cq);
        end
        if (sat) nsat++;
      end else begin
        checks++;
        if (sat) begin failures++; $display("sat without input"); end
      end
      in_valid = 1'b0;
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturated samples: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
