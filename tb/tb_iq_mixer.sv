// tb_iq_mixer -- self-checking test of the quadrature mixer.
//
// Drives random 16-bit samples and random NCO values (including the extremes)
// and checks one clock later that I = floor(x*cos / 128) and
// Q = floor(-x*sin / 128), that out_valid follows in_valid by one clock and
// that the outputs hold when in_valid is low.
module tb_iq_mixer;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] x = '0, cos_i = '0, sin_i = '0;
  logic out_valid;
  logic signed [23:0] i_o, q_o;
  int checks = 0, failures = 0;

  iq_mixer #(.IN_W(16), .NCO_W(16), .OUT_W(24)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] pick(int k);
    case (k % 6)
      0: return 16'sd32767;
      1: return -16'sd32768;
      2: return 16'sd32766;
      3: return -16'sd32766;
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    longint ei, eq;
    logic signed [23:0] hold_i, hold_q;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      x     = pick($urandom_range(0, 11));
      cos_i = pick($urandom_range(2, 11));   // the NCO never reaches -32768
      sin_i = pick($urandom_range(2, 11));
      if (cos_i == -16'sd32768) cos_i = -16'sd32766;
      if (sin_i == -16'sd32768) sin_i = -16'sd32766;
      ei = (longint'(x) * longint'(cos_i)) >>> 7;
      eq = (-(longint'(x) * longint'(sin_i))) >>> 7;
      hold_i = i_o; hold_q = q_o;
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("valid mismatch"); end
      if (in_valid) begin
        checks++;
        if (longint'(i_o) != ei || longint'(q_o) != eq) begin
          failures++;
          if (failures < 10) $display("x=%0d cos=%0d sin=%0d I=%0d exp %0d Q=%0d exp %0d", x, cos_i, sin_i, i_o, ei, q_o, eq);
        end
      end else begin
        checks++;
        if (i_o != hold_i || q_o != hold_q) begin failures++; $display("output changed without in_valid"); end
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
