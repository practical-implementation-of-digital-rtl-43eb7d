// out_fifo -- synchronous first-word-fall-through FIFO for one DDC output.
//
// Each DDC chain hands its baseband I/Q samples to the following filter-bank
// stage through a local FIFO, so the consumer may read in bursts while the
// chains keep writing on fixed clock ticks. `dout` shows the oldest entry
// whenever `empty` is low; `rd_en` removes it. A write into a full FIFO is
// dropped and `overflow` pulses; a read of an empty FIFO is ignored. DEPTH must
// be a power of two. Only the use of a FIFO is taken from the published design;
// depth and flags are this design's choice.
//
// Timing: a written word is visible (empty low) the clock after the write.
module out_fifo #(
  parameter int WIDTH = 48,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow
);

  localparam int AW = $clog2(DEPTH);

  initial assert (DEPTH >= 2 && 2 ** AW == DEPTH) else $error("out_fifo: DEPTH must be a power of two");

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;   // one extra bit tells full from empty
  logic             do_wr, do_rd;

  assign empty = (wp == rp);
  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

endmodule
