// acq_ctrl -- start-of-acquisition control for one FPGA module.
//
// Acquisition may only begin once the module's sample-clock PLL has locked to
// the common 10 MHz reference, and then starts on the start trigger that the
// chassis distributes to every module. The trigger passes a two-flop
// synchroniser; on its rising edge the controller issues a one-clock `sync`
// pulse, which resets every NCO phase accumulator and every decimator in the
// module, and raises `run`, which enables the ADC samples into the mixers.
// Because all modules share the sample clock and the trigger, their NCOs and
// decimation phases line up on the same clock tick and all DDC outputs are
// written on the same ticks. Losing lock stops acquisition and waits for lock
// and a new trigger. States: WAIT_LOCK -> ARMED (locked) -> RUN (trigger edge).
// The gating on PLL lock and the shared trigger follow the published design;
// the synchroniser, the edge detection and the restart rule are this design's.
//
// Timing: `sync` and the first `run` clock come three clocks after the
// trigger's rising edge at the input.
module acq_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic pll_locked,
  input  logic start_trig,
  output logic run,
  output logic sync,
  output logic armed
);

  typedef enum logic [1:0] {
    WAIT_LOCK = 2'd0,
    ARMED     = 2'd1,
    RUN       = 2'd2
  } state_e;

  state_e state;
  logic [2:0] trig_sr;   // two synchroniser flops and one for edge detection
  logic       trig_rise;

  assign trig_rise = trig_sr[1] && !trig_sr[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_sr <= '0;
      state   <= WAIT_LOCK;
      sync    <= 1'b0;
    end else begin
      trig_sr <= {trig_sr[1:0], start_trig};
      sync    <= 1'b0;
      case (state)
        WAIT_LOCK: if (pll_locked) state <= ARMED;
        ARMED: begin
          if (!pll_locked) state <= WAIT_LOCK;
          else if (trig_rise) begin
            state <= RUN;
            sync  <= 1'b1;
          end
        end
        RUN:       if (!pll_locked) state <= WAIT_LOCK;
        default:   state <= WAIT_LOCK;
      endcase
    end
  end

  assign run   = (state == RUN);
  assign armed = (state == ARMED);

endmodule
