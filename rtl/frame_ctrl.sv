// frame_ctrl: sequencer of the network's time frame.
//
// One input sample is processed per frame. On start (accepted only when idle)
// the encoding memories are read (rd); in PH_LOAD the input neurons take their
// delays and the somas and synapses forget the previous frame (clear); in
// PH_RUN 2**DW time steps t = 0..2**DW-1 elapse (step), in which the input
// neurons fire; PH_SETTLE adds one more integration step (t = 2**DW) so that
// spikes of the last step can still make an output neuron fire; PH_LEARN gives
// the synapses their learning strobe and marks the frame done. The published design
// fixes the 16-step frame and names a dedicated module that closes the frame;
// the load, settle and learn phases are this design's choice.
//
// Timing: start in cycle 0, load in cycle 1, steps in cycles 2..2**DW+2,
// learn and done in cycle 2**DW+3 (19 cycles per frame at DW = 4); a new start
// is accepted in the cycle after done.
module frame_ctrl
  import snn_pkg::*;
#(
  parameter int unsigned DW = DELAY_W,   // delay width: 2**DW steps per frame
  parameter int unsigned TW = DW + 1     // time stamp width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,   // new input sample available
  output logic          busy,    // frame in progress
  output logic          rd,      // read the encoding memories
  output logic          load,    // input neurons take their delays
  output logic          clear,   // somas and synapses start a new frame
  output logic          step,    // a time step elapses
  output logic [TW-1:0] t,       // current time step
  output logic          learn,   // learning strobe
  output logic          done,    // frame finished, results valid
  output phase_e        phase
);
  localparam int unsigned LAST = 2 ** DW - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      t     <= '0;
    end else begin
      unique case (phase)
        PH_IDLE:   if (start) phase <= PH_LOAD;
        PH_LOAD:   begin phase <= PH_RUN; t <= '0; end
        PH_RUN:    begin
                     t <= t + 1'b1;
                     if (t == TW'(LAST)) phase <= PH_SETTLE;
                   end
        PH_SETTLE: begin phase <= PH_LEARN; t <= t + 1'b1; end
        PH_LEARN:  phase <= PH_IDLE;
        default:   phase <= PH_IDLE;
      endcase
    end
  end

  assign busy  = (phase != PH_IDLE);
  assign rd    = (phase == PH_IDLE) && start;
  assign load  = (phase == PH_LOAD);
  assign clear = (phase == PH_LOAD);
  assign step  = (phase == PH_RUN) || (phase == PH_SETTLE);
  assign learn = (phase == PH_LEARN);
  assign done  = (phase == PH_LEARN);

  // Rules of the sequence
  a_phases_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({load, step, learn}));
  a_learn_ends_frame: assert property (@(posedge clk) disable iff (!rst_n)
    learn |=> phase == PH_IDLE);
  a_load_starts_run: assert property (@(posedge clk) disable iff (!rst_n)
    load |=> (phase == PH_RUN && t == '0));
endmodule
