// input_neuron: one receptive-field input neuron.
//
// A small state machine (IDLE -> WAIT -> DONE) that turns a delay from the
// encoding memory into exactly one pre-synaptic spike per time frame, as the
// document requires ("each input neuron is allowed to emit a single spike
// during the encoding time frame"). On load it takes the delay d; during the
// time steps (step = 1) it counts down and raises spike for one cycle in time
// step d. A neuron whose field is not stimulated holds d = 15 and so fires at
// the end of the frame. The count-down realisation is this design's choice.
//
// Timing: load in the cycle before time step 0; spike is combinational from
// the state and is high in time step d (0..15).
module input_neuron
  import snn_pkg::*;
#(
  parameter int unsigned DW = DELAY_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,    // take delay, arm the neuron
  input  logic [DW-1:0] delay,   // spike time within the frame
  input  logic          step,    // one time step of the frame elapses
  output logic          spike    // pre-synaptic spike
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DONE} state_e;

  state_e        state;
  logic [DW-1:0] cnt;

  assign spike = (state == S_WAIT) && step && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else if (load) begin
      state <= S_WAIT;
      cnt   <= delay;
    end else if (step && state == S_WAIT) begin
      if (cnt == '0) state <= S_DONE;
      else           cnt   <= cnt - 1'b1;
    end
  end

  // A neuron fires at most once until it is loaded again
  a_single_spike: assert property (@(posedge clk) disable iff (!rst_n)
    spike && !load |=> state == S_DONE);
endmodule
