// soma: leaky integrate-and-fire output neuron.
//
// In every time step the soma adds the NI weighted post-synaptic values it
// receives to its membrane potential (MP). If the new MP reaches THRESHOLD the
// neuron fires an axonal spike and the MP is reset to the hyper-polarization
// level V_HYPER, below the resting level V_REST. In a step with no incoming
// value the MP decays linearly by LEAK, but not below V_REST. All of this
// follows the published design; the threshold, leak and hyper-polarization values and
// the MP width are this design's choices. The MP returns to V_REST and the
// first-firing record is cleared at the start of each frame (clear), so every
// frame evaluates one input sample on its own.
//
// The first spike of the frame is recorded: fired and fire_time (the time
// step in which the spike is seen by the synapses).
//
// Timing: the adder tree is combinational; MP and spike are registered, so
// inputs in time step t produce a spike that is high during step t+1.
module soma
  import snn_pkg::*;
#(
  parameter int unsigned NI        = N_INPUTS * N_RF,  // inputs (synapses)
  parameter int unsigned WW        = W_W,              // input width
  parameter int unsigned TW        = DELAY_W + 1,      // time stamp width
  parameter int unsigned MPW       = 16,               // membrane potential width (signed)
  parameter int          THRESHOLD = 640,
  parameter int          V_REST    = 0,
  parameter int          V_HYPER   = -64,
  parameter int          LEAK      = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,      // new frame: MP to rest
  input  logic                  integ,      // a time step is being processed
  input  logic [TW-1:0]         t,          // current time step
  input  logic [NI-1:0][WW-1:0] psp,        // weighted inputs
  output logic                  spike,      // axonal spike
  output logic                  fired,      // spiked at least once this frame
  output logic [TW-1:0]         fire_time,  // time step of the first spike
  output logic signed [MPW-1:0] mp          // membrane potential
);
  logic [MPW-1:0]        sum;
  logic signed [MPW-1:0] mp_next;
  logic                  fire;

  always_comb begin
    sum = '0;
    for (int i = 0; i < NI; i++) sum = sum + MPW'(psp[i]);
  end

  always_comb begin
    fire    = 1'b0;
    mp_next = mp;
    if (sum == '0) begin
      if (mp > MPW'(V_REST)) begin
        if (mp - MPW'(V_REST) > MPW'(LEAK)) mp_next = mp - MPW'(LEAK);
        else                                mp_next = MPW'(V_REST);
      end
    end else begin
      mp_next = mp + $signed(sum);
      if (mp_next >= MPW'(THRESHOLD)) begin
        fire    = 1'b1;
        mp_next = MPW'(V_HYPER);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mp        <= MPW'(V_REST);
      spike     <= 1'b0;
      fired     <= 1'b0;
      fire_time <= '0;
    end else if (clear) begin
      mp        <= MPW'(V_REST);
      spike     <= 1'b0;
      fired     <= 1'b0;
    end else begin
      spike <= integ && fire;
      if (integ) mp <= mp_next;
      if (spike && !fired) begin
        fired     <= 1'b1;
        fire_time <= t;
      end
    end
  end
endmodule
