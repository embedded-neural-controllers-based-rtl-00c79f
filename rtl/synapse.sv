// synapse: weighted connection with temporal Hebbian learning.
//
// Passes an arriving pre-synaptic spike to the soma as its weight (psp = w in
// the step of the spike, 0 otherwise), so the weight sets the height of the
// post-synaptic potential. The synapse time-stamps the first pre-synaptic spike
// and the first post-synaptic (axonal) spike of the frame. On the learn strobe,
// if learning is enabled and both spikes occurred, it moves the weight by the
// spike-time difference dt = t_post - t_pre, following the published rule:
//   0 <= dt <= WIN_NEAR         : increase sharply      (+INC_SHARP)
//   WIN_NEAR < dt <= WIN_FAR    : increase moderately   (+INC_MOD)
//   dt > WIN_FAR                : weaken slightly       (-DEC_SLIGHT)
//   dt < 0 (pre after post)     : decrease heavily      (-DEC_HEAVY)
// The windows (5 and 10 steps) are the published ones; the step sizes are this
// design's choice, a stepwise stand-in for the bell-shaped learning curve.
// The weight saturates at 0 and 2**WW-1 (overflow and underflow protection).
// The weight can be loaded (w_we) and read back (weight) at any time; a load
// wins over a learning update in the same cycle.
//
// Timing: psp is combinational; time stamps and weight update on the clock.
module synapse
  import snn_pkg::*;
#(
  parameter int unsigned WW         = W_W,          // weight width
  parameter int unsigned TW         = DELAY_W + 1,  // time stamp width
  parameter int unsigned W_INIT     = 128,          // weight after reset
  parameter int unsigned WIN_NEAR   = 5,
  parameter int unsigned WIN_FAR    = 10,
  parameter int unsigned INC_SHARP  = 8,
  parameter int unsigned INC_MOD    = 4,
  parameter int unsigned DEC_SLIGHT = 1,
  parameter int unsigned DEC_HEAVY  = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,       // new frame: forget both time stamps
  input  logic [TW-1:0] t,           // current time step
  input  logic          pre_spike,   // from the input neuron
  input  logic          post_spike,  // axonal spike of the output neuron
  input  logic          learn,       // end-of-frame learning strobe
  input  logic          learn_en,    // learning enabled for this synapse
  input  logic          w_we,        // load a weight
  input  logic [WW-1:0] w_wdata,
  output logic [WW-1:0] psp,         // weighted value to the soma
  output logic [WW-1:0] weight       // stored weight
);
  localparam int WMAX = 2 ** WW - 1;

  logic          pre_seen, post_seen;
  logic [TW-1:0] t_pre, t_post;
  logic [WW-1:0] w_next;

  assign psp    = pre_spike ? weight : '0;

  // Learning rule with saturation
  always_comb begin
    int dt, wn;
    dt = int'(t_post) - int'(t_pre);
    wn = int'(weight);
    if (dt < 0)                   wn = wn - int'(DEC_HEAVY);
    else if (dt <= int'(WIN_NEAR)) wn = wn + int'(INC_SHARP);
    else if (dt <= int'(WIN_FAR))  wn = wn + int'(INC_MOD);
    else                          wn = wn - int'(DEC_SLIGHT);
    if (wn < 0)         wn = 0;
    else if (wn > WMAX) wn = WMAX;
    w_next = WW'(wn);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_seen  <= 1'b0;
      post_seen <= 1'b0;
      t_pre     <= '0;
      t_post    <= '0;
      weight    <= WW'(W_INIT);
    end else begin
      if (clear) begin
        pre_seen  <= 1'b0;
        post_seen <= 1'b0;
      end else begin
        if (pre_spike && !pre_seen) begin
          pre_seen <= 1'b1;
          t_pre    <= t;
        end
        if (post_spike && !post_seen) begin
          post_seen <= 1'b1;
          t_post    <= t;
        end
      end
      if (w_we)                                         weight <= w_wdata;
      else if (learn && learn_en && pre_seen && post_seen) weight <= w_next;
    end
  end
endmodule
