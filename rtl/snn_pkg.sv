// snn_pkg: shared constants, types and the receptive-field delay formula of the
// pseudo-RBF spiking network.
//
// The network encodes each 8-bit input variable with 16 overlapping triangular
// receptive fields. A field's activation (0..35 at its peak) is mapped onto a
// spike delay of 0..15 time steps: the strongest stimulation fires at step 0,
// an unstimulated neuron fires at the end of the frame (step 15). The sizes
// (2 inputs, 16 fields, 3 output neurons, 8-bit weights, 4-bit delays, the
// 0..35 activation range scaled to 15) follow the published design. The placement of
// the field centres and the half-width of the triangles are this design's own
// choice, picked so that each input value stimulates three or four neurons.
//
// rf_delay(k, x) is the formula the encoding memories are filled with:
//   c_k   = k * RF_SPACING                       (centre of field k)
//   r     = RF_PEAK - |x - c_k| * RF_PEAK / RF_HALF   if |x - c_k| < RF_HALF, else 0
//   delay = DMAX - (r * DMAX + RF_PEAK/2) / RF_PEAK   (rounded, DMAX = 15)
package snn_pkg;

  // Network sizes
  localparam int unsigned N_INPUTS = 2;   // input variables
  localparam int unsigned N_RF     = 16;  // receptive fields (input neurons) per variable
  localparam int unsigned N_OUT    = 3;   // output neurons (somas)
  localparam int unsigned X_W      = 8;   // width of an input variable
  localparam int unsigned DELAY_W  = 4;   // width of a spike delay (frame of 16 steps)
  localparam int unsigned W_W      = 8;   // width of a synaptic weight

  // Receptive field shape
  localparam int unsigned RF_PEAK    = 35;  // activation at a field's centre
  localparam int unsigned RF_HALF    = 30;  // distance at which activation reaches 0
  localparam int unsigned RF_SPACING = 17;  // distance between neighbouring centres

  // Phase of the time frame, produced by frame_ctrl
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,  // waiting for a new input sample
    PH_LOAD   = 3'd1,  // encoding memories deliver the delays
    PH_RUN    = 3'd2,  // time steps 0..15: input spikes, integration
    PH_SETTLE = 3'd3,  // one extra step to integrate spikes of step 15
    PH_LEARN  = 3'd4   // weight update strobe
  } phase_e;

  // Spike delay of receptive field k for input value x (see header).
  function automatic logic [DELAY_W-1:0] rf_delay(input int unsigned k, input int unsigned x);
    int unsigned c, dabs, r, dmax;
    dmax = (1 << DELAY_W) - 1;
    c    = k * RF_SPACING;
    dabs = (x > c) ? (x - c) : (c - x);
    if (dabs < RF_HALF) r = RF_PEAK - (dabs * RF_PEAK) / RF_HALF;
    else                r = 0;
    return DELAY_W'(dmax - (r * dmax + RF_PEAK / 2) / RF_PEAK);
  endfunction

endpackage
