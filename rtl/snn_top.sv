// snn_top: pseudo-RBF spiking neural network (psSNN) for unsupervised
// clustering of a two-dimensional input space.
//
// Each of the NV input variables (8 bits) is encoded by an input_block into NR
// spikes whose delays reflect how close the value lies to NR overlapping
// triangular receptive fields. Every one of the NV*NR input neurons is
// connected to every one of the NO output neurons by a learning synapse
// (2 x 16 x 3 = 96 synapses with 8-bit weights at the defaults). The somas
// integrate the weighted spikes and fire; the first firing time of each output
// neuron is the network's answer: the earlier it fires, the closer the sample
// is to the pattern stored in that neuron's weights. At the end of every frame
// the synapses of the output neurons whose learn_en bit is set adapt their
// weights with the temporal Hebbian rule. Which neurons learn is left to the
// user of the network (for example only the first one to fire); the published design
// only says that the synapses have inputs to control learning.
//
// Weights can be written (w_we) and read (w_rdata) through one port that
// selects a synapse by output neuron (w_out) and input neuron (w_in =
// variable * NR + field).
//
// Debug outputs: the phase of the frame, the delays read for the current
// sample, the input spikes and the membrane potentials (16-bit signed).
//
// Timing: one frame per sample, 2**DW + 3 cycles from start to done
// (19 cycles at the defaults); out_fired/out_time are valid while done is high.
module snn_top
  import snn_pkg::*;
#(
  parameter int unsigned NV        = N_INPUTS,
  parameter int unsigned NR        = N_RF,
  parameter int unsigned NO        = N_OUT,
  parameter int unsigned XW        = X_W,
  parameter int unsigned DW        = DELAY_W,
  parameter int unsigned WW        = W_W,
  parameter int          THRESHOLD = 640,
  localparam int unsigned NI       = NV * NR,
  localparam int unsigned TW       = DW + 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // sample input
  input  logic                        start,
  input  logic [NV-1:0][XW-1:0]       x,
  input  logic [NO-1:0]               learn_en,
  // weight load / store
  input  logic                        w_we,
  input  logic [$clog2(NO)-1:0]       w_out,
  input  logic [$clog2(NI)-1:0]       w_in,
  input  logic [WW-1:0]               w_wdata,
  output logic [WW-1:0]               w_rdata,
  // status and results
  output logic                        busy,
  output logic                        done,
  output phase_e                      phase,
  output logic [NV-1:0][NR-1:0][DW-1:0] in_delay,
  output logic [NI-1:0]               in_spike,
  output logic [NO-1:0]               out_spike,
  output logic [NO-1:0]               out_fired,
  output logic [NO-1:0][TW-1:0]       out_time,
  output logic [NO-1:0][15:0]         out_mp
);
  logic          rd, load, clear, step, learn;
  logic [TW-1:0] t;

  logic [NO-1:0][NI-1:0][WW-1:0] psp;
  logic [NO-1:0][NI-1:0][WW-1:0] weight;

  frame_ctrl #(.DW(DW), .TW(TW)) u_ctrl (
    .clk, .rst_n, .start, .busy, .rd, .load, .clear, .step, .t, .learn, .done, .phase
  );

  for (genvar v = 0; v < NV; v++) begin : g_in
    input_block #(.XW(XW), .NR(NR), .DW(DW)) u_in (
      .clk, .rst_n,
      .x      (x[v]),
      .rd     (rd),
      .load   (load),
      .step   (step),
      .spike  (in_spike[v*NR +: NR]),
      .delays (in_delay[v])
    );
  end

  for (genvar j = 0; j < NO; j++) begin : g_out
    for (genvar i = 0; i < NI; i++) begin : g_syn
      synapse #(.WW(WW), .TW(TW)) u_syn (
        .clk, .rst_n,
        .clear      (clear),
        .t          (t),
        .pre_spike  (in_spike[i]),
        .post_spike (out_spike[j]),
        .learn      (learn),
        .learn_en   (learn_en[j]),
        .w_we       (w_we && w_out == j && w_in == i),
        .w_wdata    (w_wdata),
        .psp        (psp[j][i]),
        .weight     (weight[j][i])
      );
    end

    soma #(.NI(NI), .WW(WW), .TW(TW), .MPW(16), .THRESHOLD(THRESHOLD)) u_soma (
      .clk, .rst_n,
      .clear     (clear),
      .integ     (step),
      .t         (t),
      .psp       (psp[j]),
      .spike     (out_spike[j]),
      .fired     (out_fired[j]),
      .fire_time (out_time[j]),
      .mp        (out_mp[j])
    );
  end

  assign w_rdata = weight[w_out][w_in];
endmodule
