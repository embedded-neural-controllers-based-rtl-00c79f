// input_block: encodes one input variable into NR delayed spikes.
//
// Made of the dual-port encoding memory (rf_rom) and one input_neuron per
// receptive field, as in the published design. The input value is the memory address:
// port A reads {0,x} (fields 0..NR/2-1), port B reads {1,x} (fields
// NR/2..NR-1). The delays read are handed to the neurons on load; every neuron
// then fires once, in the time step equal to its delay. The delays are also
// brought out (delays), like the debug outputs of the published test
// version of this block.
//
// Timing: rd with x valid in cycle 0, load in cycle 1 (memory data valid),
// time steps from cycle 2 on; spike[k] is high in time step delay[k].
module input_block
  import snn_pkg::*;
#(
  parameter int unsigned XW = X_W,
  parameter int unsigned NR = N_RF,
  parameter int unsigned DW = DELAY_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [XW-1:0]          x,       // input variable
  input  logic                   rd,      // read the delays of x
  input  logic                   load,    // hand the delays to the neurons
  input  logic                   step,    // time step of the frame
  output logic [NR-1:0]          spike,   // pre-synaptic spikes
  output logic [NR-1:0][DW-1:0]  delays   // delays read for x
);
  logic [NR/2*DW-1:0] data_a, data_b;

  rf_rom #(.XW(XW), .NR(NR), .DW(DW)) u_rom (
    .clk    (clk),
    .en     (rd),
    .addr_a ({1'b0, x}),
    .addr_b ({1'b1, x}),
    .data_a (data_a),
    .data_b (data_b)
  );

  assign delays = {data_b, data_a};

  for (genvar k = 0; k < NR; k++) begin : g_neuron
    input_neuron #(.DW(DW)) u_neuron (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (load),
      .delay (delays[k]),
      .step  (step),
      .spike (spike[k])
    );
  end
endmodule
