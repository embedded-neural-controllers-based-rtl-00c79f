// rf_rom: dual-port encoding memory of one input variable.
//
// Holds, for every input value x, the spike delays of all N_RF receptive
// fields, 4 bits each. The 16 x 4 = 64 bits of one value do not fit one 32-bit
// word, so they are split over two halves of the memory: the lower half
// (address {0,x}) holds fields 0..7, the upper half (address {1,x}) holds
// fields 8..15. Port A reads the lower half and port B the upper half at the
// same time, so all 16 delays are available together, one cycle after the
// address. At the default sizes the memory is 512 words x 32 bits and 100 %
// used, as in the published design (a dual-port block RAM addressed by the input value,
// with an offset on port B). The contents are computed at elaboration from
// snn_pkg::rf_delay instead of being loaded from a generated file.
//
// Timing: synchronous read, data valid the cycle after en was high.
module rf_rom
  import snn_pkg::*;
#(
  parameter int unsigned XW = X_W,      // input value width
  parameter int unsigned NR = N_RF,     // receptive fields (must be even)
  parameter int unsigned DW = DELAY_W   // delay width
) (
  input  logic                  clk,
  input  logic                  en,        // read enable (both ports)
  input  logic [XW:0]           addr_a,    // port A address
  input  logic [XW:0]           addr_b,    // port B address
  output logic [NR/2*DW-1:0]    data_a,
  output logic [NR/2*DW-1:0]    data_b
);
  localparam int unsigned WORD_W = NR / 2 * DW;
  localparam int unsigned DEPTH  = 2 ** (XW + 1);

  logic [WORD_W-1:0] mem [DEPTH];

  // Contents: word a holds fields (a >> XW) * NR/2 + n for x = a mod 2**XW
  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) begin
      for (int unsigned n = 0; n < NR / 2; n++) begin
        mem[a][n*DW +: DW] = rf_delay((a >> XW) * (NR / 2) + n, a % (2 ** XW));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      data_a <= mem[addr_a];
      data_b <= mem[addr_b];
    end
  end
endmodule
