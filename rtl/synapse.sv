// synapse: one excitatory synapse - a pulse multiplier without a multiplier.
//
// The Control Unit (synapse_cu) holds the four-bit weight, gives bus access to
// it and applies the Hebbian rule; the Supervising Unit (synapse_su) answers
// every incoming spike with a burst of weight-many one-cycle pulses towards
// the soma. The presynaptic flag for learning is the Supervising Unit's spike
// strobe; the postsynaptic flag is the neuron's axon. Timing is that of the
// two units: a spike at cycle t gives pulses in cycles t+1 .. t+weight, and
// the weight changes at the end of a time frame.
module synapse #(
  parameter int unsigned W_BITS = snn_pkg::W_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              spike_in,
  output logic              pulse_out,
  input  logic              wr,
  input  logic [W_BITS-1:0] weight_in,
  input  logic              rd,
  output logic [W_BITS-1:0] weight_rd,
  input  logic              learn_en,
  input  logic              frame_end,
  input  logic              axon,        // postsynaptic spike
  output logic [W_BITS-1:0] weight
);

  logic strobe;

  synapse_cu #(.W_BITS(W_BITS)) u_cu (
    .clk, .rst_n, .wr, .weight_in, .rd, .weight_rd, .learn_en, .frame_end,
    .prs(strobe), .pos(axon), .weight
  );

  synapse_su #(.W_BITS(W_BITS)) u_su (
    .clk, .rst_n, .spike_in, .weight, .strobe, .pulse_out
  );

endmodule
