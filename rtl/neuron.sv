// neuron: one spiking neuron - N_SYN synapses feeding one soma.
//
// Input spike i drives synapse i; the synapses' pulse trains go to the soma,
// whose axon spike is returned to every synapse as the postsynaptic (POS)
// flag of the learning rule, and whose time-frame end paces the weight
// updates of all synapses. Each synapse has its own write and read select
// (wr[i], rd[i]) on a shared weight bus; weight_rd is the OR of the synapses'
// read ports, so at most one rd bit should be high. Timing: a spike at cycle t
// gives synapse pulses from t+1, the soma reads them at the falling edge and
// adds them at the next rising edge, and the axon goes high one cycle after
// the threshold is crossed. The structure follows the design.
module neuron #(
  parameter int unsigned N_SYN       = snn_pkg::N_SYN,
  parameter int unsigned W_BITS      = snn_pkg::W_BITS,
  parameter int unsigned MP_BITS     = snn_pkg::MP_BITS,
  parameter int unsigned FACTOR_BITS = snn_pkg::FACTOR_BITS,
  parameter int unsigned FRAME_LEN   = snn_pkg::FRAME_LEN,
  parameter int unsigned REST_MP     = snn_pkg::REST_MP
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_SYN-1:0]       spikes_in,
  input  logic                   learn_en,
  input  logic [N_SYN-1:0]       wr,
  input  logic [W_BITS-1:0]      weight_in,
  input  logic [N_SYN-1:0]       rd,
  output logic [W_BITS-1:0]      weight_rd,
  input  logic                   thr_wr,
  input  logic [MP_BITS-1:0]     thr_in,
  input  logic                   fac_wr,
  input  logic [FACTOR_BITS-1:0] fac_in,
  output logic                   axon,
  output logic [MP_BITS-1:0]     mp,
  output logic [MP_BITS-1:0]     threshold,
  output logic                   frame_end,
  output logic [W_BITS-1:0]      weights [N_SYN]
);

  logic [N_SYN-1:0]  pulses;
  logic [W_BITS-1:0] rd_bus [N_SYN];

  for (genvar i = 0; i < N_SYN; i++) begin : g_syn
    synapse #(.W_BITS(W_BITS)) u_syn (
      .clk, .rst_n,
      .spike_in (spikes_in[i]),
      .pulse_out(pulses[i]),
      .wr       (wr[i]),
      .weight_in,
      .rd       (rd[i]),
      .weight_rd(rd_bus[i]),
      .learn_en,
      .frame_end,
      .axon,
      .weight   (weights[i])
    );
  end

  always_comb begin
    weight_rd = '0;
    for (int i = 0; i < N_SYN; i++) weight_rd |= rd_bus[i];
  end

  soma #(.N_SYN(N_SYN), .MP_BITS(MP_BITS), .FACTOR_BITS(FACTOR_BITS),
         .FRAME_LEN(FRAME_LEN), .REST_MP(REST_MP)) u_soma (
    .clk, .rst_n, .syn_pulses(pulses), .thr_wr, .thr_in, .fac_wr, .fac_in,
    .axon, .mp, .threshold, .frame_end
  );

endmodule
