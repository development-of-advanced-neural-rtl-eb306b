// soma: body of the spiking neuron, built from four parts - synapse inputs
// reader, membrane potential calculator, threshold potential register and
// axon value register.
//
// The reader (soma_synin) turns the synapse pulses into a weighted input value
// on the falling clock edge. The calculator (soma_mpcu) adds it to the
// membrane potential at the rising edge; the comparator fires when that sum is
// strictly greater than the threshold register. A firing is registered in the
// axon value register, so axon is a one-cycle pulse in the cycle after the
// sum crossed the threshold, and the membrane potential drops to zero at the
// same edge. The threshold register is written by thr_wr / thr_in on the
// rising edge. The soma handles excitatory inputs only. The structure, the
// seven-bit potentials and the "greater than" test follow the design; the
// threshold reset value is this design's choice.
module soma #(
  parameter int unsigned N_SYN       = snn_pkg::N_SYN,
  parameter int unsigned MP_BITS     = snn_pkg::MP_BITS,
  parameter int unsigned FACTOR_BITS = snn_pkg::FACTOR_BITS,
  parameter int unsigned FRAME_LEN   = snn_pkg::FRAME_LEN,
  parameter int unsigned REST_MP     = snn_pkg::REST_MP
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_SYN-1:0]       syn_pulses,
  input  logic                   thr_wr,
  input  logic [MP_BITS-1:0]     thr_in,
  input  logic                   fac_wr,
  input  logic [FACTOR_BITS-1:0] fac_in,
  output logic                   axon,
  output logic [MP_BITS-1:0]     mp,
  output logic [MP_BITS-1:0]     threshold,
  output logic                   frame_end
);

  localparam int unsigned IN_BITS = $clog2(N_SYN + 1) + FACTOR_BITS;

  logic [IN_BITS-1:0]     in_value;
  logic [FACTOR_BITS-1:0] factor;
  logic [MP_BITS-1:0]     mp_sum;
  logic                   fire;

  soma_synin #(.N_SYN(N_SYN), .FACTOR_BITS(FACTOR_BITS), .IN_BITS(IN_BITS)) u_synin (
    .clk, .rst_n, .syn_pulses, .fac_wr, .fac_in, .factor, .in_value
  );

  soma_mpcu #(.MP_BITS(MP_BITS), .IN_BITS(IN_BITS), .FRAME_LEN(FRAME_LEN),
              .REST_MP(REST_MP)) u_mpcu (
    .clk, .rst_n, .in_value, .fire, .mp, .mp_sum, .frame_end
  );

  // comparator
  assign fire = (mp_sum > threshold);

  // threshold potential register and axon value register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      threshold <= MP_BITS'(snn_pkg::THR_RESET);
      axon      <= 1'b0;
    end else begin
      if (thr_wr) threshold <= thr_in;
      axon <= fire;
    end
  end

endmodule
