// snn_pkg: sizes and encodings shared by the spiking-neuron network.
//
// The neuron of this design has nine synapses with four-bit weights, a
// seven-bit membrane potential and a seven-bit threshold, and works in time
// frames of 16 clock cycles; these numbers follow the two-neuron test network
// this RTL implements. The resting potential (about 4-5 % of full scale), the
// width of the SYNIN factor and the whole Serial Input Device frame format are
// this design's own choices.
package snn_pkg;

  localparam int unsigned N_SYN       = 9;   // synapses per neuron
  localparam int unsigned N_NEURONS   = 2;   // neurons in the test network
  localparam int unsigned W_BITS      = 4;   // weight register / Counter I width
  localparam int unsigned MP_BITS     = 7;   // membrane and threshold potential width
  localparam int unsigned FRAME_LEN   = 16;  // time frame, clock cycles
  localparam int unsigned REST_MP     = 6;   // resting potential, 6/127 = 4.7 % of full scale
  localparam int unsigned FACTOR_BITS = 2;   // SYNIN programmed factor, 0..3
  localparam int unsigned THR_RESET   = 64;  // threshold after reset
  localparam int unsigned FACTOR_RESET = 1;  // SYNIN factor after reset

  // Serial Input Device frame: 24 bits shifted in MSB first.
  localparam int unsigned SID_FRAME_BITS = 24;

  typedef enum logic [3:0] {
    SID_NOP       = 4'h0,
    SID_WR_WEIGHT = 4'h1,  // weight of (neuron, synapse) <- data[W_BITS-1:0]
    SID_RD_SELECT = 4'h2,  // drive weight of (neuron, synapse) onto the weight bus
    SID_WR_THRESH = 4'h3,  // threshold of neuron <- data[MP_BITS-1:0]
    SID_WR_FACTOR = 4'h4,  // SYNIN factor of neuron <- data[FACTOR_BITS-1:0]
    SID_SPIKES    = 4'h5,  // one input spike on every input whose data bit is set
    SID_CONTROL   = 4'h6   // data[0]: learning enable, data[1]: inputs from parallel pins
  } sid_cmd_e;

  typedef struct packed {
    sid_cmd_e    cmd;
    logic [3:0]  neuron;
    logic [3:0]  synapse;
    logic [11:0] data;
  } sid_frame_t;

endpackage
