// snn_top: two-neuron spiking network that learns, without supervision, to
// tell apart two shapes drawn on a 3x3 grid of binary inputs.
//
// The nine inputs are shared by both neurons: input i drives synapse i of
// each neuron. A neuron answers a spike with weighted pulse bursts from its
// synapses, integrates them into its membrane potential within a 16-cycle
// time frame and fires when the potential passes its threshold; at each frame
// end every synapse strengthens or weakens by one step from whether its input
// and its neuron fired in that frame, so each neuron's weights drift towards
// 15 on the pixels of the shape it answers and towards 0 elsewhere.
// Two input paths: the Serial Input Device (sid), driven by a PC over
// serial_clock / data_in / load, loads weights, thresholds and factors,
// switches learning and the input source, presents single spikes and reads
// weights or axon flags back on status_out; with par_mode set, the nine
// parallel pins par_in (driven synchronously to clk by an external controller)
// feed the inputs instead, one spike per rising edge of a pin; to use the
// whole frame, a pin should rise in the cycle after frame_end.
// mp, axon, frame_end and weight_bus are brought out for observation.
// Network shape and sizes follow the design; the input multiplexing and the
// interface protocol are this design's own.
module snn_top #(
  parameter int unsigned N_NEURONS   = snn_pkg::N_NEURONS,
  parameter int unsigned N_SYN       = snn_pkg::N_SYN,
  parameter int unsigned W_BITS      = snn_pkg::W_BITS,
  parameter int unsigned MP_BITS     = snn_pkg::MP_BITS,
  parameter int unsigned FACTOR_BITS = snn_pkg::FACTOR_BITS,
  parameter int unsigned FRAME_LEN   = snn_pkg::FRAME_LEN,
  parameter int unsigned REST_MP     = snn_pkg::REST_MP
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    serial_clock,
  input  logic                    data_in,
  input  logic                    load,
  input  logic                    readback_sel,
  output logic [W_BITS-1:0]       status_out,
  input  logic [N_SYN-1:0]        par_in,
  output logic [N_NEURONS-1:0]    axon,
  output logic [MP_BITS-1:0]      mp [N_NEURONS],
  output logic [N_NEURONS-1:0]    frame_end,
  output logic [W_BITS-1:0]       weight_bus,
  output logic                    learn_en,
  output logic                    par_mode
);

  logic [N_NEURONS-1:0][N_SYN-1:0] wr, rd;
  logic [W_BITS-1:0]               weight_w;
  logic [N_NEURONS-1:0]            thr_wr, fac_wr;
  logic [MP_BITS-1:0]              thr_w;
  logic [FACTOR_BITS-1:0]          fac_w;
  logic [N_SYN-1:0]                sid_spikes, spikes;
  logic [W_BITS-1:0]               rd_bus    [N_NEURONS];
  logic [MP_BITS-1:0]              threshold [N_NEURONS];
  logic [W_BITS-1:0]               weights   [N_NEURONS][N_SYN];

  sid #(.N_NEURONS(N_NEURONS), .N_SYN(N_SYN), .W_BITS(W_BITS), .MP_BITS(MP_BITS),
        .FACTOR_BITS(FACTOR_BITS)) u_sid (
    .clk, .rst_n, .serial_clock, .data_in, .load, .readback_sel, .status_out,
    .weight_bus, .axons(axon), .frame_end(frame_end[0]), .wr, .rd, .weight_out(weight_w),
    .thr_wr, .thr_out(thr_w), .fac_wr, .fac_out(fac_w),
    .spikes(sid_spikes), .learn_en, .par_mode
  );

  assign spikes = par_mode ? par_in : sid_spikes;

  for (genvar n = 0; n < N_NEURONS; n++) begin : g_neuron
    neuron #(.N_SYN(N_SYN), .W_BITS(W_BITS), .MP_BITS(MP_BITS),
             .FACTOR_BITS(FACTOR_BITS), .FRAME_LEN(FRAME_LEN),
             .REST_MP(REST_MP)) u_neuron (
      .clk, .rst_n,
      .spikes_in(spikes),
      .learn_en,
      .wr       (wr[n]),
      .weight_in(weight_w),
      .rd       (rd[n]),
      .weight_rd(rd_bus[n]),
      .thr_wr   (thr_wr[n]),
      .thr_in   (thr_w),
      .fac_wr   (fac_wr[n]),
      .fac_in   (fac_w),
      .axon     (axon[n]),
      .mp       (mp[n]),
      .threshold(threshold[n]),
      .frame_end(frame_end[n]),
      .weights  (weights[n])
    );
  end

  always_comb begin
    weight_bus = '0;
    for (int n = 0; n < N_NEURONS; n++) weight_bus |= rd_bus[n];
  end

endmodule
