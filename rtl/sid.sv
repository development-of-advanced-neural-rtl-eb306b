// sid: Serial Input Device - the serial-to-parallel interface through which a
// PC loads the network and presents input spikes to it.
//
// The PC drives three lines: serial_clock, data_in and load. All three are
// brought into the clk domain with two-flop synchronisers, so serial_clock
// must stay high and low for at least three clk cycles each. On every rising
// edge of serial_clock one bit of data_in is shifted in, most significant bit
// first; a rising edge of load takes the last SID_FRAME_BITS bits as one frame
// (snn_pkg::sid_frame_t: command, neuron, synapse, data) and executes it:
//   SID_WR_WEIGHT  one-cycle wr[neuron][synapse] with weight_out = data
//   SID_RD_SELECT  holds rd[neuron][synapse] high until the next RD_SELECT
//   SID_WR_THRESH  one-cycle thr_wr[neuron] with thr_out = data
//   SID_WR_FACTOR  one-cycle fac_wr[neuron] with fac_out = data
//   SID_SPIKES     spikes = data[N_SYN-1:0] for one cycle, issued in the first
//                  cycle of the next time frame (after frame_end); clears the
//                  axon flags
//   SID_CONTROL    learn_en = data[0], par_mode = data[1]
// Indices outside the network are ignored. The outputs change at the clk edge
// after the one where the synchronised load edge is seen (three to four clk
// cycles after load rises). Read-back goes to the PC on the four
// status lines: with readback_sel low they carry the weight bus (the weight
// selected by SID_RD_SELECT), with it high the sticky axon flags, one per
// neuron, set by an axon spike and cleared by the next SID_SPIKES frame.
// The device's tasks (addressing and loading weights, feeding input spikes,
// reading back weights and axons alternately over the status lines) follow
// the design; the frame format, the synchronisers, the alignment of spikes to
// the time frame and the sticky flags are this design's own.
module sid #(
  parameter int unsigned N_NEURONS   = snn_pkg::N_NEURONS,
  parameter int unsigned N_SYN       = snn_pkg::N_SYN,
  parameter int unsigned W_BITS      = snn_pkg::W_BITS,
  parameter int unsigned MP_BITS     = snn_pkg::MP_BITS,
  parameter int unsigned FACTOR_BITS = snn_pkg::FACTOR_BITS
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // parallel-port side
  input  logic                                serial_clock,
  input  logic                                data_in,
  input  logic                                load,
  input  logic                                readback_sel,
  output logic [W_BITS-1:0]                   status_out,
  // network side
  input  logic [W_BITS-1:0]                   weight_bus,
  input  logic [N_NEURONS-1:0]                axons,
  input  logic                                frame_end,
  output logic [N_NEURONS-1:0][N_SYN-1:0]     wr,
  output logic [N_NEURONS-1:0][N_SYN-1:0]     rd,
  output logic [W_BITS-1:0]                   weight_out,
  output logic [N_NEURONS-1:0]                thr_wr,
  output logic [MP_BITS-1:0]                  thr_out,
  output logic [N_NEURONS-1:0]                fac_wr,
  output logic [FACTOR_BITS-1:0]              fac_out,
  output logic [N_SYN-1:0]                    spikes,
  output logic                                learn_en,
  output logic                                par_mode
);

  import snn_pkg::*;

  if (N_NEURONS > W_BITS) begin : g_check
    $error("sid: the axon read-back needs N_NEURONS <= W_BITS");
  end

  // synchronisers, third stage for edge detection
  logic [2:0] sclk_s, load_s;
  logic [1:0] din_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      load_s <= '0;
      din_s  <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], serial_clock};
      load_s <= {load_s[1:0], load};
      din_s  <= {din_s[0], data_in};
    end
  end

  logic sclk_rise, load_rise;
  assign sclk_rise = sclk_s[1] & ~sclk_s[2];
  assign load_rise = load_s[1] & ~load_s[2];

  logic [SID_FRAME_BITS-1:0] shreg;
  sid_frame_t                frame;
  assign frame = sid_frame_t'(shreg);

  logic neuron_ok, syn_ok;
  assign neuron_ok = 32'(frame.neuron)  < N_NEURONS;
  assign syn_ok    = 32'(frame.synapse) < N_SYN;

  logic [N_NEURONS-1:0] axon_flag;
  logic                 spk_pending;
  logic [N_SYN-1:0]     spk_pattern;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      wr         <= '0;
      rd         <= '0;
      weight_out <= '0;
      thr_wr     <= '0;
      thr_out    <= '0;
      fac_wr     <= '0;
      fac_out    <= '0;
      spikes     <= '0;
      learn_en   <= 1'b0;
      par_mode   <= 1'b0;
      axon_flag  <= '0;
      spk_pending <= 1'b0;
      spk_pattern <= '0;
    end else begin
      // one-cycle strobes fall back by default
      wr     <= '0;
      thr_wr <= '0;
      fac_wr <= '0;
      spikes <= '0;
      axon_flag <= axon_flag | axons;
      if (frame_end && spk_pending) begin
        spikes      <= spk_pattern;
        spk_pending <= 1'b0;
      end

      if (sclk_rise) shreg <= {shreg[SID_FRAME_BITS-2:0], din_s[1]};

      if (load_rise) begin
        unique case (frame.cmd)
          SID_WR_WEIGHT: begin
            weight_out <= frame.data[W_BITS-1:0];
            for (int n = 0; n < N_NEURONS; n++)
              for (int i = 0; i < N_SYN; i++)
                if (neuron_ok && syn_ok && 32'(frame.neuron) == n && 32'(frame.synapse) == i)
                  wr[n][i] <= 1'b1;
          end
          SID_RD_SELECT: begin
            rd <= '0;
            for (int n = 0; n < N_NEURONS; n++)
              for (int i = 0; i < N_SYN; i++)
                if (neuron_ok && syn_ok && 32'(frame.neuron) == n && 32'(frame.synapse) == i)
                  rd[n][i] <= 1'b1;
          end
          SID_WR_THRESH: begin
            thr_out <= frame.data[MP_BITS-1:0];
            for (int n = 0; n < N_NEURONS; n++)
              if (32'(frame.neuron) == n) thr_wr[n] <= 1'b1;
          end
          SID_WR_FACTOR: begin
            fac_out <= frame.data[FACTOR_BITS-1:0];
            for (int n = 0; n < N_NEURONS; n++)
              if (32'(frame.neuron) == n) fac_wr[n] <= 1'b1;
          end
          SID_SPIKES: begin
            spk_pattern <= frame.data[N_SYN-1:0];
            spk_pending <= 1'b1;
            axon_flag   <= '0;
          end
          SID_CONTROL: begin
            learn_en <= frame.data[0];
            par_mode <= frame.data[1];
          end
          default: ;
        endcase
      end
    end
  end

  assign status_out = readback_sel ? W_BITS'(axon_flag) : weight_bus;

endmodule
