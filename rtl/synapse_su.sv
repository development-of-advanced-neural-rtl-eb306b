// synapse_su: Supervising Unit of a synapse - turns one incoming spike into a
// burst of as many output pulses as the synapse weight.
//
// The strobe logic detects the rising edge of spike_in (sampled on the rising
// clock edge) and raises strobe for one cycle. The strobe clears Counter II
// and starts a burst; pulse_out is then high for one clock cycle per count
// until Counter II equals the weight, where the validation logic stops the
// burst. A spike at cycle t therefore gives pulse_out high in cycles t+1 ..
// t+weight (no pulse for weight 0). A new spike during a burst restarts it.
// The burst follows the design; the edge detection, one pulse per clock cycle
// and the restart on a new spike are this design's choices.
module synapse_su #(
  parameter int unsigned W_BITS = snn_pkg::W_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              spike_in,
  input  logic [W_BITS-1:0] weight,     // from Counter I
  output logic              strobe,     // one cycle per detected spike
  output logic              pulse_out   // weighted output pulse train
);

  logic              spike_d;
  logic              busy;
  logic [W_BITS-1:0] cnt2;   // Counter II

  assign strobe    = spike_in & ~spike_d;
  assign pulse_out = busy && (cnt2 < weight);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spike_d <= 1'b0;
      busy    <= 1'b0;
      cnt2    <= '0;
    end else begin
      spike_d <= spike_in;
      if (strobe) begin
        busy <= 1'b1;
        cnt2 <= '0;
      end else if (busy) begin
        if (cnt2 < weight) cnt2 <= cnt2 + 1'b1;
        else               busy <= 1'b0;    // validation logic: burst complete
      end
    end
  end

endmodule
