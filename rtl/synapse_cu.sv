// synapse_cu: Control Unit of a synapse - the weight register (Counter I)
// with its bus access and its Hebbian learning rule.
//
// All actions happen on the rising clock edge. When wr is high the weight is
// loaded from weight_in. When rd is high the weight is driven on weight_rd
// (zero otherwise, so the read ports of many synapses can be ORed into one
// weight bus). While learn_en is high the weight is updated once per time
// frame, in the cycle where frame_end is high, from two flags collected over
// the frame: PRS (a presynaptic spike arrived) and POS (the neuron's own axon
// fired):
//   PRS=0 POS=0 : unchanged      PRS=1 POS=0 : weight - 1
//   PRS=0 POS=1 : weight - 1     PRS=1 POS=1 : weight + 1
// The rule and the four-bit Counter I follow the design; updating once per
// frame from flags gathered over the frame, saturating at 0 and 2**W_BITS-1
// instead of wrapping, the priority of wr over learning and the reset value 0
// are this design's choices. The "divider" that the block diagram draws next
// to the register has no described function and is not built.
module synapse_cu #(
  parameter int unsigned W_BITS = snn_pkg::W_BITS
) (
  input  logic              clk,
  input  logic              rst_n,      // asynchronous, active low
  input  logic              wr,
  input  logic [W_BITS-1:0] weight_in,
  input  logic              rd,
  output logic [W_BITS-1:0] weight_rd,
  input  logic              learn_en,
  input  logic              frame_end,  // last cycle of the time frame
  input  logic              prs,        // presynaptic spike (one-cycle strobe)
  input  logic              pos,        // postsynaptic (axon) spike
  output logic [W_BITS-1:0] weight      // Counter I, to the Supervising Unit
);

  localparam logic [W_BITS-1:0] WMAX = '1;

  logic prs_seen, pos_seen;
  logic prs_f, pos_f;

  assign prs_f = prs_seen | prs;
  assign pos_f = pos_seen | pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prs_seen <= 1'b0;
      pos_seen <= 1'b0;
    end else if (frame_end) begin
      prs_seen <= 1'b0;
      pos_seen <= 1'b0;
    end else begin
      prs_seen <= prs_f;
      pos_seen <= pos_f;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      weight <= '0;
    end else if (wr) begin
      weight <= weight_in;
    end else if (learn_en && frame_end) begin
      unique case ({prs_f, pos_f})
        2'b11:   if (weight != WMAX) weight <= weight + 1'b1;
        2'b10,
        2'b01:   if (weight != '0)   weight <= weight - 1'b1;
        default: ;
      endcase
    end
  end

  assign weight_rd = rd ? weight : '0;

endmodule
