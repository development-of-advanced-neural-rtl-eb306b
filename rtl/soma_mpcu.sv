// soma_mpcu: membrane potential calculation unit (MPCU) of the soma.
//
// At every rising clock edge the input value from the synapse inputs reader
// is added to the membrane potential (saturating at full scale); mp_sum is
// that sum, offered to the soma's comparator in the same cycle. The new
// potential is chosen in this order:
//   fire (from the comparator)  -> 0, hyperpolarisation below the resting level
//   frame_end                   -> REST_MP, the time frame closes
//   input value not zero        -> mp_sum
//   no input                    -> one step towards REST_MP
// A free-running time-frame counter of FRAME_LEN cycles raises frame_end in
// its last cycle, so input spikes only add up to a firing within one frame.
// The addition, the leak to a resting potential of 4-5 % of full scale, the
// reset to zero after a spike and the frame counter follow the design. The
// leak step of one per idle cycle, the recovery from zero back to the
// resting level, and ending a frame by returning to the resting level are
// this design's choices.
module soma_mpcu #(
  parameter int unsigned MP_BITS   = snn_pkg::MP_BITS,
  parameter int unsigned IN_BITS   = $clog2(snn_pkg::N_SYN + 1) + snn_pkg::FACTOR_BITS,
  parameter int unsigned FRAME_LEN = snn_pkg::FRAME_LEN,
  parameter int unsigned REST_MP   = snn_pkg::REST_MP
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [IN_BITS-1:0] in_value,
  input  logic               fire,
  output logic [MP_BITS-1:0] mp,
  output logic [MP_BITS-1:0] mp_sum,
  output logic               frame_end
);

  localparam int unsigned FC_BITS = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1;
  localparam logic [MP_BITS-1:0] REST = MP_BITS'(REST_MP);
  localparam logic [MP_BITS:0]   MPMAX = {1'b0, {MP_BITS{1'b1}}};

  logic [FC_BITS-1:0] frame_cnt;
  logic [MP_BITS:0]   sum_wide;

  assign sum_wide  = {1'b0, mp} + (MP_BITS + 1)'(in_value);
  assign mp_sum    = (sum_wide > MPMAX) ? MPMAX[MP_BITS-1:0] : sum_wide[MP_BITS-1:0];
  assign frame_end = (frame_cnt == FC_BITS'(FRAME_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_cnt <= '0;
    end else if (frame_end) begin
      frame_cnt <= '0;
    end else begin
      frame_cnt <= frame_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mp <= REST;
    end else if (fire) begin
      mp <= '0;
    end else if (frame_end) begin
      mp <= REST;
    end else if (in_value != '0) begin
      mp <= mp_sum;
    end else if (mp > REST) begin
      mp <= mp - 1'b1;
    end else if (mp < REST) begin
      mp <= mp + 1'b1;
    end
  end

endmodule
