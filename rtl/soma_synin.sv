// soma_synin: synapse inputs reader (SYNIN) of the soma.
//
// On the falling clock edge it samples the N_SYN synapse pulse lines, counts
// how many are high and multiplies the count by the programmed factor; the
// product is held in in_value for the membrane-potential unit, which uses it
// at the next rising edge. The factor is a register written through fac_wr /
// fac_in (on the falling edge as well). The multiplication is done without a
// multiplier, as a shift-and-add over the factor bits. Reading on the falling
// edge, multiplying by a programmed factor and summing follow the design; the
// factor width and its reset value come from snn_pkg and are this design's.
module soma_synin #(
  parameter int unsigned N_SYN       = snn_pkg::N_SYN,
  parameter int unsigned FACTOR_BITS = snn_pkg::FACTOR_BITS,
  parameter int unsigned IN_BITS     = $clog2(N_SYN + 1) + FACTOR_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_SYN-1:0]       syn_pulses,
  input  logic                   fac_wr,
  input  logic [FACTOR_BITS-1:0] fac_in,
  output logic [FACTOR_BITS-1:0] factor,
  output logic [IN_BITS-1:0]     in_value
);

  localparam int unsigned CNT_BITS = $clog2(N_SYN + 1);

  logic [CNT_BITS-1:0] count;
  logic [IN_BITS-1:0]  product;

  always_comb begin
    count = '0;
    for (int i = 0; i < N_SYN; i++) count = count + CNT_BITS'(syn_pulses[i]);
  end

  always_comb begin
    product = '0;
    for (int b = 0; b < FACTOR_BITS; b++)
      if (factor[b]) product = product + (IN_BITS'(count) << b);
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      factor   <= FACTOR_BITS'(snn_pkg::FACTOR_RESET);
      in_value <= '0;
    end else begin
      if (fac_wr) factor <= fac_in;
      in_value <= product;
    end
  end

endmodule
