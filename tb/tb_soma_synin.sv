// tb_soma_synin: random synapse pulse patterns and factor writes; after every
// falling edge the input value must equal (number of high pulse lines) times
// the factor that was programmed before that edge.
module tb_soma_synin;
  localparam int N = 9, FB = 2, IB = $clog2(N + 1) + FB;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] syn_pulses = '0;
  logic fac_wr = 0;
  logic [FB-1:0] fac_in = '0, factor;
  logic [IB-1:0] in_value;
  int checks = 0, failures = 0;

  soma_synin #(.N_SYN(N), .FACTOR_BITS(FB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_fac, m_in;
    m_fac = 1; m_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(posedge clk); #1;
      syn_pulses = N'($urandom);
      fac_wr = ($urandom_range(0, 15) == 0);
      fac_in = FB'($urandom);
      @(negedge clk); #1;
      m_in = $countones(syn_pulses) * m_fac;
      if (fac_wr) m_fac = fac_in;
      checks++;
      if (in_value !== IB'(m_in) || factor !== FB'(m_fac)) begin
        failures++;
        if (failures < 10) $display("c=%0d pulses %b in_value %0d exp %0d factor %0d exp %0d",
                                    c, syn_pulses, in_value, m_in, factor, m_fac);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
