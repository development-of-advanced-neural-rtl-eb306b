// tb_soma: random synapse pulses, threshold and factor writes against the
// reference soma model; checks membrane potential, axon and threshold every
// cycle, and that firings, hyperpolarisation, leaks and frame resets occur.
module tb_soma;
  import snn_ref_pkg::*;
  localparam int N = 9, MPB = 7, FB = 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] syn_pulses = '0;
  logic thr_wr = 0, fac_wr = 0;
  logic [MPB-1:0] thr_in = '0, mp, threshold;
  logic [FB-1:0] fac_in = '0;
  logic axon, frame_end;
  int checks = 0, failures = 0;

  soma dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    soma_model m;
    m = new(N, MPB, 16, 6, 64, 1);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 10000; c++) begin
      int dens;
      dens = ((c / 160) % 3 == 2) ? 0 : ((c / 160) % 3 + 1) * 20;
      for (int i = 0; i < N; i++) syn_pulses[i] = ($urandom_range(0, 99) < dens);
      thr_wr = ($urandom_range(0, 60) == 0);
      thr_in = MPB'($urandom_range(20, 120));
      fac_wr = ($urandom_range(0, 80) == 0);
      fac_in = FB'($urandom_range(1, 3));
      checks++;
      if (frame_end !== 1'(m.frame_end())) begin
        failures++; $display("c=%0d frame_end mismatch", c);
      end
      m.step(32'(syn_pulses), thr_wr, thr_in, fac_wr, fac_in);
      @(posedge clk); #1;
      checks++;
      if (mp !== MPB'(m.mp) || axon !== 1'(m.axon) || threshold !== MPB'(m.threshold)) begin
        failures++;
        if (failures < 10) $display("c=%0d mp %0d/%0d axon %0d/%0d thr %0d/%0d", c, mp, m.mp,
                                    axon, m.axon, threshold, m.threshold);
      end
    end
    $display("fire %0d leak_dn %0d leak_up %0d frame_reset %0d sat %0d", m.n_fire, m.n_leak_dn,
             m.n_leak_up, m.n_frame_reset, m.n_sat);
    if (!m.n_fire || !m.n_leak_dn || !m.n_leak_up || !m.n_frame_reset) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
