// tb_neuron: random spikes, weight writes, threshold and factor writes and
// learning, compared every cycle with the reference neuron model (synapse
// bursts, soma integration, axon, Hebbian updates at frame ends).
module tb_neuron;
  import snn_ref_pkg::*;
  localparam int N = 9, W = 4, MPB = 7, FB = 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] spikes_in = '0, wr = '0, rd = '0;
  logic learn_en = 0, thr_wr = 0, fac_wr = 0, axon, frame_end;
  logic [W-1:0] weight_in = '0, weight_rd;
  logic [MPB-1:0] thr_in = '0, mp, threshold;
  logic [FB-1:0] fac_in = '0;
  logic [W-1:0] weights [N];
  int checks = 0, failures = 0;

  neuron dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    neuron_model m;
    m = new(N, W, MPB, 16, 6, 64, 1);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      // spikes at the start of a frame, a random pattern per frame
      if (c % 16 == 1) spikes_in = N'($urandom);
      else if (c % 16 == 3) spikes_in = '0;
      learn_en = ((c / 2000) % 2 == 1);
      wr = ($urandom_range(0, 30) == 0) ? N'(1 << $urandom_range(0, N - 1)) : '0;
      weight_in = W'($urandom);
      rd = N'(1 << $urandom_range(0, N - 1));
      thr_wr = ($urandom_range(0, 200) == 0);
      thr_in = MPB'($urandom_range(10, 100));
      fac_wr = ($urandom_range(0, 300) == 0);
      fac_in = FB'($urandom_range(1, 2));
      #1;
      checks++;
      if (weight_rd !== W'(m.weight_rd(32'(rd))) || frame_end !== 1'(m.soma.frame_end())) begin
        failures++; if (failures < 10) $display("c=%0d weight_rd/frame_end mismatch", c);
      end
      m.step(32'(spikes_in), learn_en, 32'(wr), weight_in, thr_wr, thr_in, fac_wr, fac_in);
      @(posedge clk); #1;
      checks++;
      if (mp !== MPB'(m.soma.mp) || axon !== 1'(m.soma.axon) || threshold !== MPB'(m.soma.threshold)) begin
        failures++;
        if (failures < 10) $display("c=%0d mp %0d/%0d axon %0d/%0d", c, mp, m.soma.mp, axon, m.soma.axon);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (weights[i] !== W'(m.w[i])) begin
          failures++;
          if (failures < 10) $display("c=%0d w[%0d] %0d exp %0d", c, i, weights[i], m.w[i]);
        end
      end
    end
    $display("fire %0d inc %0d dec %0d sat %0d", m.soma.n_fire, m.n_inc, m.n_dec, m.n_hold_sat);
    if (!m.soma.n_fire || !m.n_inc || !m.n_dec) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
