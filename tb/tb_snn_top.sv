// tb_snn_top: end-to-end run of the two-neuron network at its default size.
//
// A PC-side driver loads initial weights, thresholds and factors through the
// Serial Input Device, reads every weight back, presents the two shapes T and
// H as single spikes through the device and reads the axon flags, then
// switches to the parallel inputs with learning on and alternates T and H,
// one per 16-cycle frame, for 40 frames, and checks that the weights that
// tell the shapes apart reach 0 and 15 within 20 frames. With learning off it checks that
// neuron 0 answers only T and neuron 1 only H, and finally reads the learned
// weights back. Every cycle the membrane potentials, axons and all 18 weights
// are compared with the reference neuron models, fed with the signals the
// interface delivers to the neurons. Each mechanism of the design is counted
// and must occur at least once.
module tb_snn_top;
  import snn_pkg::*;
  import snn_ref_pkg::*;
  localparam int NN = 2, N = 9, W = 4, MPB = 7;
  localparam logic [N-1:0] SHAPE_T = 9'b010_010_111;   // rows: 111 / 010 / 010
  localparam logic [N-1:0] SHAPE_H = 9'b101_111_101;   // rows: 101 / 111 / 101

  logic clk = 0, rst_n = 0;
  logic serial_clock = 0, data_in = 0, load = 0, readback_sel = 0;
  logic [W-1:0] status_out, weight_bus;
  logic [N-1:0] par_in = '0;
  logic [NN-1:0] axon, frame_end;
  logic [MPB-1:0] mp [NN];
  logic learn_en, par_mode;
  int checks = 0, failures = 0;

  snn_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, what); end
  endtask

  // ---------------- reference models, stepped every clock ----------------
  neuron_model m [NN];
  int n_wr = 0, n_thr = 0, n_fac = 0, n_spk_sid = 0, n_spk_par = 0, n_rb_w = 0, n_rb_ax = 0;
  int n_mode_sw = 0, n_learn_sw = 0, n_hyper = 0;
  logic prev_par = 0, prev_learn = 0;
  bit model_on = 0;

  always @(negedge clk) if (model_on) begin
    for (int n = 0; n < NN; n++) begin
      if (dut.wr[n] != '0) n_wr++;
      if (dut.thr_wr[n]) n_thr++;
      if (dut.fac_wr[n]) n_fac++;
      m[n].step(32'(dut.spikes), dut.learn_en, 32'(dut.wr[n]), int'(dut.weight_w),
                dut.thr_wr[n], int'(dut.thr_w), dut.fac_wr[n], int'(dut.fac_w));
    end
    if (dut.spikes != '0) begin if (par_mode) n_spk_par++; else n_spk_sid++; end
    if (par_mode != prev_par) n_mode_sw++;
    if (learn_en != prev_learn) n_learn_sw++;
    prev_par = par_mode; prev_learn = learn_en;
  end

  always @(posedge clk) if (model_on) begin
    #1;
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (mp[n] !== MPB'(m[n].soma.mp) || axon[n] !== 1'(m[n].soma.axon)) begin
        failures++;
        if (failures < 20) $display("%t neuron %0d mp %0d/%0d axon %0d/%0d", $time, n, mp[n],
                                    m[n].soma.mp, axon[n], m[n].soma.axon);
      end
      if (axon[n] && mp[n] == 0) n_hyper++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dut.weights[n][i] !== W'(m[n].w[i])) begin
          failures++;
          if (failures < 20) $display("%t n%0d w%0d %0d exp %0d", $time, n, i,
                                      dut.weights[n][i], m[n].w[i]);
        end
      end
    end
  end

  // ---------------- PC side: serial frames ----------------
  task automatic send(input sid_cmd_e cmd, input int neuron, input int syn, input int data);
    sid_frame_t f;
    f.cmd = cmd; f.neuron = 4'(neuron); f.synapse = 4'(syn); f.data = 12'(data);
    for (int b = SID_FRAME_BITS - 1; b >= 0; b--) begin
      data_in = f[b];
      repeat (4) @(posedge clk); serial_clock = 1;
      repeat (4) @(posedge clk); serial_clock = 0;
    end
    repeat (4) @(posedge clk); load = 1;
    repeat (4) @(posedge clk); load = 0;
    repeat (8) @(posedge clk);
  endtask

  // initial weights: neuron 0 leans to T, neuron 1 to H
  function automatic int w_init(int n, int i);
    bit in_t = SHAPE_T[i], in_h = SHAPE_H[i];
    if (in_t && in_h) return 6;
    if (n == 0) return in_t ? 10 : (in_h ? 3 : 1);
    return in_h ? 10 : (in_t ? 3 : 1);
  endfunction

  task automatic readback_weights(input string phase);
    for (int n = 0; n < NN; n++)
      for (int i = 0; i < N; i++) begin
        send(SID_RD_SELECT, n, i, 0);
        readback_sel = 0; #1;
        n_rb_w++;
        check(status_out == W'(m[n].w[i]) && weight_bus == W'(m[n].w[i]),
              $sformatf("%s: read back n%0d s%0d = %0d, model %0d", phase, n, i, status_out, m[n].w[i]));
      end
  endtask

  // pixels of only one shape are at the extremes in both neurons
  function automatic bit settled();
    for (int i = 0; i < N; i++) begin
      if (SHAPE_T[i] && !SHAPE_H[i] && !(m[0].w[i] == 15 && m[1].w[i] == 0)) return 0;
      if (SHAPE_H[i] && !SHAPE_T[i] && !(m[0].w[i] == 0 && m[1].w[i] == 15)) return 0;
    end
    return 1;
  endfunction

  // one shape on the parallel pins, rising in the first cycle of a frame
  task automatic par_frame(input logic [N-1:0] shape, output logic [NN-1:0] fired);
    fired = '0;
    while (!frame_end[0]) @(posedge clk);
    @(posedge clk); #1 par_in = shape;
    @(posedge clk); #1 par_in = '0;
    repeat (15) begin @(posedge clk); #2 fired |= axon; end
  endtask

  initial begin
    logic [NN-1:0] f;
    int learned_ok, settled_at;
    m[0] = new(N, W, MPB, 16, 6, THR_RESET, FACTOR_RESET);
    m[1] = new(N, W, MPB, 16, 6, THR_RESET, FACTOR_RESET);
    repeat (3) @(negedge clk);
    rst_n = 1; model_on = 1;

    // load the network
    for (int n = 0; n < NN; n++) begin
      for (int i = 0; i < N; i++) send(SID_WR_WEIGHT, n, i, w_init(n, i));
      send(SID_WR_THRESH, n, 0, 40);
      send(SID_WR_FACTOR, n, 0, 1);
    end
    readback_weights("after load");

    // recognition through the serial device, before learning
    send(SID_SPIKES, 0, 0, SHAPE_T);
    repeat (40) @(posedge clk);
    readback_sel = 1; #1; n_rb_ax++;
    check(status_out == 4'b0001, $sformatf("T via serial: axon flags %b", status_out));
    send(SID_SPIKES, 0, 0, SHAPE_H);
    repeat (40) @(posedge clk);
    #1; n_rb_ax++;
    check(status_out == 4'b0010, $sformatf("H via serial: axon flags %b", status_out));
    readback_sel = 0;

    // learning from the parallel inputs
    send(SID_CONTROL, 0, 0, 3);
    settled_at = -1;
    for (int k = 0; k < 40; k++) begin
      par_frame((k % 2) ? SHAPE_H : SHAPE_T, f);
      repeat (2) @(posedge clk);   // the weight update of this frame
      if (settled_at < 0 && settled()) settled_at = k + 1;
    end
    // the learning should finish within about 20 time slices of 16 cycles
    $display("distinguishing weights settled after %0d time slices", settled_at);
    check(settled_at > 0 && settled_at <= 20, "learning time within 20 time slices");

    // recall with learning off
    send(SID_CONTROL, 0, 0, 2);
    learned_ok = 1;
    for (int k = 0; k < 6; k++) begin
      par_frame((k % 2) ? SHAPE_H : SHAPE_T, f);
      check(f == ((k % 2) ? 2'b10 : 2'b01), $sformatf("recall %s: fired %b", (k % 2) ? "H" : "T", f));
    end
    // learned weights: pixels of one shape only go to 15 or 0
    for (int i = 0; i < N; i++) begin
      if (SHAPE_T[i] && !SHAPE_H[i]) check(m[0].w[i] == 15 && m[1].w[i] == 0, $sformatf("T-only pixel %0d", i));
      if (SHAPE_H[i] && !SHAPE_T[i]) check(m[0].w[i] == 0 && m[1].w[i] == 15, $sformatf("H-only pixel %0d", i));
    end
    send(SID_CONTROL, 0, 0, 0);
    readback_weights("after learning");

    $display("weights n0: %p", m[0].w);
    $display("weights n1: %p", m[1].w);
    $display("mechanisms: wr %0d thr %0d fac %0d rb_weight %0d rb_axon %0d spikes_sid %0d spikes_par %0d",
             n_wr, n_thr, n_fac, n_rb_w, n_rb_ax, n_spk_sid, n_spk_par);
    $display("  mode_sw %0d learn_sw %0d fire %0d/%0d hyperpol %0d inc %0d dec %0d sat15 %0d sat0 %0d",
             n_mode_sw, n_learn_sw, m[0].soma.n_fire, m[1].soma.n_fire, n_hyper,
             m[0].n_inc + m[1].n_inc, m[0].n_dec + m[1].n_dec,
             m[0].n_sat_hi + m[1].n_sat_hi, m[0].n_sat_lo + m[1].n_sat_lo);
    $display("  leak_dn %0d leak_up %0d frame_reset %0d",
             m[0].soma.n_leak_dn + m[1].soma.n_leak_dn, m[0].soma.n_leak_up + m[1].soma.n_leak_up,
             m[0].soma.n_frame_reset + m[1].soma.n_frame_reset);
    begin
      int cov [$];
      cov = '{n_wr, n_thr, n_fac, n_rb_w, n_rb_ax, n_spk_sid, n_spk_par, n_mode_sw,
                      n_learn_sw, m[0].soma.n_fire, m[1].soma.n_fire, n_hyper,
                      m[0].n_inc + m[1].n_inc, m[0].n_dec + m[1].n_dec,
                      m[0].n_sat_hi + m[1].n_sat_hi, m[0].n_sat_lo + m[1].n_sat_lo,
                      m[0].soma.n_leak_dn + m[1].soma.n_leak_dn,
                      m[0].soma.n_leak_up + m[1].soma.n_leak_up,
                      m[0].soma.n_frame_reset + m[1].soma.n_frame_reset};
      foreach (cov[j]) begin
        checks++;
        if (cov[j] == 0) begin failures++; $display("mechanism %0d never happened", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
