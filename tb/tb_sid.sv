// tb_sid: shifts frames into the Serial Input Device the way a PC would
// (slow serial clock, then a load pulse) and checks every command: weight
// write strobes and data, read select, threshold and factor writes, spikes
// released after the next frame end, the control bits, indices out of range,
// and read-back of the weight bus and of the sticky axon flags.
module tb_sid;
  import snn_pkg::*;
  localparam int NN = 2, N = 9, W = 4, MPB = 7, FB = 2;
  logic clk = 0, rst_n = 0;
  logic serial_clock = 0, data_in = 0, load = 0, readback_sel = 0;
  logic [W-1:0] status_out, weight_bus = '0, weight_out;
  logic [NN-1:0] axons = '0, thr_wr, fac_wr;
  logic frame_end;
  logic [NN-1:0][N-1:0] wr, rd;
  logic [MPB-1:0] thr_out;
  logic [FB-1:0] fac_out;
  logic [N-1:0] spikes;
  logic learn_en, par_mode;
  int checks = 0, failures = 0;

  sid dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame_end every 16 cycles, as the neurons would give it
  int fcnt = 0;
  always @(posedge clk) begin
    fcnt <= (fcnt + 1) % 16;
  end
  assign frame_end = (fcnt == 15);

  // record every strobe seen on the network side
  int n_wr_pulses, n_thr_pulses, n_fac_pulses, n_spk_pulses;
  logic [NN-1:0][N-1:0] wr_seen;
  logic [NN-1:0] thr_seen, fac_seen;
  logic [N-1:0] spk_seen;
  logic spk_on_frame_start;
  int last_wout, last_thr, last_fac;
  always @(posedge clk) begin
    if (wr != '0) begin n_wr_pulses++; wr_seen |= wr; last_wout = weight_out; end
    if (thr_wr != '0) begin n_thr_pulses++; thr_seen |= thr_wr; last_thr = thr_out; end
    if (fac_wr != '0) begin n_fac_pulses++; fac_seen |= fac_wr; last_fac = fac_out; end
    if (spikes != '0) begin n_spk_pulses++; spk_seen |= spikes; spk_on_frame_start = (fcnt == 0); end
  end

  task automatic clear_seen();
    n_wr_pulses = 0; n_thr_pulses = 0; n_fac_pulses = 0; n_spk_pulses = 0;
    wr_seen = '0; thr_seen = '0; fac_seen = '0; spk_seen = '0; spk_on_frame_start = 0;
  endtask

  task automatic send(input sid_cmd_e cmd, input int neuron, input int syn, input int data);
    sid_frame_t f;
    f.cmd = cmd; f.neuron = 4'(neuron); f.synapse = 4'(syn); f.data = 12'(data);
    clear_seen();
    for (int b = SID_FRAME_BITS - 1; b >= 0; b--) begin
      data_in = f[b];
      repeat (4) @(posedge clk); serial_clock = 1;
      repeat (4) @(posedge clk); serial_clock = 0;
    end
    repeat (4) @(posedge clk); load = 1;
    repeat (4) @(posedge clk); load = 0;
    repeat (40) @(posedge clk);       // let it execute (spikes wait for a frame end)
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%t FAIL %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(learn_en == 0 && par_mode == 0 && rd == '0, "reset state");
    for (int n = 0; n < NN; n++)
      for (int s = 0; s < N; s++) begin
        int v = (n * 7 + s * 5 + 3) % 16;
        logic [NN-1:0][N-1:0] exp_wr;
        exp_wr = '0; exp_wr[n][s] = 1'b1;
        send(SID_WR_WEIGHT, n, s, v);
        check(n_wr_pulses == 1 && wr_seen == exp_wr && last_wout == v,
              $sformatf("weight write n%0d s%0d: pulses %0d", n, s, n_wr_pulses));
      end
    send(SID_WR_WEIGHT, 2, 0, 5);
    check(n_wr_pulses == 0, "weight write to absent neuron ignored");
    send(SID_WR_WEIGHT, 0, 9, 5);
    check(n_wr_pulses == 0, "weight write to absent synapse ignored");
    send(SID_RD_SELECT, 1, 4, 0);
    begin logic [NN-1:0][N-1:0] e; e = '0; e[1][4] = 1'b1; check(rd == e, "read select n1 s4"); end
    send(SID_RD_SELECT, 0, 8, 0);
    begin logic [NN-1:0][N-1:0] e; e = '0; e[0][8] = 1'b1; check(rd == e, "read select n0 s8"); end
    send(SID_WR_THRESH, 1, 0, 99);
    check(n_thr_pulses == 1 && thr_seen == 2'b10 && last_thr == 99, "threshold write");
    send(SID_WR_FACTOR, 0, 0, 3);
    check(n_fac_pulses == 1 && fac_seen == 2'b01 && last_fac == 3, "factor write");
    send(SID_CONTROL, 0, 0, 3);
    check(learn_en == 1 && par_mode == 1, "control on");
    send(SID_CONTROL, 0, 0, 1);
    check(learn_en == 1 && par_mode == 0, "control learn only");
    // read-back of weight bus and axon flags
    weight_bus = 4'hA; readback_sel = 0; #1;
    check(status_out == 4'hA, "status shows weight bus");
    @(posedge clk); axons = 2'b10; @(posedge clk); axons = 2'b00;
    repeat (2) @(posedge clk);
    readback_sel = 1; #1;
    check(status_out == 4'b0010, "sticky axon flag of neuron 1");
    send(SID_SPIKES, 0, 0, 9'h155);
    check(n_spk_pulses == 1 && spk_seen == 9'h155, "spike pattern issued once");
    check(spk_on_frame_start, "spikes issued in the first cycle of a frame");
    check(status_out == 4'b0000, "axon flags cleared by new spikes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
