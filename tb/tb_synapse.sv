// tb_synapse: writes and reads the weight over the bus, checks that a spike
// gives exactly weight-many pulses, and runs frames of learning: both spikes
// -> +1, only one of them -> -1, neither -> unchanged, saturating at 0 and 15.
module tb_synapse;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic spike_in = 0, pulse_out, wr = 0, rd = 0, learn_en = 0, frame_end = 0, axon = 0;
  logic [W-1:0] weight_in = '0, weight_rd, weight;
  int checks = 0, failures = 0;

  synapse dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%t FAIL %s", $time, what); end
  endtask

  task automatic write_w(input int v);
    @(negedge clk); wr = 1; weight_in = W'(v);
    @(negedge clk); wr = 0;
  endtask

  // one 16-cycle frame: optional spike in cycle 1, optional axon in cycle 5,
  // returns the number of output pulses seen
  task automatic frame(input bit pre, input bit post, output int npulses);
    npulses = 0;
    for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      npulses += pulse_out;
      spike_in  = pre && (c == 1);
      axon      = post && (c == 5);
      frame_end = (c == 15);
    end
    @(negedge clk); npulses += pulse_out;
    spike_in = 0; axon = 0; frame_end = 0;
  endtask

  initial begin
    int np, exp_w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // bus write / read and burst length for every weight, no learning
    for (int v = 0; v < 16; v++) begin
      write_w(v);
      rd = 1; #1;
      check(weight_rd == W'(v), $sformatf("read back %0d", v));
      rd = 0; #1;
      check(weight_rd == '0, "bus released without rd");
      frame(1, 0, np);
      check(np == v, $sformatf("weight %0d gave %0d pulses", v, np));
      check(weight == W'(v), "weight unchanged with learning off");
    end
    // learning
    learn_en = 1;
    write_w(7); exp_w = 7;
    for (int k = 0; k < 40; k++) begin
      bit pre, post;
      pre  = (k < 12) ? 1 : (k < 26) ? (k % 2) : (k < 34 ? 0 : (k % 3 == 0));
      post = (k < 12) ? 1 : (k < 26) ? 0 : (k < 34 ? (k % 2) : 0);
      frame(pre, post, np);
      if (pre && post) exp_w = (exp_w < 15) ? exp_w + 1 : 15;
      else if (pre || post) exp_w = (exp_w > 0) ? exp_w - 1 : 0;
      check(weight == W'(exp_w), $sformatf("frame %0d pre %0d post %0d weight %0d exp %0d",
                                            k, pre, post, weight, exp_w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
