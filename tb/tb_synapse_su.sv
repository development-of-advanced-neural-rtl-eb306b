// tb_synapse_su: checks that every spike edge yields exactly weight-many
// output pulses in the cycles right after it, for every weight 0..15, that a
// held-high input gives only one burst, and that a new spike restarts a burst.
module tb_synapse_su;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic spike_in = 0, strobe, pulse_out;
  logic [W-1:0] weight = '0;
  int checks = 0, failures = 0;

  synapse_su #(.W_BITS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%t FAIL %s", $time, what); end
  endtask

  // expected pulse_out for each cycle after a spike: high for cycles 1..w
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      weight = W'(w);
      spike_in = 1;            // held high for 25 cycles: one burst only
      #1 check(strobe == 1'b1, "strobe on spike edge");
      for (int c = 1; c <= 24; c++) begin
        @(negedge clk);
        check(strobe == 1'b0, "strobe only once");
        check(pulse_out == (c <= w), $sformatf("w=%0d cycle %0d pulse %0d", w, c, pulse_out));
      end
      spike_in = 0;
      @(negedge clk);
    end
    // restart: weight 10, second spike after 4 cycles -> 4 + 10 pulses
    weight = 4'd10;
    spike_in = 1; @(negedge clk); spike_in = 0;
    repeat (3) @(negedge clk);
    spike_in = 1;
    begin
      int n; n = 0;
      for (int c = 0; c < 30; c++) begin @(negedge clk); spike_in = 0; n += pulse_out; end
      check(n == 10, $sformatf("restarted burst gives 10 more pulses, got %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
