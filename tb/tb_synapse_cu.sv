// tb_synapse_cu: random test of the synapse Control Unit against a
// cycle-level reference model of the weight register, the frame flags and
// the Hebbian rule (including saturation at 0 and 15 and the write priority).
module tb_synapse_cu;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic wr = 0, rd = 0, learn_en = 0, frame_end = 0, prs = 0, pos = 0;
  logic [W-1:0] weight_in = '0, weight_rd, weight;
  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_sat_hi = 0, n_sat_lo = 0;

  synapse_cu #(.W_BITS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_w, m_ps, m_qs;
  initial begin
    m_w = 0; m_ps = 0; m_qs = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      checks++;
      if (weight !== W'(m_w) || weight_rd !== (rd ? W'(m_w) : W'(0))) begin
        failures++;
        if (failures < 10) $display("cyc %0d: weight %0d rd_bus %0d expected %0d", cyc, weight, weight_rd, m_w);
      end
      // new stimulus
      wr        = ($urandom_range(0, 40) == 0);
      weight_in = W'($urandom);
      rd        = $urandom_range(0, 1);
      learn_en  = ($urandom_range(0, 9) != 0);
      frame_end = (cyc % 16 == 15);
      prs       = ($urandom_range(0, 19) == 0) && (cyc % 400 < 300);
      pos       = ($urandom_range(0, 24) == 0) && (cyc % 800 < 500);
      if (cyc % 1000 >= 600) begin prs = 1; pos = 1; wr = 0; end  // strengthening phase
      // reference model for the coming rising edge
      begin
        int p, q, nw;
        p = m_ps | prs; q = m_qs | pos; nw = m_w;
        if (wr) nw = weight_in;
        else if (learn_en && frame_end) begin
          if (p && q) begin if (m_w < 15) begin nw = m_w + 1; n_inc++; end else n_sat_hi++; end
          else if (p || q) begin if (m_w > 0) begin nw = m_w - 1; n_dec++; end else n_sat_lo++; end
        end
        if (frame_end) begin m_ps = 0; m_qs = 0; end else begin m_ps = p; m_qs = q; end
        m_w = nw;
      end
    end
    if (n_inc == 0 || n_dec == 0 || n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("coverage: inc %0d dec %0d sat_hi %0d sat_lo %0d", n_inc, n_dec, n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
