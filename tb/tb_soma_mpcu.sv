// tb_soma_mpcu: random input values and fire requests against a reference
// model of the membrane potential: saturating add, reset to zero on fire,
// return to the resting potential at frame end, leak by one towards the
// resting potential on idle cycles, and a 16-cycle frame counter.
module tb_soma_mpcu;
  localparam int MPB = 7, IB = 6, FL = 16, REST = 6;
  logic clk = 0, rst_n = 0;
  logic [IB-1:0] in_value = '0;
  logic fire = 0;
  logic [MPB-1:0] mp, mp_sum;
  logic frame_end;
  int checks = 0, failures = 0;
  int n_fire = 0, n_fe = 0, n_add = 0, n_dn = 0, n_up = 0, n_sat = 0;

  soma_mpcu #(.MP_BITS(MPB), .IN_BITS(IB), .FRAME_LEN(FL), .REST_MP(REST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_mp, m_fc, sum, fe_cnt;
    m_mp = REST; m_fc = 0; fe_cnt = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 8000; c++) begin
      // stimulus for this period
      in_value = ($urandom_range(0, 2) == 0) ? IB'($urandom_range(1, 40)) : '0;
      if ((c / 200) % 2 == 1) in_value = '0;     // idle stretches: let the leak act
      fire     = ($urandom_range(0, 30) == 0);
      #1;
      sum = m_mp + in_value; if (sum > 127) sum = 127;
      checks++;
      if (mp_sum !== MPB'(sum) || frame_end !== (m_fc == FL - 1)) begin
        failures++;
        if (failures < 10) $display("c=%0d mp_sum %0d exp %0d frame_end %0d", c, mp_sum, sum, frame_end);
      end
      if (m_mp + in_value > 127) n_sat++;
      if (fire) begin m_mp = 0; n_fire++; end
      else if (m_fc == FL - 1) begin m_mp = REST; n_fe++; end
      else if (in_value != 0) begin m_mp = sum; n_add++; end
      else if (m_mp > REST) begin m_mp--; n_dn++; end
      else if (m_mp < REST) begin m_mp++; n_up++; end
      m_fc = (m_fc == FL - 1) ? 0 : m_fc + 1;
      @(posedge clk); #1;
      checks++;
      if (mp !== MPB'(m_mp)) begin
        failures++;
        if (failures < 10) $display("c=%0d mp %0d exp %0d", c, mp, m_mp);
      end
    end
    if (!n_fire || !n_fe || !n_add || !n_dn || !n_up || !n_sat) begin
      failures++;
      $display("coverage fire %0d fe %0d add %0d dn %0d up %0d sat %0d", n_fire, n_fe, n_add, n_dn, n_up, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
