// snn_ref_pkg: cycle-level reference models used by the testbenches.
//
// Each model advances by one clock period per step() call: the inputs given
// are those held between two rising edges, and after the call the model's
// state is what the RTL holds right after the next rising edge. The soma's
// synapse inputs reader samples at the falling edge in between, which the
// model reproduces by forming the input value from the pulse lines of the
// state before the step.
package snn_ref_pkg;

  class soma_model;
    int n_syn, mp_max, frame_len, rest;
    int factor, in_value, mp, frame_cnt, threshold, axon;
    int n_fire, n_leak_dn, n_leak_up, n_frame_reset, n_sat;

    function new(int n_syn = 9, int mp_bits = 7, int frame_len = 16, int rest = 6,
                 int thr = 64, int factor = 1);
      this.n_syn = n_syn; this.mp_max = (1 << mp_bits) - 1;
      this.frame_len = frame_len; this.rest = rest;
      this.factor = factor; this.in_value = 0; this.mp = rest; this.frame_cnt = 0;
      this.threshold = thr; this.axon = 0;
    endfunction

    function int frame_end();
      return frame_cnt == frame_len - 1;
    endfunction

    // pulses: synapse lines during the period (sampled at the falling edge)
    function void step(bit [31:0] pulses, bit thr_wr, int thr_in, bit fac_wr, int fac_in);
      int cnt, sum, fire, fe;
      cnt = $countones(pulses);
      in_value = cnt * factor;            // falling edge
      if (fac_wr) factor = fac_in;
      fe  = frame_end();                  // rising edge
      sum = mp + in_value;
      if (sum > mp_max) begin sum = mp_max; n_sat++; end
      fire = sum > threshold;
      if (fire) begin mp = 0; n_fire++; end
      else if (fe) begin mp = rest; n_frame_reset++; end
      else if (in_value != 0) mp = sum;
      else if (mp > rest) begin mp--; n_leak_dn++; end
      else if (mp < rest) begin mp++; n_leak_up++; end
      axon = fire;
      if (thr_wr) threshold = thr_in;
      frame_cnt = fe ? 0 : frame_cnt + 1;
    endfunction
  endclass

  class neuron_model;
    int n_syn, wmax;
    int w[], spike_d[], busy[], cnt2[], ps[], qs[];
    soma_model soma;
    int n_inc, n_dec, n_hold_sat, n_sat_hi, n_sat_lo;

    function new(int n_syn = 9, int w_bits = 4, int mp_bits = 7, int frame_len = 16,
                 int rest = 6, int thr = 64, int factor = 1);
      this.n_syn = n_syn; this.wmax = (1 << w_bits) - 1;
      w = new[n_syn]; spike_d = new[n_syn]; busy = new[n_syn]; cnt2 = new[n_syn];
      ps = new[n_syn]; qs = new[n_syn];
      foreach (w[i]) begin w[i] = 0; spike_d[i] = 0; busy[i] = 0; cnt2[i] = 0; ps[i] = 0; qs[i] = 0; end
      soma = new(n_syn, mp_bits, frame_len, rest, thr, factor);
    endfunction

    function bit [31:0] pulses();
      bit [31:0] p = '0;
      for (int i = 0; i < n_syn; i++) p[i] = busy[i] && (cnt2[i] < w[i]);
      return p;
    endfunction

    function int weight_rd(bit [31:0] rd);
      int r = 0;
      for (int i = 0; i < n_syn; i++) if (rd[i]) r |= w[i];
      return r;
    endfunction

    function void step(bit [31:0] spikes, bit learn_en, bit [31:0] wr, int weight_in,
                       bit thr_wr, int thr_in, bit fac_wr, int fac_in);
      bit [31:0] p;
      int fe, pos;
      p   = pulses();
      fe  = soma.frame_end();
      pos = soma.axon;                  // axon before this edge
      for (int i = 0; i < n_syn; i++) begin
        int strobe, pf, qf, w_old;
        w_old  = w[i];
        strobe = spikes[i] && !spike_d[i];
        pf = ps[i] | strobe; qf = qs[i] | pos;
        if (wr[i]) w[i] = weight_in;
        else if (learn_en && fe) begin
          if (pf && qf) begin if (w[i] < wmax) begin w[i]++; n_inc++; end else begin n_hold_sat++; n_sat_hi++; end end
          else if (pf || qf) begin if (w[i] > 0) begin w[i]--; n_dec++; end else begin n_hold_sat++; n_sat_lo++; end end
        end
        if (fe) begin ps[i] = 0; qs[i] = 0; end else begin ps[i] = pf; qs[i] = qf; end
        // supervising unit (uses the weight before this edge)
        spike_d[i] = spikes[i];
        if (strobe) begin busy[i] = 1; cnt2[i] = 0; end
        else if (busy[i]) begin
          if (cnt2[i] < w_old) cnt2[i]++;
          else busy[i] = 0;
        end
      end
      soma.step(p, thr_wr, thr_in, fac_wr, fac_in);
    endfunction
  endclass

endpackage
