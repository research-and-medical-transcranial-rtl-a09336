// tb_rx_channel: self-checking test of one receive channel at its full
// size (100 gates, 64 taps, decimation up to 128).
//
// The testbench plays the role of the ADC and of the control processor. Each
// receive line starts with line_sync and lasts about 100*R+90 clocks of RF
// samples: a 2/4/8 MHz echo tone whose phase moves from line to line (a
// Doppler shift) plus noise. A reference model written here, independently
// of the RTL, demodulates every sample with rounded cosine / minus sine
// tables, sums the gate windows, applies the first gain/saturation, runs the
// 64-tap slow-time FIR of every gate (including which gate samples the busy
// filter drops), applies the second gain/saturation and predicts every
// output word, its gate number and the exact cycle it appears.
//
// The run covers 75 lines: the three demodulation frequencies, decimation
// 128, 100, 64 (the fastest the wall filter keeps up with) and 40 (gates
// dropped, wf_overflow), bypass and wall filter outputs, saturation in both
// gain stages and a coefficient reload. Each of these must happen at least
// once.
module tb_rx_channel;
  import digitds_pkg::*;
  localparam int NGT = 100, NT = 64;
  localparam int PER [3] = '{32, 16, 8};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] adc_data = '0;
  logic line_sync = 1'b0;
  logic [1:0] freq_sel = '0;
  logic [7:0] decim = 8'd128;
  logic [4:0] cic_shift = 5'd13, wf_shift = 5'd17;
  logic out_sel = 1'b0;
  logic coef_we = 1'b0;
  logic [5:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic out_valid, out_last, cic_sat, wf_sat, wf_overflow, wf_ready;
  logic [6:0] out_gate;
  logic signed [15:0] out_i, out_q;

  rx_channel dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_freq [3], cnt_bypass = 0, cnt_wall = 0, cnt_cic_sat = 0, cnt_wf_sat = 0;
  int cnt_ovf = 0, cnt_reload = 0, cnt_decim_change = 0, cnt_drop_model = 0;

  // ---------------- reference model ----------------
  longint coef [NT];
  longint hist_i [NGT][NT], hist_q [NGT][NT];
  int     wp = 0;
  longint ready_at = 0;     // first cycle the model filter can accept again

  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : $rtoi(v - 0.5);
  endfunction

  function automatic longint gsat(longint v, int sh, int maxsh, output bit s);
    longint d, r;
    if (sh > maxsh) sh = maxsh;
    d = longint'(1) << sh;
    r = (v >= 0) ? v / d : -((-v + d - 1) / d);
    s = 1'b0;
    if (r > 32767)  begin r = 32767;  s = 1'b1; end
    if (r < -32768) begin r = -32768; s = 1'b1; end
    return r;
  endfunction

  typedef struct { longint i, q; int gate; bit last; longint due; } exp_t;
  exp_t q[$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (q.size() > 0 && q[0].due == cyc) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (!out_valid || longint'(out_i) != e.i || longint'(out_q) != e.q ||
          int'(out_gate) != e.gate || out_last != e.last) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d: I %0d exp %0d Q %0d exp %0d gate %0d/%0d v %0b",
                                    cyc, out_i, e.i, out_q, e.q, out_gate, e.gate, out_valid);
      end
    end else if (out_valid) begin
      failures++;
      if (failures < 10) $display("FAIL cyc %0d: unexpected out_valid gate %0d", cyc, out_gate);
    end
    if (cic_sat) cnt_cic_sat++;
    if (wf_sat) cnt_wf_sat++;
    if (wf_overflow) cnt_ovf++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_coefs(int kind);
    for (int k = 0; k < NT; k++) begin
      @(negedge clk);
      coef_we   = 1'b1;
      coef_addr = 6'(k);
      // kind 0: a delay line canceller (1, -1) scaled; kind 1: random taps
      if (kind == 0) coef_data = (k == 0) ? 16'sd16384 : (k == 1) ? -16'sd16384 : 16'sd0;
      else           coef_data = 16'($urandom);
      coef[k] = longint'(coef_data);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // One receive line with the given settings; drives samples and predicts outputs.
  task automatic run_line(int line, int fsel, int r, bit bypass, int csh, int wsh);
    longint t0, gi, gq, acc_i, acc_q;
    int n, p, len;
    real ph0;
    @(negedge clk);
    freq_sel  = 2'(fsel);
    decim     = 8'(r);
    out_sel   = bypass;
    cic_shift = 5'(csh);
    wf_shift  = 5'(wsh);
    cnt_freq[fsel]++;
    p   = PER[fsel];
    len = NGT * r + 90;
    n   = 0;
    acc_i = 0; acc_q = 0;
    ph0 = 0.7 * real'(line);                  // Doppler phase step per line
    t0  = cyc;                                // sample s is driven after posedge t0+s
    for (int s = 0; s < len; s++) begin
      real v;
      if (s > 0) @(negedge clk);
      line_sync = (s == 0);
      v = 6000.0 * $cos(2.0 * 3.14159265358979 * real'(s) / real'(p) + ph0)
          + real'($urandom_range(0, 4000)) - 2000.0;
      if (line % 9 == 4) v = (s % p < p / 2) ? 8191.0 : -8192.0;  // strong echo
      adc_data = 14'(rnd(v));
      if (s < NGT * r) begin
        real a;
        int g;
        a = 2.0 * 3.14159265358979323846 * real'(n) / real'(p);
        acc_i += longint'(adc_data) * rnd(8191.0 * $cos(a));
        acc_q += longint'(adc_data) * rnd(-8191.0 * $sin(a));
        n = (n + 1 >= p) ? 0 : n + 1;
        g = s / r;
        if (s % r == r - 1) begin
          longint arrive, si, sq;
          bit s1, s2, s3, s4, last;
          exp_t e;
          last = (g == NGT - 1);
          gi = gsat(acc_i, csh, 19, s1);
          gq = gsat(acc_q, csh, 19, s2);
          acc_i = 0; acc_q = 0;
          arrive = t0 + s + 4;                 // posedge at which the wall filter sees it
          if (bypass) begin
            e.i = gi; e.q = gq; e.gate = g; e.last = last; e.due = t0 + s + 4;
            q.push_back(e);
            cnt_bypass++;
          end
          if (arrive >= ready_at) begin
            ready_at = arrive + 64;
            hist_i[g][wp] = gi;
            hist_q[g][wp] = gq;
            si = 0; sq = 0;
            for (int k = 0; k < NT; k++) begin
              si += coef[k] * hist_i[g][(wp - k + NT) % NT];
              sq += coef[k] * hist_q[g][(wp - k + NT) % NT];
            end
            if (!bypass) begin
              e.i = gsat(si, wsh, 22, s3); e.q = gsat(sq, wsh, 22, s4);
              e.gate = g; e.last = last; e.due = t0 + s + 69;
              q.push_back(e);
              cnt_wall++;
            end
          end else cnt_drop_model++;
          if (last) wp = (wp + 1) % NT;
        end
      end
    end
    @(negedge clk);
    line_sync = 1'b0;
  endtask

  initial begin
    int r_prev;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int g = 0; g < NGT; g++) for (int k = 0; k < NT; k++) begin hist_i[g][k] = 0; hist_q[g][k] = 0; end
    wait (wf_ready);
    checks++;
    if (cyc < NGT * NT) begin failures++; $display("FAIL: ready before the state RAM was cleared"); end
    load_coefs(0);
    r_prev = 128;
    for (int l = 0; l < 75; l++) begin
      int fsel, r, csh, wsh;
      bit byp;
      fsel = (l / 5) % 3;
      r    = (l == 30) ? 100 : (l == 31) ? 64 : (l == 72) ? 40 : 128;
      byp  = (l % 11 == 10);
      csh  = 17;
      wsh  = (l >= 50) ? 17 : 14;
      if (l == 50) begin load_coefs(1); cnt_reload++; end
      if (r != r_prev) cnt_decim_change++;
      r_prev = r;
      run_line(l, fsel, r, byp, csh, wsh);
    end
    repeat (100) @(negedge clk);
    // every mechanism must have happened
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d outputs never came", q.size()); end
    checks++;
    if (cnt_freq[0] == 0 || cnt_freq[1] == 0 || cnt_freq[2] == 0 || cnt_bypass == 0 ||
        cnt_wall == 0 || cnt_cic_sat == 0 || cnt_wf_sat == 0 || cnt_ovf == 0 ||
        cnt_ovf != cnt_drop_model || cnt_reload == 0 || cnt_decim_change == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("freq lines %0d/%0d/%0d, bypass outs %0d, wall outs %0d, cic_sat %0d, wf_sat %0d, overflow %0d (model %0d), decim changes %0d, coef reloads %0d",
             cnt_freq[0], cnt_freq[1], cnt_freq[2], cnt_bypass, cnt_wall, cnt_cic_sat, cnt_wf_sat,
             cnt_ovf, cnt_drop_model, cnt_decim_change, cnt_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
