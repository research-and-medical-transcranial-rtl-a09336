// tb_digitds_fpga: end-to-end self-checking test of the two-channel receive
// processing at its full size (2 channels, 100 gates, 64 taps, decimation up
// to 128), no parameters overridden.
//
// The testbench plays both ADC channels and the control processor. The two
// channels run at the same time with different settings and independent
// line timing: each line starts with line_sync and lasts about 100*R+90
// clocks of RF samples, a 2/4/8 MHz echo tone whose phase moves from line to
// line (a Doppler shift) plus noise. A reference model written here,
// independently of the RTL, demodulates every sample with rounded cosine /
// minus sine tables, sums the gate windows, applies the first
// gain/saturation, runs the 64-tap slow-time FIR of every gate (including
// which gate samples the busy filter drops), applies the second
// gain/saturation and predicts every output word, its gate number and the
// exact cycle it appears, per channel.
//
// Covered: all three demodulation frequencies; decimation 128, 96, 100, 64
// (the fastest the wall filter keeps up with), 40 and 50 (gates dropped,
// wf_overflow); bypass and wall filter outputs; saturation in both gain
// stages; a coefficient reload; and both channels busy at once. Each must
// happen at least once.
module tb_digitds_fpga;
  import digitds_pkg::*;
  localparam int NC = 2, NGT = 100, NT = 64;
  localparam int PER [3] = '{32, 16, 8};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] adc_data [NC];
  logic line_sync [NC];
  logic [1:0] freq_sel [NC];
  logic [7:0] decim [NC];
  logic [4:0] cic_shift [NC], wf_shift [NC];
  logic out_sel [NC], coef_we [NC];
  logic [5:0] coef_addr [NC];
  logic signed [15:0] coef_data [NC];
  logic out_valid [NC], out_last [NC], cic_sat [NC], wf_sat [NC], wf_overflow [NC], wf_ready [NC];
  logic [6:0] out_gate [NC];
  logic signed [15:0] out_i [NC], out_q [NC];

  digitds_fpga dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_freq [3], cnt_bypass [NC], cnt_wall [NC], cnt_cic_sat = 0, cnt_wf_sat = 0;
  int cnt_ovf [NC], cnt_drop_model [NC], cnt_reload = 0, cnt_both_busy = 0;
  int decims_seen [int];

  // ---------------- reference model, one per channel ----------------
  longint coef [NC][NT];
  longint hist_i [NC][NGT][NT], hist_q [NC][NGT][NT];
  int     wp [NC];
  longint ready_at [NC];
  bit     line_on [NC];

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
  exp_t q0[$], q1[$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic push(int c, exp_t e);
    if (c == 0) q0.push_back(e); else q1.push_back(e);
  endtask

  task automatic compare(int c, ref exp_t q[$]);
    if (q.size() > 0 && q[0].due == cyc) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (!out_valid[c] || longint'(out_i[c]) != e.i || longint'(out_q[c]) != e.q ||
          int'(out_gate[c]) != e.gate || out_last[c] != e.last) begin
        failures++;
        if (failures < 10) $display("FAIL ch %0d cyc %0d: I %0d exp %0d Q %0d exp %0d gate %0d/%0d v %0b",
                                    c, cyc, out_i[c], e.i, out_q[c], e.q, out_gate[c], e.gate, out_valid[c]);
      end
    end else if (out_valid[c]) begin
      failures++;
      if (failures < 10) $display("FAIL ch %0d cyc %0d: unexpected out_valid gate %0d", c, cyc, out_gate[c]);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    compare(0, q0);
    compare(1, q1);
    for (int c = 0; c < NC; c++) begin
      if (cic_sat[c]) cnt_cic_sat++;
      if (wf_sat[c]) cnt_wf_sat++;
      if (wf_overflow[c]) cnt_ovf[c]++;
    end
    if (line_on[0] && line_on[1]) cnt_both_busy++;
  end

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_coefs(int c, int kind);
    for (int k = 0; k < NT; k++) begin
      @(negedge clk);
      coef_we[c]   = 1'b1;
      coef_addr[c] = 6'(k);
      // kind 0: a delay line canceller (1, -1) scaled; kind 1: random taps
      if (kind == 0) coef_data[c] = (k == 0) ? 16'sd16384 : (k == 1) ? -16'sd16384 : 16'sd0;
      else           coef_data[c] = 16'($urandom);
      coef[c][k] = longint'(coef_data[c]);
    end
    @(negedge clk);
    coef_we[c] = 1'b0;
  endtask

  // One receive line on channel c; drives samples and predicts outputs.
  task automatic run_line(int c, int line, int fsel, int r, bit bypass, int csh, int wsh);
    longint t0, gi, gq, acc_i, acc_q;
    int n, p, len;
    real ph0;
    @(negedge clk);
    freq_sel[c]  = 2'(fsel);
    decim[c]     = 8'(r);
    out_sel[c]   = bypass;
    cic_shift[c] = 5'(csh);
    wf_shift[c]  = 5'(wsh);
    cnt_freq[fsel]++;
    decims_seen[r] = 1;
    line_on[c] = 1'b1;
    p   = PER[fsel];
    len = NGT * r + 90;
    n   = 0;
    acc_i = 0; acc_q = 0;
    ph0 = (c == 0 ? 0.7 : -0.4) * real'(line);   // Doppler phase step per line
    t0  = cyc;                                   // sample s is driven after posedge t0+s
    for (int s = 0; s < len; s++) begin
      real v;
      if (s > 0) @(negedge clk);
      line_sync[c] = (s == 0);
      v = 6000.0 * $cos(2.0 * 3.14159265358979 * real'(s) / real'(p) + ph0)
          + real'($urandom_range(0, 4000)) - 2000.0;
      if (line % 9 == 4) v = (s % p < p / 2) ? 8191.0 : -8192.0;  // strong echo
      adc_data[c] = 14'(rnd(v));
      if (s < NGT * r) begin
        real a;
        int g;
        a = 2.0 * 3.14159265358979323846 * real'(n) / real'(p);
        acc_i += longint'(adc_data[c]) * rnd(8191.0 * $cos(a));
        acc_q += longint'(adc_data[c]) * rnd(-8191.0 * $sin(a));
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
            push(c, e);
            cnt_bypass[c]++;
          end
          if (arrive >= ready_at[c]) begin
            ready_at[c] = arrive + 64;
            hist_i[c][g][wp[c]] = gi;
            hist_q[c][g][wp[c]] = gq;
            si = 0; sq = 0;
            for (int k = 0; k < NT; k++) begin
              si += coef[c][k] * hist_i[c][g][(wp[c] - k + NT) % NT];
              sq += coef[c][k] * hist_q[c][g][(wp[c] - k + NT) % NT];
            end
            if (!bypass) begin
              e.i = gsat(si, wsh, 22, s3); e.q = gsat(sq, wsh, 22, s4);
              e.gate = g; e.last = last; e.due = t0 + s + 69;
              push(c, e);
              cnt_wall[c]++;
            end
          end else cnt_drop_model[c]++;
          if (last) wp[c] = (wp[c] + 1) % NT;
        end
      end
    end
    @(negedge clk);
    line_sync[c] = 1'b0;
    line_on[c] = 1'b0;
  endtask

  // Channel 0: DLC wall filter, mostly R = 128, random taps from line 50.
  task automatic run_ch0();
    load_coefs(0, 0);
    for (int l = 0; l < 75; l++) begin
      int r;
      r = (l == 30) ? 100 : (l == 31) ? 64 : (l == 72) ? 40 : 128;
      if (l == 50) begin load_coefs(0, 1); cnt_reload++; end
      run_line(0, l, (l / 5) % 3, r, l % 11 == 10, 17, (l >= 50) ? 17 : 14);
    end
  endtask

  // Channel 1: random taps, R = 96, other frequency order, own line timing.
  task automatic run_ch1();
    load_coefs(1, 1);
    repeat (777) @(negedge clk);
    for (int l = 0; l < 72; l++) begin
      int r;
      r = (l == 40) ? 50 : 96;
      run_line(1, l, 2 - (l / 7) % 3, r, l % 13 == 6, 17, 17);
    end
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      adc_data[c] = '0; line_sync[c] = 1'b0; freq_sel[c] = '0; decim[c] = 8'd128;
      cic_shift[c] = 5'd17; wf_shift[c] = 5'd17; out_sel[c] = 1'b0; coef_we[c] = 1'b0;
      coef_addr[c] = '0; coef_data[c] = '0; wp[c] = 0; ready_at[c] = 0; line_on[c] = 1'b0;
      cnt_bypass[c] = 0; cnt_wall[c] = 0; cnt_ovf[c] = 0; cnt_drop_model[c] = 0;
      for (int g = 0; g < NGT; g++) for (int k = 0; k < NT; k++) begin
        hist_i[c][g][k] = 0; hist_q[c][g][k] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (wf_ready[0] && wf_ready[1]);
    checks++;
    if (cyc < NGT * NT) begin failures++; $display("FAIL: ready before the state RAM was cleared"); end
    fork
      run_ch0();
      run_ch1();
    join
    repeat (100) @(negedge clk);
    // every mechanism must have happened
    checks++;
    if (q0.size() != 0 || q1.size() != 0) begin
      failures++;
      $display("FAIL: %0d/%0d outputs never came", q0.size(), q1.size());
    end
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (cnt_bypass[c] == 0 || cnt_wall[c] == 0 || cnt_ovf[c] == 0 || cnt_ovf[c] != cnt_drop_model[c]) begin
        failures++;
        $display("FAIL: channel %0d missed a mechanism", c);
      end
    end
    checks++;
    if (cnt_freq[0] == 0 || cnt_freq[1] == 0 || cnt_freq[2] == 0 || cnt_cic_sat == 0 ||
        cnt_wf_sat == 0 || cnt_reload == 0 || decims_seen.num() < 5 || cnt_both_busy == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("freq lines %0d/%0d/%0d, decim values %0d, bypass outs %0d/%0d, wall outs %0d/%0d, cic_sat %0d, wf_sat %0d",
             cnt_freq[0], cnt_freq[1], cnt_freq[2], decims_seen.num(), cnt_bypass[0], cnt_bypass[1],
             cnt_wall[0], cnt_wall[1], cnt_cic_sat, cnt_wf_sat);
    $display("overflow %0d/%0d (model %0d/%0d), coef reloads %0d, cycles with both channels active %0d",
             cnt_ovf[0], cnt_ovf[1], cnt_drop_model[0], cnt_drop_model[1], cnt_reload, cnt_both_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
