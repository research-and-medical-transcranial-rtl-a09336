// tb_cic_response: measures the gate (CIC) frequency response of one receive
// channel at decimation 128, the operating point whose response is plotted
// for this design: a sinc with 42 dB gain at DC and nulls every
// 64 MHz / 128 = 0.5 MHz.
//
// For each offset d an RF tone at 2 MHz + d is played into rx_channel in
// bypass mode (cic_shift 17 keeps it in 16 bits). The mean magnitude of
// gates 5..94 is compared with the same mean computed here in floating
// point from the exact, unrounded references: each gate is the sum over its
// R samples of rf*exp(-j*2*pi*2MHz*t), scaled by 8191/2^17. That sum holds
// the wanted tone at +d, weighted by D(d) = sin(pi*d*R/fs)/sin(pi*d/fs),
// and the demodulation image at -(4 MHz + d). Offsets of 0.5, 1.0 and
// 1.5 MHz put both on nulls and must give (almost) nothing. The printed
// column D(d) in dB is the response itself: -13.5 dB at the first sidelobe.
module tb_cic_response;
  import digitds_pkg::*;
  localparam real FS = 64.0e6, F0 = 2.0e6, A = 8000.0, PI = 3.14159265358979323846;
  localparam int R = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] adc_data = '0;
  logic line_sync = 1'b0, out_sel = 1'b1, coef_we = 1'b0;
  logic [1:0] freq_sel = 2'd0;
  logic [7:0] decim = 8'(R);
  logic [4:0] cic_shift = 5'd17, wf_shift = 5'd22;
  logic [5:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic out_valid, out_last, cic_sat, wf_sat, wf_overflow, wf_ready;
  logic [6:0] out_gate;
  logic signed [15:0] out_i, out_q;

  rx_channel dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real mag_sum;
  int  mag_n;

  real exp_sum;
  always @(posedge clk)
    if (out_valid && out_gate >= 5 && out_gate < 95) begin
      mag_sum += $sqrt(real'(out_i) * real'(out_i) + real'(out_q) * real'(out_q));
      mag_n++;
    end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real resp(real d);
    real x;
    x = PI * d / FS;
    return (d == 0.0) ? real'(R) : $sin(x * R) / $sin(x);
  endfunction

  task automatic measure(real d, output real mag, output real emag);
    real ei, eq;
    int  ne;
    mag_sum = 0.0;
    mag_n   = 0;
    exp_sum = 0.0;
    ne = 0;
    ei = 0.0; eq = 0.0;
    for (int s = 0; s < NGATES * R + 120; s++) begin
      @(negedge clk);
      line_sync = (s == 0);
      adc_data  = 14'($rtoi(A * $cos(2.0 * PI * (F0 + d) * real'(s) / FS + 0.3)));
      if (s < NGATES * R) begin
        ei += real'(adc_data) * 8191.0 * $cos(2.0 * PI * F0 * real'(s) / FS);
        eq -= real'(adc_data) * 8191.0 * $sin(2.0 * PI * F0 * real'(s) / FS);
        if (s % R == R - 1) begin
          if (s / R >= 5 && s / R < 95) begin
            exp_sum += $sqrt(ei * ei + eq * eq) / 131072.0;
            ne++;
          end
          ei = 0.0; eq = 0.0;
        end
      end
    end
    @(negedge clk);
    line_sync = 1'b0;
    mag  = mag_sum / real'(mag_n);
    emag = exp_sum / real'(ne);
  endtask

  initial begin
    real offs [7] = '{0.0, 0.25e6, 0.5e6, 0.75e6, 1.0e6, 1.25e6, 1.5e6};
    real m, e, m0, tol;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 7; t++) begin
      measure(offs[t], m, e);
      if (t == 0) m0 = m;
      tol = 0.005 * e + 2.0;
      checks++;
      $display("offset %4.2f MHz: |gate| %8.1f expected %8.1f (%6.1f dB re DC); D(d) %6.1f dB",
               offs[t] / 1.0e6, m, e, 20.0 * $log10((m + 1.0e-3) / m0),
               20.0 * $log10(fabs(resp(offs[t])) / real'(R) + 1.0e-9));
      if (fabs(m - e) > tol) begin
        failures++;
        $display("FAIL: response at %0.2f MHz off by %0.1f", offs[t] / 1.0e6, m - e);
      end
    end
    // DC gain of the gate sum itself: 20*log10(128) = 42.1 dB
    checks++;
    if (fabs(20.0 * $log10(resp(0.0)) - 42.1) > 0.1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
