// ddc: digital down converter (quadrature demodulator) of the RF echo.
//
// Every clock one 14-bit two's complement RF sample enters and is multiplied
// by two reference samples: cosine for I and minus sine for Q, so the echo is
// shifted by exp(-j*2*pi*f*t) and a flow towards the probe lands at positive
// baseband frequency. The references come from six small ROMs, one period of
// cosine and one of minus sine for each of three demodulation frequencies,
// 14-bit, sampled at the 64 MHz clock. A 3-to-1 multiplexer in front of each
// multiplier picks the frequency (freq_sel 0,1,2; 3 acts as 2). The 28-bit
// products are the outputs. The multiplier/ROM/multiplexer structure follows
// the published design; the three frequencies (2, 4 and 8 MHz by default,
// i.e. periods of 32, 16 and 8 samples), the sign convention, the rounding
// of the tables (round(8191*cos)) and restarting the reference phase on
// `sync` (or when a newly selected period is shorter than the current
// phase) are this design's choices.
//
// Timing: a sample presented in cycle t (with `sync` in the same cycle for the
// first sample of a receive line, which then uses table entry 0) appears on
// i_out/q_out with out_valid in cycle t+2; out_sync marks the same sample.
// in_valid low holds the phase and produces no output.
module ddc import digitds_pkg::*; #(
  parameter int unsigned IN_W  = ADC_W,
  parameter int unsigned R_W   = REF_W,
  parameter int unsigned PER0  = 32,   // samples per reference period, frequency 0
  parameter int unsigned PER1  = 16,   // frequency 1
  parameter int unsigned PER2  = 8     // frequency 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic                        sync,
  input  logic signed [IN_W-1:0]      rf,
  input  logic [1:0]                  freq_sel,
  output logic                        out_valid,
  output logic                        out_sync,
  output logic signed [IN_W+R_W-1:0]  i_out,
  output logic signed [IN_W+R_W-1:0]  q_out
);
  localparam int unsigned DEPTH = (PER0 > PER1) ? ((PER0 > PER2) ? PER0 : PER2)
                                                : ((PER1 > PER2) ? PER1 : PER2);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  typedef logic signed [R_W-1:0] rom_t [DEPTH];

  // One period of amp*cos (neg=0) or -amp*sin (neg=1), rounded to nearest.
  function automatic rom_t make_table(int unsigned per, bit neg);
    rom_t t;
    real amp, ph, v;
    amp = real'((1 << (R_W - 1)) - 1);
    for (int n = 0; n < int'(DEPTH); n++) begin
      ph = 2.0 * 3.14159265358979323846 * real'(n) / real'(per);
      v  = neg ? -amp * $sin(ph) : amp * $cos(ph);
      t[n] = (n < int'(per)) ? R_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5)) : '0;
    end
    return t;
  endfunction

  localparam rom_t COS0 = make_table(PER0, 1'b0);
  localparam rom_t COS1 = make_table(PER1, 1'b0);
  localparam rom_t COS2 = make_table(PER2, 1'b0);
  localparam rom_t SIN0 = make_table(PER0, 1'b1);
  localparam rom_t SIN1 = make_table(PER1, 1'b1);
  localparam rom_t SIN2 = make_table(PER2, 1'b1);

  logic [AW-1:0] phase, addr, period_last;
  always_comb begin
    unique case (freq_sel)
      2'd0:    period_last = AW'(PER0 - 1);
      2'd1:    period_last = AW'(PER1 - 1);
      default: period_last = AW'(PER2 - 1);
    endcase
    addr = (sync || phase > period_last) ? '0 : phase;
  end

  // Registered ROM reads, one multiplexer per multiplier.
  logic signed [R_W-1:0]  ref_c, ref_s;
  logic signed [IN_W-1:0] rf_d;
  logic                   v_d, s_d;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      v_d   <= 1'b0;
      s_d   <= 1'b0;
    end else begin
      v_d <= in_valid;
      s_d <= in_valid & sync;
      if (in_valid) phase <= (addr >= period_last) ? '0 : addr + 1'b1;
    end
    rf_d <= rf;
    unique case (freq_sel)
      2'd0:    begin ref_c <= COS0[addr]; ref_s <= SIN0[addr]; end
      2'd1:    begin ref_c <= COS1[addr]; ref_s <= SIN1[addr]; end
      default: begin ref_c <= COS2[addr]; ref_s <= SIN2[addr]; end
    endcase
  end

  // The two multipliers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sync  <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= v_d;
      out_sync  <= s_d;
      i_out     <= rf_d * ref_c;
      q_out     <= rf_d * ref_s;
    end
  end
endmodule
