// digitds_fpga: FPGA receive processing of a two-probe (bilateral) multigate
// transcranial Doppler.
//
// Each probe has its own transmit/receive track and its own ADC channel, and
// the FPGA runs one complete, independent rx_channel per probe: demodulation,
// CIC gate integration, gain/saturation, the 100-gate slow-time wall filter
// bank and the final data path multiplexer. The channels share only the
// clock and the reset; every setting, line start and output is per channel,
// so the two probes may use different frequencies, gate sizes, pulse timing
// and wall filters. The two-channel arrangement follows the published
// system (two transmission-reception channels, a dual ADC, and memory and
// multiplier use that match two copies of the data path); it being two full
// copies with nothing shared is this design's reading.
//
// Interface: all ports except clk and rst_n are arrays indexed by channel
// 0..N_CH-1 and have the meaning and timing of the rx_channel ports of the
// same name: adc_data is taken every clock, line_sync marks the first sample
// of a line, and gate g of a line started in cycle T0 with decim = R leaves
// in cycle T0+(g+1)*R+3 (bypass) or T0+(g+1)*R+N_TAPS+4 (wall filter).
module digitds_fpga import digitds_pkg::*; #(
  parameter int unsigned N_CH    = 2,
  parameter int unsigned N_GATES = NGATES,
  parameter int unsigned N_TAPS  = TAPS,
  parameter int unsigned R_MAX   = RMAX,
  localparam int unsigned GW     = (N_GATES > 1) ? $clog2(N_GATES) : 1,
  localparam int unsigned DW     = $clog2(R_MAX) + 1,
  localparam int unsigned TW     = $clog2(N_TAPS),
  localparam int unsigned CW     = DDC_W + CIC_N * $clog2(R_MAX),
  localparam int unsigned AW     = 2 * WF_W + $clog2(N_TAPS),
  localparam int unsigned CSW    = $clog2(CW - OUT_W + 1),
  localparam int unsigned WSW    = $clog2(AW - OUT_W + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_data    [N_CH],
  input  logic                    line_sync   [N_CH],
  input  logic [1:0]              freq_sel    [N_CH],
  input  logic [DW-1:0]           decim       [N_CH],
  input  logic [CSW-1:0]          cic_shift   [N_CH],
  input  logic [WSW-1:0]          wf_shift    [N_CH],
  input  logic                    out_sel     [N_CH],
  input  logic                    coef_we     [N_CH],
  input  logic [TW-1:0]           coef_addr   [N_CH],
  input  logic signed [WF_W-1:0]  coef_data   [N_CH],
  output logic                    out_valid   [N_CH],
  output logic [GW-1:0]           out_gate    [N_CH],
  output logic                    out_last    [N_CH],
  output logic signed [OUT_W-1:0] out_i       [N_CH],
  output logic signed [OUT_W-1:0] out_q       [N_CH],
  output logic                    cic_sat     [N_CH],
  output logic                    wf_sat      [N_CH],
  output logic                    wf_overflow [N_CH],
  output logic                    wf_ready    [N_CH]
);
  for (genvar c = 0; c < int'(N_CH); c++) begin : g_ch
    rx_channel #(.N_GATES(N_GATES), .N_TAPS(N_TAPS), .R_MAX(R_MAX)) u_ch (
      .clk, .rst_n,
      .adc_data(adc_data[c]), .line_sync(line_sync[c]), .freq_sel(freq_sel[c]),
      .decim(decim[c]), .cic_shift(cic_shift[c]), .wf_shift(wf_shift[c]),
      .out_sel(out_sel[c]), .coef_we(coef_we[c]), .coef_addr(coef_addr[c]),
      .coef_data(coef_data[c]),
      .out_valid(out_valid[c]), .out_gate(out_gate[c]), .out_last(out_last[c]),
      .out_i(out_i[c]), .out_q(out_q[c]), .cic_sat(cic_sat[c]), .wf_sat(wf_sat[c]),
      .wf_overflow(wf_overflow[c]), .wf_ready(wf_ready[c])
    );
  end
endmodule
