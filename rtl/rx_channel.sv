// rx_channel: one receive channel of the FPGA data path of a multigate
// pulsed-wave transcranial Doppler. It turns the 64 MS/s RF echo of one
// probe into 16-bit complex baseband samples, one per range gate per
// transmitted pulse, with the slow-time clutter already reduced, so that
// software only has to do the final wall filtering, velocity estimation and
// spectral analysis.
//
// Chain: ddc (RF x cos / -sin, three selectable frequencies) -> two
// cic_decimator (I and Q; one output per gate of `decim` samples) -> two
// gain_sat (16 of the 35 CIC bits) -> wall_filter_bank (64-tap FIR along
// slow time for every gate, I and Q) -> two gain_sat (16 of the 38 bits) ->
// final data path multiplexer -> out_*. The chain, widths and sizes follow
// the published design. The multiplexer's inputs are not given there: here it
// chooses between the wall filter output (out_sel = 0) and the gain-scaled CIC
// output that bypasses the wall filter (out_sel = 1), which is this design's
// choice. Control values are plain ports because the link to the control
// processor is not part of this design.
//
// Timing: adc_data is taken every clock. line_sync marks the first RF sample
// of a receive line (the start of gate 0). With line_sync in cycle T0 and
// decim = R, gate g is on out_* in cycle T0+(g+1)*R+3 in bypass and in cycle
// T0+(g+1)*R+N_TAPS+4 through the wall filter. decim is latched at
// line_sync; the other settings act at once and are meant to be changed
// between lines. The wall filter needs N_TAPS cycles per gate, so R must
// be at least that (64 by default; the usual R is 128); faster gates are
// dropped and counted on wf_overflow. After reset the wall filter spends
// N_GATES*N_TAPS cycles clearing its state (wf_ready low); coefficients are
// written afterwards.
module rx_channel import digitds_pkg::*; #(
  parameter int unsigned N_GATES = NGATES,
  parameter int unsigned N_TAPS  = TAPS,
  parameter int unsigned R_MAX   = RMAX,
  localparam int unsigned GW     = (N_GATES > 1) ? $clog2(N_GATES) : 1,
  localparam int unsigned DW     = $clog2(R_MAX) + 1,
  localparam int unsigned TW     = $clog2(N_TAPS),
  localparam int unsigned CW     = DDC_W + CIC_N * $clog2(R_MAX),
  localparam int unsigned AW     = 2 * WF_W + $clog2(N_TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // RF samples from the ADC
  input  logic signed [ADC_W-1:0] adc_data,
  input  logic                    line_sync,
  // run-time settings
  input  logic [1:0]              freq_sel,
  input  logic [DW-1:0]           decim,
  input  logic [$clog2(CW-OUT_W+1)-1:0] cic_shift,
  input  logic [$clog2(AW-OUT_W+1)-1:0] wf_shift,
  input  logic                    out_sel,
  input  logic                    coef_we,
  input  logic [TW-1:0]           coef_addr,
  input  logic signed [WF_W-1:0]  coef_data,
  // baseband output, one complex sample per gate
  output logic                    out_valid,
  output logic [GW-1:0]           out_gate,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q,
  // status
  output logic                    cic_sat,
  output logic                    wf_sat,
  output logic                    wf_overflow,
  output logic                    wf_ready
);
  // Demodulator
  logic                    dd_valid, dd_sync;
  logic signed [DDC_W-1:0] dd_i, dd_q;
  ddc u_ddc (
    .clk, .rst_n, .in_valid(1'b1), .sync(line_sync), .rf(adc_data), .freq_sel,
    .out_valid(dd_valid), .out_sync(dd_sync), .i_out(dd_i), .q_out(dd_q)
  );

  // CIC decimators, I and Q
  logic                 ci_valid, cq_valid, ci_last, cq_last;
  logic signed [CW-1:0] ci_data, cq_data;
  logic [GW-1:0]        ci_gate, cq_gate;
  cic_decimator #(.IN_W(DDC_W), .STAGES(CIC_N), .R_MAX(R_MAX), .N_GATES(N_GATES)) u_cic_i (
    .clk, .rst_n, .in_valid(dd_valid), .in_sync(dd_sync), .in_data(dd_i), .decim,
    .out_valid(ci_valid), .out_data(ci_data), .out_gate(ci_gate), .out_last(ci_last)
  );
  cic_decimator #(.IN_W(DDC_W), .STAGES(CIC_N), .R_MAX(R_MAX), .N_GATES(N_GATES)) u_cic_q (
    .clk, .rst_n, .in_valid(dd_valid), .in_sync(dd_sync), .in_data(dd_q), .decim,
    .out_valid(cq_valid), .out_data(cq_data), .out_gate(cq_gate), .out_last(cq_last)
  );

  // Gain and saturation after the CIC: 16 of 35 bits
  logic signed [WF_W-1:0] g1_i, g1_q;
  logic                   g1_sat_i, g1_sat_q;
  gain_sat #(.IN_W(CW), .OUT_W(WF_W)) u_gs_cic_i (.in_data(ci_data), .shift(cic_shift), .out_data(g1_i), .sat(g1_sat_i));
  gain_sat #(.IN_W(CW), .OUT_W(WF_W)) u_gs_cic_q (.in_data(cq_data), .shift(cic_shift), .out_data(g1_q), .sat(g1_sat_q));

  // Wall filter bank
  logic                 wf_valid, wf_last;
  logic signed [AW-1:0] wf_i, wf_q;
  logic [GW-1:0]        wf_gate;
  wall_filter_bank #(.N_GATES(N_GATES), .N_TAPS(N_TAPS), .D_W(WF_W), .C_W(WF_W)) u_wf (
    .clk, .rst_n,
    .in_valid(ci_valid), .in_ready(wf_ready), .in_i(g1_i), .in_q(g1_q),
    .in_gate(ci_gate), .in_last(ci_last),
    .coef_we, .coef_addr, .coef_data,
    .out_valid(wf_valid), .out_i(wf_i), .out_q(wf_q), .out_gate(wf_gate), .out_last(wf_last),
    .overflow(wf_overflow)
  );

  // Gain and saturation after the wall filter: 16 of 38 bits
  logic signed [OUT_W-1:0] g2_i, g2_q;
  logic                    g2_sat_i, g2_sat_q;
  gain_sat #(.IN_W(AW), .OUT_W(OUT_W)) u_gs_wf_i (.in_data(wf_i), .shift(wf_shift), .out_data(g2_i), .sat(g2_sat_i));
  gain_sat #(.IN_W(AW), .OUT_W(OUT_W)) u_gs_wf_q (.in_data(wf_q), .shift(wf_shift), .out_data(g2_q), .sat(g2_sat_q));

  // Final data path multiplexer, registered
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_gate  <= '0;
      out_last  <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      cic_sat   <= 1'b0;
      wf_sat    <= 1'b0;
    end else begin
      cic_sat <= ci_valid && (g1_sat_i || g1_sat_q);
      wf_sat  <= wf_valid && (g2_sat_i || g2_sat_q);
      if (out_sel) begin
        out_valid <= ci_valid;
        out_gate  <= ci_gate;
        out_last  <= ci_last;
        out_i     <= OUT_W'(g1_i);
        out_q     <= OUT_W'(g1_q);
      end else begin
        out_valid <= wf_valid;
        out_gate  <= wf_gate;
        out_last  <= wf_last;
        out_i     <= g2_i;
        out_q     <= g2_q;
      end
    end
  end

  // Both CIC channels run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ci_valid == cq_valid && (!ci_valid || (ci_gate == cq_gate && ci_last == cq_last)));
endmodule
