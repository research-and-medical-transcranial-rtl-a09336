// cic_decimator: CIC low-pass filter and decimator that integrates one
// Doppler gate of the demodulated signal into one baseband sample.
//
// Structure (Hogenauer): STAGES integrators at the input rate, a decimator
// keeping every `decim`-th integrator value, and STAGES comb (differentiator)
// sections with a delay of one decimated sample. With the default single
// stage the output is the sum of the last `decim` inputs, so one output is
// one range gate: decim = 128 at 64 MHz gives 2 us gates and 0.5 MS/s. The
// sum of up to RMAX inputs grows the word by STAGES*log2(RMAX) bits (28 ->
// 35 bits by default); the integrators wrap in two's complement, which the
// combs undo exactly. The single-stage default, the widths and the run-time
// decimation factor follow the published design; the gate counter, the
// restart on `sync` and the clamping of decim are this design's choices.
//
// Interface: in_sync marks the first valid sample of a receive line. It
// clears the integrators and combs, latches `decim` (0 is read as 1, values
// above RMAX as RMAX) and starts gate 0. After each `decim` valid samples one
// output is produced, tagged with its gate number; after NGATES gates the
// filter idles until the next in_sync. Timing: out_valid rises in the cycle
// after the gate's last input sample.
module cic_decimator import digitds_pkg::*; #(
  parameter int unsigned IN_W     = DDC_W,
  parameter int unsigned STAGES   = CIC_N,
  parameter int unsigned R_MAX    = RMAX,
  parameter int unsigned N_GATES  = NGATES,
  localparam int unsigned DW      = $clog2(R_MAX) + 1,
  localparam int unsigned GW      = (N_GATES > 1) ? $clog2(N_GATES) : 1,
  localparam int unsigned OW      = IN_W + STAGES * $clog2(R_MAX)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_sync,
  input  logic signed [IN_W-1:0] in_data,
  input  logic [DW-1:0]         decim,
  output logic                  out_valid,
  output logic signed [OW-1:0]  out_data,
  output logic [GW-1:0]         out_gate,
  output logic                  out_last
);
  logic signed [OW-1:0] integ [STAGES];
  logic signed [OW-1:0] comb_dly [STAGES];
  logic signed [OW-1:0] integ_nxt [STAGES];
  logic signed [OW-1:0] comb_val [STAGES+1];
  logic [DW-1:0] r_lat, r_eff, cnt;
  logic [GW-1:0] gate;
  logic          active;

  always_comb begin
    if (decim == '0)                 r_eff = DW'(1);
    else if (decim > DW'(R_MAX))     r_eff = DW'(R_MAX);
    else                             r_eff = decim;
  end

  // Integrator chain; on in_sync it restarts from zero.
  always_comb begin
    logic signed [OW-1:0] run;
    run = OW'(in_data);
    for (int s = 0; s < int'(STAGES); s++) begin
      run          = (in_sync ? '0 : integ[s]) + run;
      integ_nxt[s] = run;
    end
  end

  // Comb chain on the decimated integrator value.
  always_comb begin
    comb_val[0] = integ_nxt[STAGES-1];
    for (int s = 0; s < int'(STAGES); s++)
      comb_val[s+1] = comb_val[s] - (in_sync ? '0 : comb_dly[s]);
  end

  logic [DW-1:0] r_cur, cnt_cur;
  logic          gate_end;
  always_comb begin
    r_cur    = in_sync ? r_eff : r_lat;
    cnt_cur  = in_sync ? '0 : cnt;
    gate_end = in_valid && (active || in_sync) && (cnt_cur == r_cur - 1'b1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      cnt       <= '0;
      gate      <= '0;
      r_lat     <= DW'(1);
      out_valid <= 1'b0;
      out_data  <= '0;
      out_gate  <= '0;
      out_last  <= 1'b0;
      for (int s = 0; s < int'(STAGES); s++) begin
        integ[s]    <= '0;
        comb_dly[s] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid && (active || in_sync)) begin
        for (int s = 0; s < int'(STAGES); s++) integ[s] <= integ_nxt[s];
        if (in_sync) begin
          r_lat <= r_eff;
          gate  <= '0;
          for (int s = 0; s < int'(STAGES); s++) comb_dly[s] <= '0;
        end
        active <= 1'b1;
        if (gate_end) begin
          cnt <= '0;
          for (int s = 0; s < int'(STAGES); s++) comb_dly[s] <= comb_val[s];
          out_valid <= 1'b1;
          out_data  <= comb_val[STAGES];
          out_gate  <= in_sync ? '0 : gate;
          out_last  <= (in_sync ? '0 : gate) == GW'(N_GATES - 1);
          if ((in_sync ? '0 : gate) == GW'(N_GATES - 1)) active <= 1'b0;
          else gate <= (in_sync ? '0 : gate) + 1'b1;
        end else begin
          cnt <= cnt_cur + 1'b1;
        end
      end
    end
  end
endmodule
