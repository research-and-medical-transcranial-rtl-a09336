// wall_filter_bank: initial wall (clutter) filter, a bank of 2*N_GATES FIR
// filters of N_TAPS taps running along slow time (one sample per gate per
// pulse line), computed fully serially.
//
// For every gate the last N_TAPS complex samples are kept in a state RAM of
// N_GATES*N_TAPS 32-bit words ({Q,I}, 16 bits each); the published design
// maps the 6400 words onto 25 RAM blocks of 256 x 32, here it is one array
// addressed gate*N_TAPS + slot. All gates share one circular write slot
// `wp` that advances once the last gate of a line is taken (N_TAPS must be
// a power of two for the circular slot arithmetic). A separate 64 x 16 RAM
// holds the run-time programmable coefficients c[0..N_TAPS-1], shared by all
// gates and by I and Q. For gate g, with x[n] its newest sample,
//     y[n] = sum_k c[k] * x[n-k],  k = 0..N_TAPS-1
// is evaluated with two multipliers (I and Q) and two A_W-bit (38-bit)
// accumulators, one multiply-accumulate per clock each, so one gate takes
// N_TAPS clocks and a new gate can be taken every N_TAPS clocks. Widths,
// sizes and the serial schedule follow the published design; the
// handshake, the clearing sweep, the pipeline and the drop-on-busy
// behaviour are this design's choices.
//
// Timing: after reset the module clears all state and coefficient words,
// one per clock (N_GATES*N_TAPS cycles), with in_ready low. A sample
// accepted in cycle A (in_valid & in_ready) is written to the state RAM in
// cycle A and is itself used as tap 0 (so the read does not wait for the
// write); taps 1..N_TAPS-1 are read in cycles A+1..A+N_TAPS-1, the MACs run
// in cycles A+1..A+N_TAPS and the result appears with out_valid in cycle
// A+N_TAPS+1. in_ready is high again in cycle A+N_TAPS, so gates may arrive
// every N_TAPS clocks. A sample offered while the filter is busy is dropped
// and flagged on `overflow`. The line slot advances when the last gate of a
// line is accepted or dropped; reads use the slot latched at acceptance.
// Coefficient writes (coef_we) are taken at any time and should be made
// while the bank is idle.
module wall_filter_bank import digitds_pkg::*; #(
  parameter int unsigned N_GATES = NGATES,
  parameter int unsigned N_TAPS  = TAPS,
  parameter int unsigned D_W     = WF_W,
  parameter int unsigned C_W     = WF_W,
  localparam int unsigned A_W    = D_W + C_W + $clog2(N_TAPS),
  localparam int unsigned GW     = (N_GATES > 1) ? $clog2(N_GATES) : 1,
  localparam int unsigned TW     = $clog2(N_TAPS),
  localparam int unsigned SW     = $clog2(N_GATES * N_TAPS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // samples from the CIC, one per gate
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [D_W-1:0] in_i,
  input  logic signed [D_W-1:0] in_q,
  input  logic [GW-1:0]         in_gate,
  input  logic                  in_last,
  // coefficient RAM write port
  input  logic                  coef_we,
  input  logic [TW-1:0]         coef_addr,
  input  logic signed [C_W-1:0] coef_data,
  // filtered samples
  output logic                  out_valid,
  output logic signed [A_W-1:0] out_i,
  output logic signed [A_W-1:0] out_q,
  output logic [GW-1:0]         out_gate,
  output logic                  out_last,
  output logic                  overflow
);
  logic [2*D_W-1:0]  state_mem [N_GATES*N_TAPS];
  logic [C_W-1:0]    coef_mem  [N_TAPS];

  logic              clearing, busy;
  logic [SW-1:0]     clr_addr;
  logic [TW-1:0]     wp, wp_lat, k;
  logic [GW-1:0]     g_lat;
  logic              last_lat;
  logic [2*D_W-1:0]  fwd, rd_state;
  logic [C_W-1:0]    rd_coef;
  logic              mac_en, mac_first, mac_last;
  logic signed [A_W-1:0] acc_i, acc_q, sum_i, sum_q;

  assign in_ready = !clearing && !busy;
  wire accept = in_valid && in_ready;
  wire drop   = in_valid && !in_ready;

  // Tap k of the latched gate lives in circular slot wp_lat - k.
  wire [TW-1:0] slot   = wp_lat - k;
  wire [SW-1:0] rd_adr = SW'(g_lat) * SW'(N_TAPS) + SW'(slot);
  wire [SW-1:0] wr_adr = SW'(in_gate) * SW'(N_TAPS) + SW'(wp);
  wire [TW-1:0] c_adr  = accept ? '0 : k;

  // State RAM: one write port (clear or new sample), one registered read.
  always_ff @(posedge clk) begin
    if (clearing)     state_mem[clr_addr] <= '0;
    else if (accept)  state_mem[wr_adr]   <= {in_q, in_i};
    rd_state <= state_mem[rd_adr];
  end

  // Coefficient RAM: host write port, one registered read.
  always_ff @(posedge clk) begin
    if (clearing && clr_addr < SW'(N_TAPS)) coef_mem[clr_addr[TW-1:0]] <= '0;
    else if (coef_we)                        coef_mem[coef_addr]        <= coef_data;
    rd_coef <= coef_mem[c_adr];
  end

  // Multiply-accumulate, I and Q; tap 0 is the forwarded new sample.
  always_comb begin
    logic [2*D_W-1:0]      x;
    logic signed [D_W-1:0] xi, xq;
    logic signed [C_W-1:0] c;
    x     = mac_first ? fwd : rd_state;
    xi    = x[D_W-1:0];
    xq    = x[2*D_W-1:D_W];
    c     = rd_coef;
    sum_i = (mac_first ? '0 : acc_i) + A_W'(xi * c);
    sum_q = (mac_first ? '0 : acc_q) + A_W'(xq * c);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clearing  <= 1'b1;
      clr_addr  <= '0;
      busy      <= 1'b0;
      wp        <= '0;
      wp_lat    <= '0;
      k         <= '0;
      g_lat     <= '0;
      last_lat  <= 1'b0;
      fwd       <= '0;
      mac_en    <= 1'b0;
      mac_first <= 1'b0;
      mac_last  <= 1'b0;
      acc_i     <= '0;
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      out_gate  <= '0;
      out_last  <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      overflow <= drop;
      if (clearing) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == SW'(N_GATES * N_TAPS - 1)) clearing <= 1'b0;
      end
      // The line slot advances once the last gate is accepted or dropped.
      if ((accept || (drop && !clearing)) && in_last) wp <= wp + 1'b1;

      // Issue stage: tap 0 in the accept cycle, then taps 1..N_TAPS-1.
      mac_en    <= accept || busy;
      mac_first <= accept;
      mac_last  <= busy && (k == TW'(N_TAPS - 1));
      if (accept) begin
        g_lat    <= in_gate;
        last_lat <= in_last;
        wp_lat   <= wp;
        fwd      <= {in_q, in_i};
        k        <= TW'(1);
        busy     <= (N_TAPS > 1);
      end else if (busy) begin
        k <= k + 1'b1;
        if (k == TW'(N_TAPS - 1)) busy <= 1'b0;
      end

      // MAC stage.
      if (mac_en) begin
        acc_i <= sum_i;
        acc_q <= sum_q;
      end
      out_valid <= mac_en && mac_last;
      if (mac_en && mac_last) begin
        out_i    <= sum_i;
        out_q    <= sum_q;
        out_gate <= g_lat;
        out_last <= last_lat;
      end
    end
  end

  // A new gate is only taken once the previous one has issued all its taps.
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !busy);
endmodule
