// tb_ddc: self-checking test of the quadrature demodulator.
//
// Drives random 14-bit RF samples, restarts the reference phase with `sync`,
// switches among the three frequencies and pauses in_valid now and then. The
// expected I and Q are computed here from round(8191*cos) and
// round(-8191*sin) of 2*pi*n/P, with n counted by the testbench, and compared
// with the outputs two cycles after each sample (the block's latency).
module tb_ddc;
  import digitds_pkg::*;
  localparam int unsigned PER [3] = '{32, 16, 8};
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sync = 1'b0;
  logic signed [13:0] rf = '0;
  logic [1:0] freq_sel = '0;
  logic out_valid, out_sync;
  logic signed [27:0] i_out, q_out;
  int checks = 0, failures = 0;

  ddc dut (.*);
  always #5 clk = ~clk;

  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : $rtoi(v - 0.5);
  endfunction

  // expected outputs queued with the cycle they are due
  typedef struct { longint i, q; bit s; int due; } exp_t;
  exp_t q[$];
  int cyc = 0, n = 0, nsel[3];

  always @(posedge clk) cyc <= cyc + 1;

  // compare what the block produces
  always @(posedge clk) if (rst_n) begin
    if (q.size() > 0 && q[0].due == cyc) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (!out_valid || longint'(i_out) != e.i || longint'(q_out) != e.q || out_sync != e.s) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d: I %0d exp %0d, Q %0d exp %0d, v %0b s %0b/%0b",
                                    cyc, i_out, e.i, q_out, e.q, out_valid, out_sync, e.s);
      end
    end else if (out_valid) begin
      failures++;
      $display("FAIL cyc %0d: unexpected out_valid", cyc);
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 700 == 0) freq_sel = 2'(t / 700 % 3);   // freq_sel 0,1,2,0,...
      if (t == 2900) freq_sel = 2'd3;                  // 3 acts as frequency 2
      in_valid = ($urandom_range(0, 9) != 0);
      sync     = in_valid && ((t % 250) == 0 || t == 5);
      rf       = 14'($urandom);
      if (t == 10) rf = 14'sh2000;                     // most negative input
      if (in_valid) begin
        int p; real ph; exp_t e;
        int fs;
        fs = (freq_sel == 2'd3) ? 2 : int'(freq_sel);
        nsel[fs]++;
        if (sync) n = 0;
        p  = int'(PER[fs]);
        if (n >= p) n = 0;   // a shorter period was just selected
        ph = 2.0 * 3.14159265358979323846 * real'(n) / real'(p);
        e.i = longint'(rf) * rnd(8191.0 * $cos(ph));
        e.q = longint'(rf) * rnd(-8191.0 * $sin(ph));
        e.s = sync;
        e.due = cyc + 2;
        q.push_back(e);
        n = (n + 1 >= p) ? 0 : n + 1;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    sync     = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || nsel[0] == 0 || nsel[1] == 0 || nsel[2] == 0) begin
      failures++;
      $display("FAIL: %0d outputs missing or a frequency unused", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
