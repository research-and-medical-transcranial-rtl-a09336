// tb_wall_filter_bank: self-checking test of the serial FIR wall filter bank.
//
// Uses 5 gates (64 taps as in the full design). After the clearing sweep it
// loads random coefficients and runs 150 pulse lines of random I/Q samples,
// one per gate, offered with random gaps. A reference model here keeps each
// gate's last 64 samples and forms sum c[k]*x[n-k]; every output is compared
// with it, and each result must arrive exactly 65 cycles after its sample
// was accepted. It also reloads the coefficients midway, offers samples while
// the bank is busy (they must be dropped and flagged on overflow, a dropped
// last gate still closing the line), and resets the bank to check that the
// clearing sweep zeroes the filter history.
module tb_wall_filter_bank;
  localparam int NG = 5, NT = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic signed [15:0] in_i = '0, in_q = '0;
  logic [2:0] in_gate = '0;
  logic coef_we = 1'b0;
  logic [5:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic out_valid, out_last, overflow;
  logic signed [37:0] out_i, out_q;
  logic [2:0] out_gate;
  int checks = 0, failures = 0, n_ovf = 0, n_out = 0, n_b2b = 0;
  longint last_acc = -100;

  wall_filter_bank #(.N_GATES(NG), .N_TAPS(NT)) dut (.*);
  always #5 clk = ~clk;

  // reference model
  longint hist_i [NG][NT], hist_q [NG][NT], coef [NT];
  int wp = 0;
  typedef struct { longint i, q; int gate; bit last; int due; } exp_t;
  exp_t q[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (q.size() > 0 && q[0].due == cyc) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      n_out++;
      if (!out_valid || longint'(out_i) != e.i || longint'(out_q) != e.q ||
          int'(out_gate) != e.gate || out_last != e.last) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d: I %0d exp %0d Q %0d exp %0d gate %0d/%0d v %0b",
                                    cyc, out_i, e.i, out_q, e.q, out_gate, e.gate, out_valid);
      end
    end else if (out_valid) begin
      failures++;
      if (failures < 10) $display("FAIL cyc %0d: unexpected out_valid", cyc);
    end
    if (overflow) n_ovf++;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    wp = 0;
    for (int g = 0; g < NG; g++) for (int k = 0; k < NT; k++) begin hist_i[g][k] = 0; hist_q[g][k] = 0; end
    for (int k = 0; k < NT; k++) coef[k] = 0;
    // the clearing sweep takes NG*NT cycles with in_ready low
    repeat (NG * NT - 1) @(negedge clk);
    checks++;
    if (in_ready) begin failures++; $display("FAIL: ready n_before the clearing sweep ended"); end
    @(negedge clk);
    checks++;
    if (!in_ready) begin failures++; $display("FAIL: not ready after the clearing sweep"); end
  endtask

  task automatic load_coefs(bit zero_some);
    for (int k = 0; k < NT; k++) begin
      @(negedge clk);
      coef_we   = 1'b1;
      coef_addr = 6'(k);
      coef_data = (zero_some && k > 3) ? 16'sd0 : 16'($urandom);
      coef[k]   = longint'(coef_data);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // Offer one sample (waiting for ready); model it when accepted.
  task automatic send(int g, bit last);
    longint si, sq;
    exp_t e;
    while (!in_ready) @(negedge clk);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    in_valid = 1'b1;
    in_gate  = 3'(g);
    in_last  = last;
    in_i     = 16'($urandom);
    in_q     = 16'($urandom);
    hist_i[g][wp] = longint'(in_i);
    hist_q[g][wp] = longint'(in_q);
    si = 0; sq = 0;
    for (int k = 0; k < NT; k++) begin
      si += coef[k] * hist_i[g][(wp - k + NT) % NT];
      sq += coef[k] * hist_q[g][(wp - k + NT) % NT];
    end
    e.i = si; e.q = sq; e.gate = g; e.last = last;
    e.due = cyc + 65;          // accepted in the next cycle A, out_valid in cycle A+65
    if (cyc == last_acc + 64) n_b2b++;
    last_acc = cyc;
    q.push_back(e);
    @(negedge clk);
    in_valid = 1'b0;
    if (last) wp = (wp + 1) % NT;
  endtask

  // Offer a sample while the bank is busy: it must be dropped.
  task automatic send_busy(int g, bit last);
    int n_before;
    while (in_ready) @(negedge clk);
    in_valid = 1'b1;
    in_gate  = 3'(g);
    in_last  = last;
    in_i     = 16'($urandom);
    in_q     = 16'($urandom);
    n_before   = n_ovf;
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (n_ovf != n_before + 1) begin failures++; $display("FAIL: busy sample not flagged"); end
    if (last) wp = (wp + 1) % NT;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    do_reset();
    load_coefs(0);
    for (int l = 0; l < 150; l++) begin
      if (l == 80) load_coefs(1);
      for (int g = 0; g < NG; g++) begin
        send(g, g == NG - 1);
        if (l % 37 == 5 && g == 2) send_busy(3, 0);
        if (l % 41 == 7 && g == NG - 2) begin send_busy(NG - 1, 1); break; end
      end
    end
    while (q.size() > 0) @(negedge clk);
    // reset clears all history: a fresh line sees only its own sample
    do_reset();
    load_coefs(0);
    for (int l = 0; l < 3; l++) for (int g = 0; g < NG; g++) send(g, g == NG - 1);
    repeat (80) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_ovf == 0 || n_out < 700 || n_b2b == 0) begin
      failures++;
      $display("FAIL: %0d outputs missing, %0d overflows, %0d outputs, %0d gates 64 clocks apart", q.size(), n_ovf, n_out, n_b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
