// tb_cic_decimator: self-checking test of the CIC decimator / gate integrator.
//
// Feeds random 28-bit samples with gaps in in_valid, starts receive lines with
// in_sync at several decimation factors (128, 1, 37, 0 read as 1, 200 read as
// 128) and with a new in_sync in the middle of a line. For the default single
// stage every output must be the plain sum of the last `decim` valid inputs,
// carry the right gate number and last flag, and arrive one cycle after the
// gate's last input; exactly N_GATES outputs per line.
module tb_cic_decimator;
  import digitds_pkg::*;
  localparam int unsigned NG = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sync = 1'b0;
  logic signed [27:0] in_data = '0;
  logic [7:0] decim = 8'd128;
  logic out_valid, out_last;
  logic signed [34:0] out_data;
  logic [3:0] out_gate;
  int checks = 0, failures = 0;

  cic_decimator #(.N_GATES(NG)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { longint sum; int gate; bit last; int due; } exp_t;
  exp_t q[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (q.size() > 0 && q[0].due == cyc) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (!out_valid || longint'(out_data) != e.sum || int'(out_gate) != e.gate || out_last != e.last) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d: %0d exp %0d gate %0d exp %0d last %0b exp %0b v %0b",
                                    cyc, out_data, e.sum, out_gate, e.gate, out_last, e.last, out_valid);
      end
    end else if (out_valid) begin
      failures++;
      if (failures < 10) $display("FAIL cyc %0d: unexpected out_valid", cyc);
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One receive line: `len` valid samples after in_sync; model kept here.
  task automatic run_line(int unsigned d, int unsigned len, bit big);
    int r, cnt, gate;
    longint acc;
    bit active;
    r = (d == 0) ? 1 : (d > 128) ? 128 : int'(d);
    cnt = 0; gate = 0; acc = 0; active = 1;
    for (int s = 0; s < int'(len); ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      in_sync  = in_valid && (s == 0);
      decim    = in_sync ? 8'(d) : 8'($urandom);   // ignored except at in_sync
      in_data  = big ? ((s % 2 == 0) ? 28'sh7FFFFFF : 28'sh8000000) : 28'($urandom);
      if (in_valid) begin
        if (active) begin
          acc += longint'(in_data);
          cnt++;
          if (cnt == r) begin
            exp_t e;
            e.sum = acc; e.gate = gate; e.last = (gate == NG - 1); e.due = cyc + 1;
            q.push_back(e);
            acc = 0; cnt = 0;
            if (gate == NG - 1) active = 0; else gate++;
          end
        end
        s++;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_line(128, 128 * NG + 50, 0);
    run_line(128, 128 * NG, 1);       // full-scale inputs: the 35-bit output must not wrap
    run_line(1, NG + 5, 0);
    run_line(37, 37 * 5 + 3, 0);      // cut short by the next line's in_sync
    run_line(37, 37 * NG + 10, 0);
    run_line(0, NG + 2, 0);
    run_line(200, 128 * NG + 1, 0);
    @(negedge clk);
    in_valid = 1'b0;
    in_sync  = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
