// tb_gain_sat: self-checking test of the Gain and Saturation stage.
//
// Two instances as used in the data path (35 -> 16 and 38 -> 16 bits) get
// random words of random magnitude and every shift value including ones
// beyond the largest; the expected output is worked out here by dividing
// with floor rounding and clipping to [-32768, 32767].
module tb_gain_sat;
  logic signed [34:0] a_in;
  logic [4:0]         a_sh;
  logic signed [15:0] a_out;
  logic               a_sat;
  logic signed [37:0] b_in;
  logic [4:0]         b_sh;
  logic signed [15:0] b_out;
  logic               b_sat;
  int checks = 0, failures = 0, nsat = 0;

  gain_sat #(.IN_W(35), .OUT_W(16)) dut_a (.in_data(a_in), .shift(a_sh), .out_data(a_out), .sat(a_sat));
  gain_sat #(.IN_W(38), .OUT_W(16)) dut_b (.in_data(b_in), .shift(b_sh), .out_data(b_out), .sat(b_sat));

  // floor(v / 2^sh) clipped to 16 bits
  function automatic longint model(longint v, int sh, output bit s);
    longint d, r;
    d = longint'(1) << sh;
    r = (v >= 0) ? v / d : -((-v + d - 1) / d);
    s = 1'b0;
    if (r > 32767)  begin r = 32767;  s = 1'b1; end
    if (r < -32768) begin r = -32768; s = 1'b1; end
    return r;
  endfunction

  function automatic longint rnd_val(int bits);
    longint v;
    int m;
    m = $urandom_range(1, bits);
    v = {$urandom, $urandom};
    v = v >>> (64 - m);       // random sign and magnitude up to m bits
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      bit sa, sb;
      longint ea, eb;
      a_in = 35'(rnd_val(35));
      b_in = 38'(rnd_val(38));
      a_sh = 5'($urandom_range(0, 31));
      b_sh = 5'($urandom_range(0, 31));
      if (t == 0) begin a_in = 35'sh3_FFFF_FFFF; a_sh = 5'd19; end   // max in, max shift
      if (t == 1) begin a_in = -35'sd1;          a_sh = 5'd0;  end
      #1;
      ea = model(longint'(a_in), (a_sh > 19) ? 19 : int'(a_sh), sa);
      eb = model(longint'(b_in), (b_sh > 22) ? 22 : int'(b_sh), sb);
      checks += 2;
      nsat += int'(sa) + int'(sb);
      if (longint'(a_out) != ea || a_sat != sa) begin
        failures++;
        if (failures < 10) $display("FAIL a: in %0d sh %0d out %0d exp %0d sat %0b", a_in, a_sh, a_out, ea, a_sat);
      end
      if (longint'(b_out) != eb || b_sat != sb) begin
        failures++;
        if (failures < 10) $display("FAIL b: in %0d sh %0d out %0d exp %0d sat %0b", b_in, b_sh, b_out, eb, b_sat);
      end
    end
    checks++;
    if (nsat == 0 || nsat == 8000) begin
      failures++;
      $display("FAIL: saturation never or always hit (%0d)", nsat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
