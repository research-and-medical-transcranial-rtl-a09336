// gain_sat: Gain and Saturation stage that selects OUT_W bits of a wider
// two's complement word.
//
// The input is shifted right arithmetically by `shift` bits (the digital
// gain: a smaller shift is a larger gain) and the result is saturated to the
// OUT_W-bit range; `sat` flags a clipped sample. Shifts above IN_W-OUT_W act
// as IN_W-OUT_W, which keeps the top bits. The published design uses these
// stages to take 16 of the 35 CIC output bits and 16 of the 38 wall filter
// bits; arithmetic shifting (truncation towards minus infinity) and
// saturation to the symmetric-plus-one two's complement range are this
// design's reading of "select and saturate". Purely combinational.
module gain_sat #(
  parameter int unsigned IN_W  = 35,
  parameter int unsigned OUT_W = 16,
  localparam int unsigned SW   = $clog2(IN_W - OUT_W + 1)
) (
  input  logic signed [IN_W-1:0]  in_data,
  input  logic [SW-1:0]           shift,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    sat
);
  localparam logic signed [IN_W-1:0] MAXV = IN_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(1 << (OUT_W - 1));
  logic [SW-1:0]          sh;
  logic signed [IN_W-1:0] shifted;
  always_comb begin
    sh      = (shift > SW'(IN_W - OUT_W)) ? SW'(IN_W - OUT_W) : shift;
    shifted = in_data >>> sh;
    if (shifted > MAXV) begin
      out_data = MAXV[OUT_W-1:0];
      sat      = 1'b1;
    end else if (shifted < MINV) begin
      out_data = MINV[OUT_W-1:0];
      sat      = 1'b1;
    end else begin
      out_data = shifted[OUT_W-1:0];
      sat      = 1'b0;
    end
  end
endmodule
