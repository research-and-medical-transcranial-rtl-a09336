// digitds_pkg: widths and sizes shared by the Doppler receive data path.
//
// The numbers follow the published FPGA data path of a multigate transcranial
// Doppler: 14-bit RF samples at 64 MHz, 14-bit reference tables, 28-bit
// demodulator products, a single-stage CIC with decimation up to 128 (35-bit
// output), 16-bit wall filter input and coefficients, 38-bit accumulators,
// 100 gates and 64 taps.
package digitds_pkg;
  localparam int unsigned ADC_W   = 14;   // RF sample width (two's complement)
  localparam int unsigned REF_W   = 14;   // reference sine/cosine width
  localparam int unsigned DDC_W   = ADC_W + REF_W;  // 28-bit products
  localparam int unsigned RMAX    = 128;  // largest decimation factor
  localparam int unsigned CIC_N   = 1;    // CIC stages (output DDC_W + CIC_N*log2(RMAX) = 35 bits)
  localparam int unsigned WF_W    = 16;   // wall filter data and coefficient width
  localparam int unsigned NGATES  = 100;  // Doppler gates per pulse line
  localparam int unsigned TAPS    = 64;   // wall filter length (accumulator 2*WF_W + log2(TAPS) = 38 bits)
  localparam int unsigned OUT_W   = 16;   // width sent on to software
endpackage
