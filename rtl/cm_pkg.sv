// cm_pkg: constants shared by the undercover voltage-sensor network.
//
// The network places one ring-oscillator (RO) sensor in every clock region of
// the FPGA that is not taken by the shell, counts each RO in the shell, samples
// all counters together at a fixed rate and reduces the recorded samples of each
// sensor to one robust figure of voltage fluctuation, the normalized deviation
// with respect to the trimean (NDT).
//
// Values taken from the design: 13 sensors (a Virtex-7 VC707 device has 14
// clock regions, X0Y0..X1Y6, one of which holds the shell controller), a
// sampling period of 2^9 cycles of the 200 MHz shell clock (2.56 us) and 512
// samples per measurement (2^18 cycles, 1.31 ms). The counter width and the
// NDT fixed-point format are this implementation's own choices.
package cm_pkg;

  // Number of sensors: one per clock region outside the controller's region.
  parameter int unsigned N_SENSORS = 13;

  // Width of one frequency sample (RO periods per sampling period). At the
  // fastest RO frequency seen on the device (about 335 MHz) a 2.56 us period
  // holds under 900 counts; 16 bits leave ample headroom.
  parameter int unsigned COUNT_W = 16;

  // Sampling period, as a power of two of shell clock cycles.
  parameter int unsigned SAMPLE_PERIOD_LOG2 = 9;

  // Samples recorded per sensor in one measurement.
  parameter int unsigned N_SAMPLES = 512;

  // Fractional bits of the NDT result (unsigned fixed point).
  parameter int unsigned NDT_FRAC = 20;

  // Integer bits of the NDT result; larger values saturate.
  parameter int unsigned NDT_INT = 4;

  // Trimean is reported with 3 fractional bits: T8 = 8 * T is an integer,
  // because T = (Q1 + 2*Q2 + Q3) / 4 and each quartile is the mean of two
  // order statistics.
  parameter int unsigned TRIMEAN_FRAC = 3;

  // Ring-oscillator topology of the main configuration: N columns, stride S
  // and height H, both in slices.
  parameter int unsigned RO_N = 2;
  parameter int unsigned RO_S = 20;
  parameter int unsigned RO_H = 10;

endpackage
