// ro_sensor: behavioural model of one undercover ring-oscillator voltage sensor.
//
// This is a behavioural model, not synthesizable logic: the real sensor is a
// loop of 2*N_COLS LUTs placed into free LUT sites of a tenant's design after
// place and route, and its frequency depends on the FPGA core voltage, which
// no RTL can express.
//
// Topology (as in the design): the LUTs sit in N_COLS columns, STRIDE slices
// apart, with two LUTs per column HEIGHT slices apart. The signal runs down the
// first column, right, up the second column, right, down the third, and so on;
// the last LUT closes the loop back to the first. Every LUT is a 2-input AND
// (a buffer gated by the enable), except the last, which is a NAND and so is
// the single inversion of the loop. With en_i low every AND outputs 0 and the
// NAND outputs 1, so the loop is stopped and ro_o rests at 1.
//
// Timing model (this implementation's own): one trip round the loop takes
//   2*N_COLS * LUT_DELAY_PS + L * WIRE_PS_PER_SLICE,
// where L is the Manhattan wire length of the loop in slices,
//   L = N_COLS*HEIGHT + 2*(N_COLS-1)*STRIDE + (N_COLS odd ? HEIGHT : 0),
// and the output toggles once per trip, so the period is two trips. The two
// delay constants are a least-squares fit to the mean frequencies measured on
// a Virtex-7 for nine topologies, from 271.5 MHz (N=2,S=10,H=10) down to
// 104.9 MHz (N=3,S=40,H=10). The fit is rough: for the default N=2,S=20,H=10
// it gives 224.8 MHz where the measured mean was 198.1 MHz (spread 175 to
// 218 MHz across clock regions), and 117.8 MHz for N=3,S=20,H=20 (measured
// 116.9 MHz). Delays scale with VNOM_MV / vccint_mv_i, a first-order model
// of how a supply droop slows the loop.
//
// Ports: en_i enables the loop (driven from the shell), vccint_mv_i is the
// local core supply in millivolts (a stand-in for the analog supply the real
// sensor sees), ro_o is the output of the inverting LUT that clocks the
// frequency counter in the shell. Times are in picoseconds.
module ro_sensor #(
  parameter int unsigned N_COLS            = cm_pkg::RO_N,
  parameter int unsigned STRIDE            = cm_pkg::RO_S,
  parameter int unsigned HEIGHT            = cm_pkg::RO_H,
  parameter int unsigned LUT_DELAY_PS      = 361,
  parameter int unsigned WIRE_PS_PER_SLICE = 13,
  parameter int unsigned VNOM_MV           = 1000
) (
  input  logic        en_i,
  input  logic [15:0] vccint_mv_i,
  output logic        ro_o
);

  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned LOOP_SLICES =
      N_COLS * HEIGHT + 2 * (N_COLS - 1) * STRIDE + ((N_COLS % 2 == 1) ? HEIGHT : 0);
  localparam int unsigned LOOP_PS_NOM =
      2 * N_COLS * LUT_DELAY_PS + LOOP_SLICES * WIRE_PS_PER_SLICE;

  // Delay of one trip round the loop at the present supply voltage.
  function automatic longint unsigned trip_ps(input logic [15:0] mv);
    longint unsigned v;
    v = (mv == 16'd0) ? 64'd1 : 64'(mv);
    return (64'(LOOP_PS_NOM) * 64'(VNOM_MV) + v / 2) / v;
  endfunction

  longint unsigned delay_ps;

  initial ro_o = 1'b1;

  always begin
    if (!en_i) begin
      ro_o = 1'b1;
      wait (en_i);
    end else begin
      delay_ps = trip_ps(vccint_mv_i);
      #(delay_ps);
      ro_o = en_i ? ~ro_o : 1'b1;
    end
  end

endmodule
