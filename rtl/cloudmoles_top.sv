// cloudmoles_top: undercover voltage-sensor network of a multi-tenant FPGA.
//
// One ring-oscillator sensor sits in each of the N_SENSORS clock regions that
// tenants may occupy; only the oscillator itself lives there, hidden in LUTs
// the tenant's placement left free. Everything else is in the shell: one
// frequency counter per oscillator, the control logic that enables the
// oscillators and samples all counters together every 2^SAMPLE_PERIOD_LOG2
// cycles, a buffer for the N_SAMPLES samples of every sensor, and a unit that
// reduces each sensor's samples to its trimean and its NDT (normalized
// deviation with respect to the trimean). A high NDT marks a clock region with
// strong supply fluctuation, that is, with power-wasting activity.
//
// Interface: start_i (pulse) begins a measurement; NDT computation starts by
// itself when the last sample is written. vccint_mv_i[s] is the core supply
// seen by sensor s in millivolts: it drives the behavioural oscillator models
// and stands for the physical voltage the real oscillators sense. Every
// recorded sample is also streamed out (sample_valid_o, sample_idx_o,
// sample_counts_o) for off-chip logging. Each sensor's result appears on the
// ndt_* outputs with a one-cycle ndt_valid_o pulse; done_o pulses after the
// last sensor. busy_o is high from start_i to done_o.
//
// Timing: a measurement takes WARMUP_CYCLES + N_SAMPLES * 2^SAMPLE_PERIOD_LOG2
// + 2 cycles (2^18 + 18 cycles by default, 1.31 ms at 200 MHz), and the NDT
// computation about 8.9k cycles per sensor.
//
// The sensor count, sampling period, sample count, topology and metric follow
// the design; the clock-domain crossing of the counters, the on-chip buffer
// and NDT unit and all widths are this implementation's choices.
module cloudmoles_top #(
  parameter int unsigned N_SENSORS          = cm_pkg::N_SENSORS,
  parameter int unsigned COUNT_W            = cm_pkg::COUNT_W,
  parameter int unsigned SAMPLE_PERIOD_LOG2 = cm_pkg::SAMPLE_PERIOD_LOG2,
  parameter int unsigned N_SAMPLES          = cm_pkg::N_SAMPLES,
  parameter int unsigned NDT_FRAC           = cm_pkg::NDT_FRAC,
  parameter int unsigned NDT_INT            = cm_pkg::NDT_INT,
  parameter int unsigned RO_N               = cm_pkg::RO_N,
  parameter int unsigned RO_S               = cm_pkg::RO_S,
  parameter int unsigned RO_H               = cm_pkg::RO_H,
  parameter int unsigned WARMUP_CYCLES      = 16,
  localparam int unsigned AW                = (N_SAMPLES > 1) ? $clog2(N_SAMPLES) : 1,
  localparam int unsigned SIDW              = (N_SENSORS > 1) ? $clog2(N_SENSORS) : 1,
  localparam int unsigned T8_W              = COUNT_W + 3,
  localparam int unsigned NDT_W             = NDT_INT + NDT_FRAC
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start_i,
  input  logic [N_SENSORS-1:0][15:0]        vccint_mv_i,
  output logic                              busy_o,
  output logic                              ro_en_o,
  output logic                              sample_valid_o,
  output logic [AW-1:0]                     sample_idx_o,
  output logic [N_SENSORS-1:0][COUNT_W-1:0] sample_counts_o,
  output logic                              ndt_valid_o,
  output logic [SIDW-1:0]                   ndt_sensor_o,
  output logic [T8_W-1:0]                   ndt_trimean8_o,
  output logic [NDT_W-1:0]                  ndt_o,
  output logic                              done_o
);

  logic                              ro_en, snap, wr_en, meas_done, meas_busy;
  logic [AW-1:0]                     wr_addr, rd_addr;
  logic [N_SENSORS-1:0]              ro_clk;
  logic [N_SENSORS-1:0]              cnt_valid;
  logic [N_SENSORS-1:0][COUNT_W-1:0] counts, rd_row;

  // Undercover part: one oscillator per clock region, gated by the shell.
  for (genvar s = 0; s < N_SENSORS; s++) begin : g_region
    ro_sensor #(
      .N_COLS (RO_N),
      .STRIDE (RO_S),
      .HEIGHT (RO_H)
    ) u_ro (
      .en_i        (ro_en),
      .vccint_mv_i (vccint_mv_i[s]),
      .ro_o        (ro_clk[s])
    );

    freq_counter #(.COUNT_W(COUNT_W)) u_cnt (
      .ro_clk  (ro_clk[s]),
      .clk     (clk),
      .rst_n   (rst_n),
      .snap_i  (snap),
      .count_o (counts[s]),
      .valid_o (cnt_valid[s])
    );
  end

  acq_controller #(
    .N_SAMPLES     (N_SAMPLES),
    .PERIOD_LOG2   (SAMPLE_PERIOD_LOG2),
    .WARMUP_CYCLES (WARMUP_CYCLES)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (start_i && !meas_busy),
    .busy_o    (),
    .ro_en_o   (ro_en),
    .snap_o    (snap),
    .wr_en_o   (wr_en),
    .wr_addr_o (wr_addr),
    .done_o    (meas_done)
  );

  sample_buffer #(
    .N_SENSORS (N_SENSORS),
    .COUNT_W   (COUNT_W),
    .DEPTH     (N_SAMPLES)
  ) u_buf (
    .clk       (clk),
    .wr_en_i   (wr_en),
    .wr_addr_i (wr_addr),
    .wr_data_i (counts),
    .rd_addr_i (rd_addr),
    .rd_data_o (rd_row)
  );

  ndt_unit #(
    .N_SENSORS (N_SENSORS),
    .N_SAMPLES (N_SAMPLES),
    .COUNT_W   (COUNT_W),
    .NDT_FRAC  (NDT_FRAC),
    .NDT_INT   (NDT_INT)
  ) u_ndt (
    .clk            (clk),
    .rst_n          (rst_n),
    .start_i        (meas_done),
    .busy_o         (),
    .done_o         (done_o),
    .rd_addr_o      (rd_addr),
    .rd_data_i      (rd_row),
    .res_valid_o    (ndt_valid_o),
    .res_sensor_o   (ndt_sensor_o),
    .res_trimean8_o (ndt_trimean8_o),
    .res_ndt_o      (ndt_o)
  );

  // Busy from the accepted start of a measurement to the last NDT result.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     meas_busy <= 1'b0;
    else if (start_i && !meas_busy) meas_busy <= 1'b1;
    else if (done_o)                meas_busy <= 1'b0;
  end

  // All counters are snapped together, so their results arrive together and
  // whenever the controller records a row.
  a_counters_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    ((cnt_valid == '0) || (cnt_valid == '1)) && (!wr_en || (cnt_valid == '1)))
    else $error("frequency counters out of step");

  assign busy_o          = meas_busy;
  assign ro_en_o         = ro_en;
  assign sample_valid_o  = wr_en;
  assign sample_idx_o    = wr_addr;
  assign sample_counts_o = counts;

endmodule
