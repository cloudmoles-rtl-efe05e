// ndt_unit: normalized deviation with respect to the trimean (NDT), per sensor.
//
// For the N_SAMPLES recorded samples x_i of each sensor the unit computes
//   trimean            T    = (Q1 + 2*Q2 + Q3) / 4
//   deviation about T  S_T  = sqrt( sum_i (x_i - T)^2 / (N_SAMPLES - 1) )
//   metric             NDT  = S_T / T
// The metric and its two equations follow the design. A sensor in a region
// with strong supply fluctuation produces counts that vary a lot over time;
// dividing by the sensor's own central value makes sensors with different
// nominal frequencies comparable. The trimean, built from quartiles, keeps a
// few outliers from moving the reference point.
//
// Quartile convention (this implementation's choice): Q2 is the median and
// Q1, Q3 are the medians of the lower and upper halves, so with n = N_SAMPLES
// (a multiple of 4), k = n/4 and s the sorted samples (0-based),
//   8*T = s[k-1] + s[k] + 2*(s[2k-1] + s[2k]) + s[3k-1] + s[3k],
// an exact integer; the unit reports T8 = 8*T (TRIMEAN_FRAC = 3 fraction bits).
//
// How it works, per sensor, all sequential and without sorting:
//  1. Six order statistics are found together by a bitwise (radix) selection:
//     for each bit from the MSB down, one pass over the samples counts, for
//     each wanted rank, the samples that match the bits already decided and
//     have a 0 in the current bit; comparing that count with the remaining
//     rank decides the bit. COUNT_W passes of N_SAMPLES reads.
//  2. One more pass accumulates sum (8*x_i - T8)^2 exactly.
//  3. A restoring divider forms Q = floor(sum * 2^(2*NDT_FRAC) /
//     ((N_SAMPLES-1) * T8^2)), and a digit-by-digit square root gives
//     NDT = floor(sqrt(Q)), which equals floor(NDT * 2^NDT_FRAC) exactly.
//     NDT saturates at the largest value of NDT_INT.NDT_FRAC bits; a sensor
//     whose trimean is 0 (a stopped oscillator) reports NDT = 0.
//
// Interface and timing: start_i (a pulse, ignored while busy_o) starts with
// sensor 0. rd_addr_o addresses the sample buffer, whose row (all sensors at
// one sampling instant) must arrive on rd_data_i one cycle later. For each
// sensor, res_valid_o pulses once with res_sensor_o, res_trimean8_o and
// res_ndt_o. done_o pulses with the last result. A sensor takes
// (COUNT_W + 1) * (N_SAMPLES + 2) + NUM_W + RAD_W / 2 + 3 cycles, where NUM_W
// is the dividend width (88 bits by default) and RAD_W is NUM_W rounded up to
// even: 8,873 cycles per sensor with the default sizes.
module ndt_unit #(
  parameter int unsigned N_SENSORS = cm_pkg::N_SENSORS,
  parameter int unsigned N_SAMPLES = cm_pkg::N_SAMPLES,
  parameter int unsigned COUNT_W   = cm_pkg::COUNT_W,
  parameter int unsigned NDT_FRAC  = cm_pkg::NDT_FRAC,
  parameter int unsigned NDT_INT   = cm_pkg::NDT_INT,
  localparam int unsigned AW       = (N_SAMPLES > 1) ? $clog2(N_SAMPLES) : 1,
  localparam int unsigned SIDW     = (N_SENSORS > 1) ? $clog2(N_SENSORS) : 1,
  localparam int unsigned T8_W     = COUNT_W + cm_pkg::TRIMEAN_FRAC,
  localparam int unsigned NDT_W    = NDT_INT + NDT_FRAC
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start_i,
  output logic                              busy_o,
  output logic                              done_o,
  output logic [AW-1:0]                     rd_addr_o,
  input  logic [N_SENSORS-1:0][COUNT_W-1:0] rd_data_i,
  output logic                              res_valid_o,
  output logic [SIDW-1:0]                   res_sensor_o,
  output logic [T8_W-1:0]                   res_trimean8_o,
  output logic [NDT_W-1:0]                  res_ndt_o
);

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NQ     = 6;                  // order statistics
  localparam int unsigned QK     = N_SAMPLES / 4;
  localparam int unsigned RW     = AW + 1;             // rank / count width
  localparam int unsigned BW     = (COUNT_W > 1) ? $clog2(COUNT_W) : 1;
  localparam int unsigned D_W    = T8_W + 1;           // signed 8*x - T8
  localparam int unsigned ACC_W  = 2 * T8_W + AW + 1;  // sum of squares
  localparam int unsigned NUM_W  = ACC_W + 2 * NDT_FRAC;
  localparam int unsigned DEN_W  = 2 * T8_W + AW;
  localparam int unsigned RAD_W  = NUM_W + (NUM_W % 2);
  localparam int unsigned CW     = $clog2(RAD_W + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_SEL_PASS, S_SEL_UPD, S_TRIM, S_SSQ_PASS,
    S_DIV_INIT, S_DIV, S_SQRT, S_OUT
  } state_t;

  // Ranks (0-based) of the six order statistics and their weights in 8*T.
  function automatic logic [RW-1:0] q_rank(input int unsigned q);
    case (q)
      0:       return RW'(QK - 1);
      1:       return RW'(QK);
      2:       return RW'(2 * QK - 1);
      3:       return RW'(2 * QK);
      4:       return RW'(3 * QK - 1);
      default: return RW'(3 * QK);
    endcase
  endfunction

  state_t               state;
  logic [SIDW-1:0]      sensor;
  logic [BW-1:0]        bitpos;

  // Pass machinery: addresses are issued one per cycle, data returns a cycle later.
  logic [AW:0]          issue_idx;
  logic                 pipe_v, pipe_last;
  logic [COUNT_W-1:0]   x;

  logic [COUNT_W-1:0]   prefix [NQ];
  logic [RW-1:0]        rank   [NQ];
  logic [RW-1:0]        c0     [NQ];
  logic [COUNT_W-1:0]   hi_mask;

  logic [T8_W-1:0]      t8;
  logic [ACC_W-1:0]     acc;
  logic signed [D_W-1:0] dev;
  logic signed [2*D_W-1:0] dev_w;
  logic [2*D_W-1:0]     dev_sq;

  logic [NUM_W-1:0]     num_sh;     // dividend, shifted out MSB first
  logic [NUM_W-1:0]     quo;
  logic [DEN_W-1:0]     rem;
  logic [DEN_W-1:0]     den;
  logic [RAD_W-1:0]     rad, root, sq_bit;
  logic [CW-1:0]        steps;

  logic pass_active;
  assign pass_active = (state == S_SEL_PASS) || (state == S_SSQ_PASS);
  assign busy_o      = (state != S_IDLE);
  assign rd_addr_o   = issue_idx[AW-1:0];
  assign x           = rd_data_i[sensor];
  assign hi_mask     = COUNT_W'({(COUNT_W + 1){1'b1}} << ({1'b0, bitpos} + 1'b1));
  assign dev         = $signed({1'b0, x, 3'b000}) - $signed({1'b0, t8});
  assign dev_w       = (2 * D_W)'(dev);
  assign dev_sq      = unsigned'(dev_w * dev_w);

  // Divider step and square-root step, combinational.
  logic [DEN_W:0]   rem_shift;
  logic [RAD_W-1:0] trial;
  assign rem_shift = {rem, num_sh[NUM_W-1]};
  assign trial     = root + sq_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      sensor         <= '0;
      bitpos         <= '0;
      issue_idx      <= '0;
      pipe_v         <= 1'b0;
      pipe_last      <= 1'b0;
      for (int q = 0; q < NQ; q++) begin
        prefix[q] <= '0;
        rank[q]   <= '0;
        c0[q]     <= '0;
      end
      t8             <= '0;
      acc            <= '0;
      num_sh         <= '0;
      quo            <= '0;
      rem            <= '0;
      den            <= '0;
      rad            <= '0;
      root           <= '0;
      sq_bit         <= '0;
      steps          <= '0;
      done_o         <= 1'b0;
      res_valid_o    <= 1'b0;
      res_sensor_o   <= '0;
      res_trimean8_o <= '0;
      res_ndt_o      <= '0;
    end else begin
      done_o      <= 1'b0;
      res_valid_o <= 1'b0;

      // Address issue for both kinds of pass.
      if (pass_active && issue_idx < (AW + 1)'(N_SAMPLES)) begin
        issue_idx <= issue_idx + 1'b1;
        pipe_v    <= 1'b1;
        pipe_last <= (issue_idx == (AW + 1)'(N_SAMPLES - 1));
      end else begin
        pipe_v    <= 1'b0;
        pipe_last <= 1'b0;
      end

      unique case (state)
        S_IDLE: begin
          if (start_i) begin
            sensor <= '0;
            state  <= S_INIT;
          end
        end

        S_INIT: begin
          for (int q = 0; q < NQ; q++) begin
            prefix[q] <= '0;
            rank[q]   <= q_rank(q);
            c0[q]     <= '0;
          end
          bitpos    <= BW'(COUNT_W - 1);
          issue_idx <= '0;
          acc       <= '0;
          state     <= S_SEL_PASS;
        end

        S_SEL_PASS: begin
          if (pipe_v) begin
            for (int q = 0; q < NQ; q++) begin
              if ((((x ^ prefix[q]) & hi_mask) == '0) && !x[bitpos])
                c0[q] <= c0[q] + 1'b1;
            end
            if (pipe_last) state <= S_SEL_UPD;
          end
        end

        S_SEL_UPD: begin
          for (int q = 0; q < NQ; q++) begin
            if (rank[q] >= c0[q]) begin
              prefix[q][bitpos] <= 1'b1;
              rank[q]           <= rank[q] - c0[q];
            end
            c0[q] <= '0;
          end
          issue_idx <= '0;
          if (bitpos == '0) begin
            state <= S_TRIM;
          end else begin
            bitpos <= bitpos - 1'b1;
            state  <= S_SEL_PASS;
          end
        end

        S_TRIM: begin
          t8 <= T8_W'(prefix[0]) + T8_W'(prefix[1])
              + (T8_W'(prefix[2]) << 1) + (T8_W'(prefix[3]) << 1)
              + T8_W'(prefix[4]) + T8_W'(prefix[5]);
          issue_idx <= '0;
          state     <= S_SSQ_PASS;
        end

        S_SSQ_PASS: begin
          if (pipe_v) begin
            acc <= acc + ACC_W'(dev_sq);
            if (pipe_last) state <= S_DIV_INIT;
          end
        end

        S_DIV_INIT: begin
          num_sh <= NUM_W'(acc) << (2 * NDT_FRAC);
          den    <= DEN_W'(N_SAMPLES - 1) * DEN_W'(t8) * DEN_W'(t8);
          rem    <= '0;
          quo    <= '0;
          steps  <= CW'(NUM_W);
          state  <= S_DIV;
        end

        S_DIV: begin
          num_sh <= num_sh << 1;
          if (rem_shift >= {1'b0, den}) begin
            rem <= DEN_W'(rem_shift - {1'b0, den});
            quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= DEN_W'(rem_shift);
            quo <= {quo[NUM_W-2:0], 1'b0};
          end
          steps <= steps - 1'b1;
          if (steps == CW'(1)) state <= S_SQRT;
          if (steps == CW'(1)) begin
            // Prepare the square root of the final quotient.
            rad    <= RAD_W'({quo[NUM_W-2:0], (rem_shift >= {1'b0, den})});
            root   <= '0;
            sq_bit <= RAD_W'(1) << (RAD_W - 2);
          end
        end

        S_SQRT: begin
          if (rad >= trial) begin
            rad  <= rad - trial;
            root <= (root >> 1) + sq_bit;
          end else begin
            root <= root >> 1;
          end
          sq_bit <= sq_bit >> 2;
          if (sq_bit == RAD_W'(1)) state <= S_OUT;
        end

        S_OUT: begin
          res_valid_o    <= 1'b1;
          res_sensor_o   <= sensor;
          res_trimean8_o <= t8;
          // A zero trimean (division by zero above) reports NDT = 0.
          if (t8 == '0)                          res_ndt_o <= '0;
          else if (root > RAD_W'({NDT_W{1'b1}})) res_ndt_o <= '1;
          else                                   res_ndt_o <= NDT_W'(root);
          if (sensor == SIDW'(N_SENSORS - 1)) begin
            done_o <= 1'b1;
            state  <= S_IDLE;
          end else begin
            sensor <= sensor + 1'b1;
            state  <= S_INIT;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
