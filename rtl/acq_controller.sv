// acq_controller: control logic of the sensor network (enable, sample, record).
//
// One measurement, as in the design: the ring oscillators are enabled, all
// frequency counters are read together once every 2^PERIOD_LOG2 shell clock
// cycles (2^9 cycles = 2.56 us at 200 MHz), and N_SAMPLES samples (512) are
// recorded per sensor, so a measurement spans 2^18 cycles (1.31 ms).
//
// How it works: start_i (a pulse, ignored while busy_o) raises ro_en_o. After
// WARMUP_CYCLES cycles, which let the oscillators start and the counters'
// synchronizers fill, a priming snap_o pulse sets every counter's reference
// value without recording anything. From then on snap_o pulses exactly every
// 2^PERIOD_LOG2 cycles; each of these N_SAMPLES snaps produces one recorded
// sample. The warm-up length and the priming snap are this implementation's
// choices.
//
// Interface and timing: snap_o goes to all frequency counters, whose results
// appear one cycle later; wr_en_o/wr_addr_o are aligned with those results and
// address the sample buffer (sample k at address k). After the last write
// ro_en_o falls, busy_o falls and done_o pulses for one cycle.
module acq_controller #(
  parameter int unsigned N_SAMPLES     = cm_pkg::N_SAMPLES,
  parameter int unsigned PERIOD_LOG2   = cm_pkg::SAMPLE_PERIOD_LOG2,
  parameter int unsigned WARMUP_CYCLES = 16,
  localparam int unsigned AW           = (N_SAMPLES > 1) ? $clog2(N_SAMPLES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  output logic          busy_o,
  output logic          ro_en_o,
  output logic          snap_o,
  output logic          wr_en_o,
  output logic [AW-1:0] wr_addr_o,
  output logic          done_o
);

  typedef enum logic [1:0] {S_IDLE, S_WARM, S_RUN, S_FLUSH} state_t;

  localparam int unsigned PERIOD = 1 << PERIOD_LOG2;
  localparam int unsigned TW     = (PERIOD > WARMUP_CYCLES) ? $clog2(PERIOD + 1) : $clog2(WARMUP_CYCLES + 1);
  localparam int unsigned SW     = $clog2(N_SAMPLES + 1);

  state_t        state;
  logic [TW-1:0] timer;
  logic [SW-1:0] n_snaps;
  logic          snap_is_sample;
  logic [AW-1:0] wr_idx;

  assign busy_o = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      timer          <= '0;
      n_snaps        <= '0;
      snap_is_sample <= 1'b0;
      wr_idx         <= '0;
      ro_en_o        <= 1'b0;
      snap_o         <= 1'b0;
      wr_en_o        <= 1'b0;
      wr_addr_o      <= '0;
      done_o         <= 1'b0;
    end else begin
      snap_o  <= 1'b0;
      done_o  <= 1'b0;
      // Record the counters' results, which follow a sampling snap by a cycle.
      wr_en_o <= snap_o && snap_is_sample;
      if (snap_o && snap_is_sample) begin
        wr_addr_o <= wr_idx;
        wr_idx    <= wr_idx + 1'b1;
      end

      unique case (state)
        S_IDLE: begin
          if (start_i) begin
            ro_en_o <= 1'b1;
            timer   <= '0;
            state   <= S_WARM;
          end
        end
        S_WARM: begin
          timer <= timer + 1'b1;
          if (timer == TW'(WARMUP_CYCLES - 1)) begin
            snap_o         <= 1'b1;     // priming snap, not recorded
            snap_is_sample <= 1'b0;
            timer          <= '0;
            n_snaps        <= '0;
            wr_idx         <= '0;
            state          <= S_RUN;
          end
        end
        S_RUN: begin
          timer <= timer + 1'b1;
          if (timer == TW'(PERIOD - 1)) begin
            snap_o         <= 1'b1;
            snap_is_sample <= 1'b1;
            timer          <= '0;
            n_snaps        <= n_snaps + 1'b1;
            if (n_snaps == SW'(N_SAMPLES - 1)) state <= S_FLUSH;
          end
        end
        S_FLUSH: begin
          if (wr_en_o && wr_addr_o == AW'(N_SAMPLES - 1)) begin
            ro_en_o <= 1'b0;
            done_o  <= 1'b1;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
