// freq_counter: shell-side frequency counter for one ring-oscillator sensor.
//
// The design keeps only the ring oscillator inside the tenant's region and
// moves its counter into the shell; the counter is clocked by the RO output
// and its value is read at every sampling instant of the shell clock.
//
// How it works (the clock-crossing scheme is this implementation's choice):
// a free-running binary counter in the RO clock domain keeps a Gray-coded
// copy in a register. The shell clock samples the Gray code through a
// two-flop synchronizer, converts it back to binary, and on every snap_i
// pulse outputs the difference from the value captured at the previous snap.
// Because only one Gray bit changes per RO edge, the synchronized value is
// always a value the counter really held. The difference is taken modulo
// 2^COUNT_W, so the counter may wrap freely as long as fewer than 2^COUNT_W
// RO periods fall between two snaps.
//
// Interface and timing: snap_i is a one-cycle pulse in the clk domain;
// count_o and valid_o follow one cycle later (valid_o is a one-cycle pulse).
// The RO count seen at a snap is the one from about three clk cycles earlier
// (synchronizer and conversion latency); since every snap sees the same
// latency, consecutive differences still span exactly the snap interval.
// The first difference after reset or after the RO was enabled is meaningless
// and should be discarded (a priming snap). rst_n resets both domains
// asynchronously; the RO is held stopped while the shell is in reset.
module freq_counter #(
  parameter int unsigned COUNT_W = cm_pkg::COUNT_W
) (
  input  logic               ro_clk,
  input  logic               clk,
  input  logic               rst_n,
  input  logic               snap_i,
  output logic [COUNT_W-1:0] count_o,
  output logic               valid_o
);

  // ---------------- RO clock domain ----------------
  logic [COUNT_W-1:0] ro_bin;
  logic [COUNT_W-1:0] ro_gray;

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      ro_bin  <= '0;
      ro_gray <= '0;
    end else begin
      ro_bin  <= ro_bin + 1'b1;
      ro_gray <= (ro_bin + 1'b1) ^ ((ro_bin + 1'b1) >> 1);
    end
  end

  // ---------------- shell clock domain ----------------
  logic [COUNT_W-1:0] sync1, sync2;
  logic [COUNT_W-1:0] cur_bin, prev_bin, gray2bin;

  always_comb begin
    gray2bin[COUNT_W-1] = sync2[COUNT_W-1];
    for (int i = int'(COUNT_W) - 2; i >= 0; i--) begin
      gray2bin[i] = gray2bin[i+1] ^ sync2[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1    <= '0;
      sync2    <= '0;
      cur_bin  <= '0;
      prev_bin <= '0;
      count_o  <= '0;
      valid_o  <= 1'b0;
    end else begin
      sync1   <= ro_gray;
      sync2   <= sync1;
      cur_bin <= gray2bin;
      valid_o <= snap_i;
      if (snap_i) begin
        count_o  <= cur_bin - prev_bin;
        prev_bin <= cur_bin;
      end
    end
  end

endmodule
