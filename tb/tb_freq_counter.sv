// tb_freq_counter: self-checking test of the shell-side frequency counter.
//
// A 200 MHz shell clock samples the counter every 512 cycles while the test
// drives the RO clock at known periods (several frequencies, one faster than
// the shell clock). Each sample must equal the number of RO periods in a
// 2.56 us window to within one count; across the whole run the samples must
// add up to the RO edges the test counted itself, which also proves that the
// 16-bit counter wraps correctly (the run spans several wraps).
module tb_freq_counter;

  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, ro_clk = 1'b0, rst_n = 1'b0, snap = 1'b0;
  logic [15:0] count;
  logic        valid;
  int          ro_half_ps = 2000;

  freq_counter u_dut (.ro_clk(ro_clk), .clk(clk), .rst_n(rst_n), .snap_i(snap),
                      .count_o(count), .valid_o(valid));

  always #2500 clk = ~clk;                   // 200 MHz
  always begin #(ro_half_ps); ro_clk = ~ro_clk; end

  longint ro_edges = 0;
  always @(posedge ro_clk) if (rst_n) ro_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Snap generator: every 512 cycles, with a priming snap first.
  int  n_valid = 0;
  longint sum_counts = 0;
  longint edges_at_first, edges_at_last;
  real exp_cnt;
  int  periods[4] = '{2000, 1600, 2900, 2400};

  always @(posedge clk) begin
    if (rst_n && valid) begin
      n_valid++;
      if (n_valid > 1) begin
        sum_counts += count;
        exp_cnt = 512.0 * 5000.0 / (2.0 * ro_half_ps);
        // Skip the samples around a frequency change.
        if ((n_valid - 2) % 50 != 0 && (n_valid - 1) % 50 != 0)
          check(real'(count) > exp_cnt - 1.01 && real'(count) < exp_cnt + 1.01,
                $sformatf("sample %0d = %0d, expected %0.2f", n_valid, count, exp_cnt));
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    // Priming snap.
    snap <= 1'b1; @(posedge clk); snap <= 1'b0;
    edges_at_first = ro_edges;
    for (int k = 0; k < 200; k++) begin
      if (k % 50 == 0) ro_half_ps = periods[k / 50];
      repeat (511) @(posedge clk);
      snap <= 1'b1; @(posedge clk); snap <= 1'b0;
    end
    edges_at_last = ro_edges;
    repeat (5) @(posedge clk);
    check(n_valid == 201, $sformatf("valid pulses %0d", n_valid));
    check(sum_counts >= edges_at_last - edges_at_first - 3 && sum_counts <= edges_at_last - edges_at_first + 3,
          $sformatf("total %0d vs %0d edges", sum_counts, edges_at_last - edges_at_first));
    check(sum_counts > 65536, "run spans counter wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
