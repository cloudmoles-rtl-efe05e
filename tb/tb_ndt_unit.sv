// tb_ndt_unit: self-checking test of the trimean / NDT unit.
//
// The test keeps its own copy of a 512 x 13 sample memory with one-cycle read
// latency and fills each sensor's column with a different kind of data:
// constant, narrow and wide uniform noise, a two-level pattern like a
// periodically switched load, rare large outliers, values near the top of the
// 16-bit range, all zeros (a stopped oscillator) and random data. For every
// sensor it sorts the samples, forms 8*T from the quartiles (Q2 the median,
// Q1 and Q3 the medians of the lower and upper halves) and computes
// NDT = sqrt(sum (x - T)^2 / 511) / T in floating point. The unit's T8 must
// match exactly and its NDT code must be within one LSB of floor(NDT * 2^20).
// It also checks the result order, the sensor-to-sensor interval of 8,873
// cycles and the done pulse, over two runs with different data.
module tb_ndt_unit;

  timeunit 1ps;
  timeprecision 1ps;

  localparam int NS = 13, N = 512;
  localparam int CYC_PER_SENSOR = 17 * (N + 2) + 88 + 44 + 3;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic              busy, done, res_valid;
  logic [8:0]        rd_addr;
  logic [12:0][15:0] rd_data;
  logic [3:0]        res_sensor;
  logic [18:0]       res_t8;
  logic [23:0]       res_ndt;
  logic [15:0]       mem [N][NS];

  ndt_unit u_dut (.clk, .rst_n, .start_i(start), .busy_o(busy), .done_o(done),
                  .rd_addr_o(rd_addr), .rd_data_i(rd_data), .res_valid_o(res_valid),
                  .res_sensor_o(res_sensor), .res_trimean8_o(res_t8), .res_ndt_o(res_ndt));

  always #2500 clk = ~clk;

  always @(posedge clk)
    for (int s = 0; s < NS; s++) rd_data[s] <= mem[rd_addr][s];

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

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int gen(input int s, input int i, input int run);
    case (s)
      0:  return 600;                                         // constant
      1:  return 600 + $urandom_range(2);                     // quantization noise
      2:  return 500 + $urandom_range(200);                   // wide noise
      3:  return ((i % 20) < 4) ? 560 + $urandom_range(3) : 600 + $urandom_range(3); // switched load
      4:  return (i % 97 == 5) ? 9000 : 700 + $urandom_range(1);   // rare outliers
      5:  return 65000 + $urandom_range(535);                 // near full scale
      6:  return 0;                                           // stopped oscillator
      7:  return $urandom_range(65535);                       // anything
      8:  return 1 + (i % 2);                                 // tiny values
      9:  return 300 + i;                                     // ramp
      10: return (run == 0) ? 1000 - i : 250 + $urandom_range(30);
      11: return (i < 256) ? 100 : 900;                       // bimodal
      default: return 450 + $urandom_range(60);
    endcase
  endfunction

  int     exp_t8 [NS];
  real    exp_ndt [NS];

  task automatic fill_and_model(input int run);
    int col[$];
    int k;
    real t, ss;
    for (int i = 0; i < N; i++)
      for (int s = 0; s < NS; s++) mem[i][s] = 16'(gen(s, i, run));
    k = N / 4;
    for (int s = 0; s < NS; s++) begin
      col.delete();
      for (int i = 0; i < N; i++) col.push_back(int'(mem[i][s]));
      col.sort();
      exp_t8[s] = col[k-1] + col[k] + 2 * (col[2*k-1] + col[2*k]) + col[3*k-1] + col[3*k];
      t = real'(exp_t8[s]) / 8.0;
      ss = 0.0;
      for (int i = 0; i < N; i++) ss += (real'(col[i]) - t) * (real'(col[i]) - t);
      exp_ndt[s] = (t == 0.0) ? 0.0 : $sqrt(ss / real'(N - 1)) / t;
    end
  endtask

  int     n_res, bad_gap;
  longint last_res;
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      real want;
      longint want_code;
      if (n_res > 0 && cyc - last_res != CYC_PER_SENSOR) bad_gap++;
      last_res = cyc;
      check(res_sensor == 4'(n_res), $sformatf("result order: got sensor %0d, expected %0d", res_sensor, n_res));
      check(res_t8 == 19'(exp_t8[n_res]), $sformatf("sensor %0d: T8 %0d, expected %0d", n_res, res_t8, exp_t8[n_res]));
      want = exp_ndt[n_res] * real'(1 << 20);
      if (want > 16777215.0) want = 16777215.0;
      want_code = longint'($floor(want));
      check(longint'(res_ndt) >= want_code - 1 && longint'(res_ndt) <= want_code + 1,
            $sformatf("sensor %0d: NDT code %0d, expected %0d (NDT %f)", n_res, res_ndt, want_code, exp_ndt[n_res]));
      n_res++;
    end
  end

  task automatic run_once(input int run);
    fill_and_model(run);
    n_res = 0; bad_gap = 0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    check(busy, "busy after start");
    @(posedge done);
    @(negedge clk);
    @(negedge clk);
    check(n_res == NS, $sformatf("run %0d: %0d results", run, n_res));
    check(bad_gap == 0, $sformatf("run %0d: %0d results not %0d cycles apart", run, bad_gap, CYC_PER_SENSOR));
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    run_once(0);
    run_once(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
