// tb_cloudmoles_top: end-to-end test of the sensor network at full size.
//
// The top runs with its default parameters: 13 sensors (N=2, S=20, H=10),
// 512 samples every 2^9 cycles of a 200 MHz clock. The test plays the supply
// voltage of each clock region and runs four measurements:
//   1. sensors alone: every region at 1000 mV with +-1 mV noise;
//   2. attacker alone: a power waster in X0Y3..X1Y5 (six regions) switched on
//      for 10 us and off for 40 us, drooping its own regions by 40 mV and the
//      rest of the device by 8 mV while on;
//   3. tenant alone: an ordinary circuit in X0Y3 and X0Y4 whose activity
//      adds a random droop of 0..6 mV to its regions, redrawn every 1 us;
//   4. attacker and tenant side by side: a smaller waster (120k instead of
//      135k units, droops scaled by 120/135) in X0Y1..X0Y5 and the ordinary
//      tenant in X1Y4 and X1Y5.
// The voltage figures are this test's own stand-in for the physical supply.
// For each measurement the test checks the sample timing (512 samples, 512
// cycles apart), that each baseline sample matches the oscillator frequency
// at nominal supply, recomputes trimean and NDT from the streamed samples
// (T8 exact, NDT within one LSB), and checks that the highest NDT values fall
// in the regions with the power waster (or, with the tenant alone, in the
// tenant's regions, at well under the waster's level) and that without any
// load all NDT values stay small. It counts how often each mechanism occurred: oscillator
// enable, priming snap, sampling snap, counter wrap, droop event, NDT result,
// waster located; one that never happened is a failure.
module tb_cloudmoles_top;

  timeunit 1ps;
  timeprecision 1ps;

  localparam int NS = 13, N = 512;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [12:0][15:0] vcc;
  logic              busy, ro_en, sample_valid, ndt_valid, done;
  logic [8:0]        sample_idx;
  logic [12:0][15:0] counts;
  logic [3:0]        ndt_sensor;
  logic [18:0]       ndt_t8;
  logic [23:0]       ndt;

  cloudmoles_top u_dut (
    .clk, .rst_n, .start_i(start), .vccint_mv_i(vcc), .busy_o(busy), .ro_en_o(ro_en),
    .sample_valid_o(sample_valid), .sample_idx_o(sample_idx), .sample_counts_o(counts),
    .ndt_valid_o(ndt_valid), .ndt_sensor_o(ndt_sensor), .ndt_trimean8_o(ndt_t8),
    .ndt_o(ndt), .done_o(done));

  always #2500 clk = ~clk;

  // Sensor index to clock-region name (X0Y6 holds the shell controller).
  string region [NS] = '{"X0Y0", "X1Y0", "X0Y1", "X1Y1", "X0Y2", "X1Y2", "X0Y3",
                         "X1Y3", "X0Y4", "X1Y4", "X0Y5", "X1Y5", "X1Y6"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_enable = 0, n_prime = 0, n_sample = 0, n_wrap = 0, n_droop = 0, n_ndt = 0, n_located = 0;

  // ---------------------------------------------------------------- supply
  int  scenario = 0;                 // 0 alone, 1 attacker, 2 collocated, 3 tenant alone
  bit  attacker_on = 1'b0;
  bit  attacker_region [NS];
  bit  tenant_region [NS];

  always begin
    #40_000_000 attacker_on = (scenario == 1 || scenario == 2);
    if (attacker_on) n_droop++;
    #10_000_000 attacker_on = 1'b0;
  end

  int tenant_droop = 0;
  always begin
    #1_000_000 tenant_droop = $urandom_range(6);
  end

  always begin
    int v;
    #50_000;
    for (int s = 0; s < NS; s++) begin
      v = 1000 + $urandom_range(2) - 1;
      if (attacker_on) begin
        if (scenario == 1) v -= attacker_region[s] ? 40 : 8;
        else               v -= attacker_region[s] ? (40 * 120 / 135) : (8 * 120 / 135);
      end
      if ((scenario == 2 || scenario == 3) && tenant_region[s]) v -= tenant_droop;
      vcc[s] = 16'(v);
    end
  end

  // ---------------------------------------------------------------- capture
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int     samples [N][NS];
  int     n_rows, bad_spacing, bad_idx;
  longint last_row_cyc;
  longint total [NS];
  bit     ro_en_d, snap_d;
  int     exp_t8 [NS];
  real    exp_ndt [NS];
  int     got_ndt [NS];
  int     attacker_ndt [NS];

  always @(posedge clk) if (rst_n) begin
    if (ro_en && !ro_en_d) n_enable++;
    ro_en_d <= ro_en;
    if (u_dut.snap && !u_dut.u_ctrl.snap_is_sample) n_prime++;
    if (sample_valid) begin
      if (n_rows > 0 && cyc - last_row_cyc != 512) bad_spacing++;
      if (sample_idx != 9'(n_rows)) bad_idx++;
      last_row_cyc = cyc;
      for (int s = 0; s < NS; s++) begin
        samples[n_rows][s] = int'(counts[s]);
        if ((total[s] % 65536) + counts[s] >= 65536) n_wrap++;
        total[s] += counts[s];
      end
      n_rows++;
      n_sample++;
    end
    if (ndt_valid) begin
      got_ndt[ndt_sensor] = int'(ndt);
      check(int'(ndt_t8) == exp_t8[ndt_sensor],
            $sformatf("%s: T8 %0d, expected %0d", region[ndt_sensor], ndt_t8, exp_t8[ndt_sensor]));
      check(longint'(ndt) >= longint'($floor(exp_ndt[ndt_sensor] * 1048576.0)) - 1 &&
            longint'(ndt) <= longint'($floor(exp_ndt[ndt_sensor] * 1048576.0)) + 1,
            $sformatf("%s: NDT %0d, expected %f", region[ndt_sensor], ndt, exp_ndt[ndt_sensor] * 1048576.0));
      n_ndt++;
    end
  end

  // Reference trimean and NDT from the streamed samples.
  task automatic model();
    int col[$];
    int k = N / 4;
    real t, ss;
    for (int s = 0; s < NS; s++) begin
      col.delete();
      for (int i = 0; i < N; i++) col.push_back(samples[i][s]);
      col.sort();
      exp_t8[s] = col[k-1] + col[k] + 2 * (col[2*k-1] + col[2*k]) + col[3*k-1] + col[3*k];
      t = real'(exp_t8[s]) / 8.0;
      ss = 0.0;
      for (int i = 0; i < N; i++) ss += (real'(col[i]) - t) ** 2;
      exp_ndt[s] = (t == 0.0) ? 0.0 : $sqrt(ss / real'(N - 1)) / t;
    end
  endtask

  // True when the n highest NDT values are exactly the regions marked in want
  // (n of them): every marked region ranks above every unmarked one.
  function automatic bit top_n_match(input int n, input bit want [NS]);
    int marked = 0;
    for (int a = 0; a < NS; a++) begin
      if (!want[a]) continue;
      marked++;
      for (int s = 0; s < NS; s++)
        if (!want[s] && got_ndt[s] >= got_ndt[a]) return 1'b0;
    end
    return marked == n;
  endfunction

  task automatic measure(input int sc, input string name);
    longint t0;
    scenario = sc;
    n_rows = 0; bad_spacing = 0; bad_idx = 0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    t0 = cyc;
    wait (u_dut.meas_done);
    @(negedge clk);
    check(n_rows == N, $sformatf("%s: %0d samples", name, n_rows));
    check(bad_spacing == 0, $sformatf("%s: %0d samples not 512 cycles apart", name, bad_spacing));
    check(bad_idx == 0, $sformatf("%s: %0d samples out of order", name, bad_idx));
    check(cyc - t0 >= (64'd1 << 18) && cyc - t0 <= (64'd1 << 18) + 32,
          $sformatf("%s: measurement took %0d cycles", name, cyc - t0));
    model();
    wait (done);
    @(negedge clk);
    @(negedge clk);
    check(!busy, $sformatf("%s: idle after done", name));
    $write("%s NDT x1e4:", name);
    for (int s = 0; s < NS; s++) $write(" %s=%0.1f", region[s], real'(got_ndt[s]) / 1048576.0 * 1e4);
    $write("\n");
  endtask

  initial begin
    real f_ro, exp_cnt;
    int  bad_cnt;
    for (int s = 0; s < NS; s++) begin
      vcc[s] = 16'd1000;
      total[s] = 0;
      attacker_region[s] = 1'b0;
      tenant_region[s] = 1'b0;
    end
    n_rows = 0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // 1. Sensors alone.
    measure(0, "alone");
    // Oscillator at nominal supply: loop of 4 LUTs and 60 slices of wire.
    f_ro = 1.0e12 / (2.0 * (4 * 361 + 60 * 13));
    exp_cnt = f_ro * 512.0 * 5.0e-9;
    bad_cnt = 0;
    for (int i = 0; i < N; i++)
      for (int s = 0; s < NS; s++)
        if (real'(samples[i][s]) < exp_cnt * 0.99 - 1.0 || real'(samples[i][s]) > exp_cnt * 1.01 + 1.0) bad_cnt++;
    check(bad_cnt == 0, $sformatf("alone: %0d samples off the expected %0.1f counts", bad_cnt, exp_cnt));
    for (int s = 0; s < NS; s++)
      check(got_ndt[s] < 0.003 * 1048576.0, $sformatf("alone: %s NDT small", region[s]));

    // 2. Attacker alone in X0Y3, X1Y3, X0Y4, X1Y4, X0Y5, X1Y5.
    for (int s = 0; s < NS; s++) attacker_region[s] = (s >= 6 && s <= 11);
    measure(1, "attacker");
    if (top_n_match(6, attacker_region)) n_located++;
    check(top_n_match(6, attacker_region), "attacker: six highest NDT in the attacker's regions");

    for (int s = 0; s < NS; s++) attacker_ndt[s] = got_ndt[s];

    // 3. Tenant alone in X0Y3 and X0Y4.
    for (int s = 0; s < NS; s++) begin
      attacker_region[s] = 1'b0;
      tenant_region[s]   = (s == 6 || s == 8);
    end
    measure(3, "tenant");
    if (top_n_match(2, tenant_region)) n_located++;
    check(top_n_match(2, tenant_region), "tenant: two highest NDT in the tenant's regions");
    check(got_ndt[6] * 2 < attacker_ndt[6] && got_ndt[8] * 2 < attacker_ndt[8],
          "tenant: NDT well below the attacker's in the same regions");

    // 4. Attacker in X0Y1..X0Y5, tenant in X1Y4 and X1Y5.
    for (int s = 0; s < NS; s++) begin
      attacker_region[s] = (s % 2 == 0) && s >= 2 && s <= 10;
      tenant_region[s]   = (s == 9 || s == 11);
    end
    measure(2, "collocated");
    if (top_n_match(5, attacker_region)) n_located++;
    check(top_n_match(5, attacker_region), "collocated: five highest NDT in the attacker's regions");

    $display("mechanisms: enable=%0d prime=%0d sample=%0d wrap=%0d droop=%0d ndt=%0d located=%0d",
             n_enable, n_prime, n_sample, n_wrap, n_droop, n_ndt, n_located);
    check(n_enable == 4, "oscillators enabled once per measurement");
    check(n_prime == 4, "one priming snap per measurement");
    check(n_sample == 4 * N, "all samples recorded");
    check(n_wrap > 0, "counter wrap happened");
    check(n_droop > 0, "supply droops happened");
    check(n_ndt == 4 * NS, "all NDT results produced");
    check(n_located == 3, "load located in all three loaded runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
