// tb_topology_sweep: the attacker-alone measurement for all nine tested
// sensor topologies (N, S, H) side by side.
//
// Nine copies of the sensor network, each built with one topology:
// (2,10,10) (2,20,10) (2,40,10) (2,40,20) (2,80,10) (3,10,10) (3,20,10)
// (3,20,20) (3,40,10), see the same supply voltages: a power waster in
// X0Y3..X1Y5 switched 10 us on and 40 us off, drooping its regions by 40 mV
// and the rest of the device by 8 mV, with +-1 mV noise everywhere (this
// test's own stand-in for the physical supply). For every topology the test
// checks that the median sample matches the oscillator frequency the topology
// should have at nominal supply (worked out here from its LUT count and loop
// length), prints the NDT of every region as one column of a colour map, and
// checks that the six highest NDT values are the attacker's six regions.
module tb_topology_sweep;

  timeunit 1ps;
  timeprecision 1ps;

  localparam int NS = 13, N = 512, NT = 9;
  localparam int TN [NT] = '{2, 2, 2, 2, 2, 3, 3, 3, 3};
  localparam int TS [NT] = '{10, 20, 40, 40, 80, 10, 20, 20, 40};
  localparam int TH [NT] = '{10, 10, 10, 20, 10, 10, 10, 20, 10};

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [12:0][15:0] vcc;
  logic [NT-1:0]     sample_valid, ndt_valid, done;
  logic [12:0][15:0] counts [NT];
  logic [3:0]        ndt_sensor [NT];
  logic [23:0]       ndt [NT];

  for (genvar t = 0; t < NT; t++) begin : g_topo
    cloudmoles_top #(.RO_N(TN[t]), .RO_S(TS[t]), .RO_H(TH[t])) u_net (
      .clk, .rst_n, .start_i(start), .vccint_mv_i(vcc), .busy_o(), .ro_en_o(),
      .sample_valid_o(sample_valid[t]), .sample_idx_o(), .sample_counts_o(counts[t]),
      .ndt_valid_o(ndt_valid[t]), .ndt_sensor_o(ndt_sensor[t]), .ndt_trimean8_o(),
      .ndt_o(ndt[t]), .done_o(done[t]));
  end

  always #2500 clk = ~clk;

  string region [NS] = '{"X0Y0", "X1Y0", "X0Y1", "X1Y1", "X0Y2", "X1Y2", "X0Y3",
                         "X1Y3", "X0Y4", "X1Y4", "X0Y5", "X1Y5", "X1Y6"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (800_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit attacker_on = 1'b0;
  always begin
    #40_000_000 attacker_on = 1'b1;
    #10_000_000 attacker_on = 1'b0;
  end

  always begin
    int v;
    #50_000;
    for (int s = 0; s < NS; s++) begin
      v = 1000 + $urandom_range(2) - 1;
      if (attacker_on) v -= (s >= 6 && s <= 11) ? 40 : 8;
      vcc[s] = 16'(v);
    end
  end

  int samples [NT][$];
  int got_ndt [NT][NS];
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) begin
      if (sample_valid[t]) samples[t].push_back(int'(counts[t][12]));  // X1Y6: never under the waster
      if (ndt_valid[t]) got_ndt[t][ndt_sensor[t]] = int'(ndt[t]);
    end
  end

  function automatic int loop_slices(input int n, input int s, input int h);
    // Down and up the columns, right between them, and back to the first LUT.
    return n * h + (n - 1) * s + (n - 1) * s + ((n % 2 == 1) ? h : 0);
  endfunction

  initial begin
    real f, exp_med;
    int  med;
    bit  ok;
    for (int s = 0; s < NS; s++) vcc[s] = 16'd1000;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    wait (&done);
    repeat (2) @(negedge clk);
    $display("NDT x1e4 per region (rows) and topology (N,S,H) (columns)");
    $write("      ");
    for (int t = 0; t < NT; t++) $write(" (%0d,%0d,%0d)", TN[t], TS[t], TH[t]);
    $write("\n");
    for (int s = NS - 1; s >= 0; s--) begin
      $write("%s ", region[s]);
      for (int t = 0; t < NT; t++) $write(" %9.1f", real'(got_ndt[t][s]) / 1048576.0 * 1e4);
      $write("\n");
    end
    for (int t = 0; t < NT; t++) begin
      f = 1.0e12 / (2.0 * (2 * TN[t] * 361 + loop_slices(TN[t], TS[t], TH[t]) * 13));
      exp_med = f * 512.0 * 5.0e-9;
      check(samples[t].size() == N, $sformatf("topology %0d: %0d samples", t, samples[t].size()));
      samples[t].sort();
      med = samples[t][N / 2];
      check(real'(med) > exp_med * 0.995 - 1.0 && real'(med) < exp_med * 1.005 + 1.0,
            $sformatf("(%0d,%0d,%0d): median count %0d, expected %0.1f", TN[t], TS[t], TH[t], med, exp_med));
      // Every attacker region must rank above every other region.
      ok = 1'b1;
      for (int a = 6; a <= 11; a++)
        for (int s = 0; s < NS; s++)
          if (!(s >= 6 && s <= 11) && got_ndt[t][s] >= got_ndt[t][a]) ok = 1'b0;
      check(ok, $sformatf("(%0d,%0d,%0d): six highest NDT in the attacker's regions", TN[t], TS[t], TH[t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
