// tb_ro_sensor: self-checking test of the ring-oscillator sensor model.
//
// Two instances are checked: the default topology (N=2, S=20, H=10) and the
// second main topology (N=3, S=20, H=20). The expected loop delay is worked
// out here by walking the LUT coordinates in connection order (down the first
// column, right, up the next, ..., then back to the first LUT) and summing
// the Manhattan lengths, plus one LUT delay per LUT. The test checks the
// measured period at nominal supply, the slow-down under a 50 mV droop, that
// a disabled loop rests at 1 without edges, and that it restarts when enabled.
module tb_ro_sensor;

  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic        en;
  logic [15:0] mv;
  logic        ro_a, ro_b;

  ro_sensor u_a (.en_i(en), .vccint_mv_i(mv), .ro_o(ro_a));
  ro_sensor #(.N_COLS(3), .STRIDE(20), .HEIGHT(20)) u_b (.en_i(en), .vccint_mv_i(mv), .ro_o(ro_b));

  localparam int LUT_PS = 361, WIRE_PS = 13;

  // Loop delay from the LUT coordinates.
  function automatic int loop_ps(input int n, input int s, input int h);
    int xs[$], ys[$];
    int len = 0;
    for (int c = 0; c < n; c++) begin
      if (c % 2 == 0) begin xs.push_back(c*s); ys.push_back(h); xs.push_back(c*s); ys.push_back(0); end
      else            begin xs.push_back(c*s); ys.push_back(0); xs.push_back(c*s); ys.push_back(h); end
    end
    for (int i = 0; i < xs.size(); i++) begin
      int j = (i + 1) % xs.size();
      len += ((xs[j] > xs[i]) ? xs[j]-xs[i] : xs[i]-xs[j]) + ((ys[j] > ys[i]) ? ys[j]-ys[i] : ys[i]-ys[j]);
    end
    return 2*n*LUT_PS + len*WIRE_PS;
  endfunction

  realtime last_a, last_b, per_a, per_b;
  int edges_a = 0, edges_b = 0;
  always @(posedge ro_a) begin per_a = $realtime - last_a; last_a = $realtime; edges_a++; end
  always @(posedge ro_b) begin per_b = $realtime - last_b; last_b = $realtime; edges_b++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_period(input realtime got, input real exp_ps, input string what);
    check(got > exp_ps - 2.0 && got < exp_ps + 2.0,
          $sformatf("%s period %0t ps, expected %0.1f ps", what, got, exp_ps));
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    real pa, pb;
    pa = 2.0 * loop_ps(2, 20, 10);
    pb = 2.0 * loop_ps(3, 20, 20);
    $display("expected periods: %0.1f ps (%0.1f MHz), %0.1f ps (%0.1f MHz)", pa, 1e6/pa, pb, 1e6/pb);
    en = 0; mv = 16'd1000;
    #100_000;
    check(ro_a == 1'b1 && ro_b == 1'b1, "disabled outputs rest at 1");
    ea = edges_a; eb = edges_b;
    #100_000;
    check(edges_a == ea && edges_b == eb, "no edges while disabled");
    en = 1;
    #200_000;
    check_period(per_a, pa, "N=2,S=20,H=10");
    check_period(per_b, pb, "N=3,S=20,H=20");
    // The default topology should land near the measured 175..218 MHz band.
    check(1e6/pa > 150.0 && 1e6/pa < 260.0, "default topology frequency plausible");
    mv = 16'd950;
    #200_000;
    check_period(per_a, pa * 1000.0 / 950.0, "N=2 at 950 mV");
    check_period(per_b, pb * 1000.0 / 950.0, "N=3 at 950 mV");
    en = 0;
    #20_000;
    check(ro_a == 1'b1 && ro_b == 1'b1, "stops at 1 after disable");
    ea = edges_a;
    #100_000;
    check(edges_a == ea, "no edges after disable");
    mv = 16'd1000;
    en = 1;
    #100_000;
    check(edges_a > ea + 20, "restarts after enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
