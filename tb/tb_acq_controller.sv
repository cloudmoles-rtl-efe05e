// tb_acq_controller: self-checking test of the acquisition control logic.
//
// Runs two full-size measurements (512 samples every 2^9 cycles) and checks
// the oscillator enable, the priming snap after the warm-up, the exact
// 512-cycle snap spacing, the 2^18-cycle span from priming snap to last
// sample, one buffer write per sample at addresses 0..511 in order, one cycle
// after each sampling snap, the done pulse, and that a start while busy is
// ignored.
module tb_acq_controller;

  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic       busy, ro_en, snap, wr_en, done;
  logic [8:0] wr_addr;

  acq_controller u_dut (.clk, .rst_n, .start_i(start), .busy_o(busy), .ro_en_o(ro_en),
                        .snap_o(snap), .wr_en_o(wr_en), .wr_addr_o(wr_addr), .done_o(done));

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (700_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Monitor.
  longint start_cyc, first_snap, last_snap, prev_snap;
  int     n_snap, n_wr, bad_spacing, bad_addr, bad_align, n_done;
  logic   snap_d;
  always @(posedge clk) if (rst_n) begin
    if (snap) begin
      if (n_snap == 0) first_snap = cyc;
      else if (cyc - prev_snap != 512) bad_spacing++;
      prev_snap = cyc;
      last_snap = cyc;
      n_snap++;
    end
    if (wr_en) begin
      if (wr_addr != 9'(n_wr)) bad_addr++;
      if (!(snap_d && n_snap >= 2)) bad_align++;
      n_wr++;
    end
    if (done) n_done++;
    snap_d = snap;
  end

  task automatic one_measurement(input int idx);
    n_snap = 0; n_wr = 0; bad_spacing = 0; bad_addr = 0; bad_align = 0; n_done = 0;
    @(negedge clk); start = 1'b1;
    start_cyc = cyc;
    @(negedge clk); start = 1'b0;
    check(ro_en && busy, $sformatf("m%0d: enable and busy after start", idx));
    // A start pulse in the middle of the run must be ignored.
    repeat (100_000) @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    check(n_snap == 513, $sformatf("m%0d: %0d snaps, expected 513", idx, n_snap));
    check(first_snap - start_cyc == 17, $sformatf("m%0d: priming snap %0d cycles after start", idx, first_snap - start_cyc));
    check(bad_spacing == 0, $sformatf("m%0d: %0d snaps not 512 cycles apart", idx, bad_spacing));
    check(last_snap - first_snap == 64'd1 << 18, $sformatf("m%0d: span %0d cycles", idx, last_snap - first_snap));
    check(n_wr == 512, $sformatf("m%0d: %0d writes", idx, n_wr));
    check(bad_addr == 0, $sformatf("m%0d: %0d writes out of order", idx, bad_addr));
    check(bad_align == 0, $sformatf("m%0d: %0d writes not one cycle after a sampling snap", idx, bad_align));
    check(n_done == 1, $sformatf("m%0d: %0d done pulses", idx, n_done));
    check(!ro_en && !busy, $sformatf("m%0d: disabled and idle at the end", idx));
  endtask

  initial begin
    n_snap = 0;
    repeat (4) @(negedge clk);
    check(!ro_en && !busy && !snap, "idle after reset");
    rst_n = 1'b1;
    repeat (50) @(negedge clk);
    check(!ro_en && n_snap == 0, "nothing happens without start");
    one_measurement(0);
    repeat (100) @(negedge clk);
    check(n_snap == 513, "no snaps while idle");
    one_measurement(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
