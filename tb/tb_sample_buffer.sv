// tb_sample_buffer: self-checking test of the sample memory.
//
// Fills all 512 rows with random samples of 13 sensors, reads every row back
// in random order and checks the one-cycle read latency and the data against
// a copy kept by the test, then checks that a read of a row being written in
// the same cycle returns the old contents.
module tb_sample_buffer;

  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic                  clk = 1'b0, wr_en = 1'b0;
  logic [8:0]            wr_addr = '0, rd_addr = '0;
  logic [12:0][15:0]     wr_data, rd_data;
  logic [12:0][15:0]     model [512];

  sample_buffer u_dut (.clk, .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
                       .rd_addr_i(rd_addr), .rd_data_o(rd_data));

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:0][15:0] row;
    int a;
    for (int i = 0; i < 512; i++) begin
      for (int s = 0; s < 13; s++) row[s] = 16'($urandom);
      model[i] = row;
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 9'(i); wr_data = row;
    end
    @(negedge clk); wr_en = 1'b0;
    for (int k = 0; k < 600; k++) begin
      a = $urandom_range(511);
      rd_addr = 9'(a);
      @(negedge clk);
      check(rd_data == model[a], $sformatf("row %0d read back", a));
    end
    // Read-during-write of the same row returns the old word.
    for (int s = 0; s < 13; s++) row[s] = ~model[7][s];
    wr_en = 1'b1; wr_addr = 9'd7; wr_data = row; rd_addr = 9'd7;
    @(negedge clk);
    wr_en = 1'b0;
    check(rd_data == model[7], "read during write returns old row");
    @(negedge clk);
    check(rd_data == row, "new row visible next cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
