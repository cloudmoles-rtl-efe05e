// sample_buffer: memory for the samples of one measurement.
//
// Holds DEPTH words (512 sampling instants by default); each word carries the
// samples of all N_SENSORS sensors taken at the same instant, so one write per
// sampling period stores a whole row. The design records 512 samples per
// sensor; keeping them in a buffer in the shell, rather than only streaming
// them off chip, is this implementation's choice so that the NDT metric can be
// computed on chip.
//
// Interface and timing: a simple dual-port RAM. A write (wr_en_i, wr_addr_i,
// wr_data_i) takes effect at the clock edge. A read returns mem[rd_addr_i] on
// rd_data_o one cycle after the address is presented. Reading and writing the
// same address in one cycle returns the old word. Contents are not reset.
module sample_buffer #(
  parameter int unsigned N_SENSORS = cm_pkg::N_SENSORS,
  parameter int unsigned COUNT_W   = cm_pkg::COUNT_W,
  parameter int unsigned DEPTH     = cm_pkg::N_SAMPLES,
  localparam int unsigned AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                                  clk,
  input  logic                                  wr_en_i,
  input  logic [AW-1:0]                         wr_addr_i,
  input  logic [N_SENSORS-1:0][COUNT_W-1:0]     wr_data_i,
  input  logic [AW-1:0]                         rd_addr_i,
  output logic [N_SENSORS-1:0][COUNT_W-1:0]     rd_data_o
);

  logic [N_SENSORS*COUNT_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
    rd_data_o <= mem[rd_addr_i];
  end

endmodule
