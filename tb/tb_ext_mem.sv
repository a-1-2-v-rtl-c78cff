// tb_ext_mem: behavioural model of the external memory used by the DMA
// controller's and the system's testbenches (not part of the design).
// One request per cycle when granted; grants can be withheld at random
// (GNT_PCT percent granted) and read data returns in order LAT cycles after
// the grant. The array is open to the testbench through hierarchical access.
module tb_ext_mem #(
  parameter int unsigned AW      = 16,
  parameter int unsigned DW      = 16,
  parameter int unsigned LAT     = 2,
  parameter int unsigned GNT_PCT = 100
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic          gnt,
  output logic          rvalid,
  output logic [DW-1:0] rdata,
  output int unsigned   n_denied
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] pipe_d [LAT];
  logic          pipe_v [LAT];

  initial begin
    n_denied = 0;
    for (int i = 0; i < LAT; i++) pipe_v[i] = 0;
    gnt = 1;
  end

  always @(negedge clk) gnt = ($urandom_range(0, 99) < GNT_PCT);

  always @(posedge clk) begin
    if (req && !gnt) n_denied <= n_denied + 1;
    if (req && gnt && we) mem[addr] <= wdata;
    for (int i = LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= req && gnt && !we;
    pipe_d[0] <= mem[addr];
  end

  assign rvalid = pipe_v[LAT-1];
  assign rdata  = pipe_d[LAT-1];
endmodule
