// fifo_ram: the data store of the dual-clock FIFO, a simple dual-port RAM.
//
// One write port clocked by wclk and one read port clocked by rclk, as the
// block RAM of an FPGA provides. The write is synchronous (we high at a rising
// edge of wclk stores wdata at waddr). The read is registered: with re high at
// a rising edge of rclk, rdata shows mem[raddr] after that edge and holds it
// while re is low. The source design names this RAM block only; depth and width
// are parameters of this design.
module fifo_ram #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 4
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rclk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
