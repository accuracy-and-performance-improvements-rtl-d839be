// async_fifo: dual-clock FIFO used to run the compute units on a faster clock
// than the rest of the fabric.
//
// Structure (as in the source design): write logic and read logic,
// each converting its own pointer to Gray code for the other side and the
// other side's synchronized Gray pointer back to binary; two pairs of
// flip-flops synchronizing the pointers in each direction; and a RAM block.
// Full and empty are pessimistic: they are released only two to three cycles
// after the other side moved its pointer.
//
// This design adds a valid/ready interface on both sides. Write side:
// a word is taken on a rising edge of wclk when wr_valid and wr_ready are
// high; wr_ready is the inverse of full. Read side: the RAM's registered
// output is used as a one-word show-ahead register, so rd_data is valid
// whenever rd_valid is high and is consumed by rd_ready; the first word
// appears about four rclk cycles after it was written (two synchronizer
// stages, one RAM read). Both resets are asynchronous, active low, as in the source design.
// The source's RAM enables (write enable from not-full, read enable from
// not-empty) become wen/ren of the pointer logic.
module async_fifo #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 4     // depth is 2**AW words
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [DW-1:0] wr_data,

  input  logic          rclk,
  input  logic          rrst_n,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [DW-1:0] rd_data
);

  logic [AW:0]   wptr_gray, rptr_gray, wptr_gray_sync, rptr_gray_sync;
  logic [AW-1:0] waddr, raddr;
  logic          wen, ren, full, empty, pop;

  fifo_wr_logic #(.AW(AW)) u_wr (
    .wclk(wclk), .wrst_n(wrst_n), .push(wr_valid),
    .rptr_gray_sync(rptr_gray_sync), .wptr_gray(wptr_gray),
    .waddr(waddr), .wen(wen), .full(full)
  );

  fifo_ptr_sync #(.W(AW+1)) u_r2w (
    .clk(wclk), .rst_n(wrst_n), .d_in(rptr_gray), .q_out(rptr_gray_sync)
  );

  fifo_ptr_sync #(.W(AW+1)) u_w2r (
    .clk(rclk), .rst_n(rrst_n), .d_in(wptr_gray), .q_out(wptr_gray_sync)
  );

  fifo_rd_logic #(.AW(AW)) u_rd (
    .rclk(rclk), .rrst_n(rrst_n), .pop(pop),
    .wptr_gray_sync(wptr_gray_sync), .rptr_gray(rptr_gray),
    .raddr(raddr), .ren(ren), .empty(empty)
  );

  fifo_ram #(.DW(DW), .AW(AW)) u_ram (
    .wclk(wclk), .we(wen), .waddr(waddr), .wdata(wr_data),
    .rclk(rclk), .re(ren), .raddr(raddr), .rdata(rd_data)
  );

  assign wr_ready = !full;

  // Fetch the next word whenever the show-ahead register is free or is
  // being emptied this cycle.
  assign pop = !rd_valid || rd_ready;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n)       rd_valid <= 1'b0;
    else if (ren)      rd_valid <= 1'b1;
    else if (rd_ready) rd_valid <= 1'b0;
  end

endmodule
