// fifo_rd_logic: read-side pointer logic of the dual-clock FIFO.
//
// Mirror of fifo_wr_logic. Keeps the binary pop pointer (AW+1 bits), exports
// it Gray coded for the write side, and converts the synchronized Gray push
// pointer back to binary. The FIFO is empty when both pointers are equal.
// The push pointer arrives through a two-stage synchronizer, so empty stays
// asserted for a few cycles after a push: pessimistic, never a false read.
//
// Interface: pop is a request; it is accepted (ren high, pointer advances)
// only while empty is low. raddr is the RAM address of the accepted read.
module fifo_rd_logic
  import dfx_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          pop,
  input  logic [AW:0]   wptr_gray_sync,  // push pointer, Gray, already synchronized
  output logic [AW:0]   rptr_gray,       // pop pointer, Gray, to the write side
  output logic [AW-1:0] raddr,
  output logic          ren,
  output logic          empty
);

  logic [AW:0] rptr_bin, rptr_bin_nxt, wptr_bin;
  logic [31:0] wptr_bin32, rptr_gray32;

  always_comb begin
    wptr_bin32   = gray2bin(32'(wptr_gray_sync));
    wptr_bin     = wptr_bin32[AW:0];
    rptr_bin_nxt = rptr_bin + 1'b1;
    rptr_gray32  = bin2gray(32'(rptr_bin_nxt));
    empty        = (rptr_bin == wptr_bin);
    ren          = pop && !empty;
    raddr        = rptr_bin[AW-1:0];
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr_bin  <= '0;
      rptr_gray <= '0;
    end else if (ren) begin
      rptr_bin  <= rptr_bin_nxt;
      rptr_gray <= rptr_gray32[AW:0];
    end
  end

endmodule
