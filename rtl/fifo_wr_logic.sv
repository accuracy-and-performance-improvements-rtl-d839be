// fifo_wr_logic: write-side pointer logic of the dual-clock FIFO.
//
// Keeps the binary push pointer (AW+1 bits: the extra bit tells a full FIFO
// from an empty one), exports it Gray coded for the read side, and converts
// the synchronized Gray pop pointer from the read side back to binary to
// compare. The FIFO is full when the two pointers differ only in their top
// bit. Because the pop pointer arrives through a two-stage synchronizer, full
// stays asserted for a few cycles after a pop: the flag is pessimistic, as the
// source design describes, and never lets a write overrun unread data.
//
// Interface: push is a request; it is accepted (wen high, pointer advances)
// only while full is low. waddr is the RAM address of the accepted write.
// The Gray pointer is registered so the synchronizer samples a glitch-free
// value.
module fifo_wr_logic
  import dfx_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  logic        wclk,
  input  logic        wrst_n,
  input  logic        push,
  input  logic [AW:0] rptr_gray_sync,  // pop pointer, Gray, already synchronized
  output logic [AW:0] wptr_gray,       // push pointer, Gray, to the read side
  output logic [AW-1:0] waddr,
  output logic        wen,
  output logic        full
);

  logic [AW:0] wptr_bin, wptr_bin_nxt, rptr_bin;
  logic [31:0] rptr_bin32, wptr_gray32;

  always_comb begin
    rptr_bin32   = gray2bin(32'(rptr_gray_sync));
    rptr_bin     = rptr_bin32[AW:0];
    wptr_bin_nxt = wptr_bin + 1'b1;
    wptr_gray32  = bin2gray(32'(wptr_bin_nxt));
    full     = (wptr_bin[AW] != rptr_bin[AW]) &&
               (wptr_bin[AW-1:0] == rptr_bin[AW-1:0]);
    wen      = push && !full;
    waddr    = wptr_bin[AW-1:0];
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr_bin  <= '0;
      wptr_gray <= '0;
    end else if (wen) begin
      wptr_bin  <= wptr_bin_nxt;
      wptr_gray <= wptr_gray32[AW:0];
    end
  end

endmodule
