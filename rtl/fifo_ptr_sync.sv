// fifo_ptr_sync: two-flip-flop synchronizer for a Gray-coded FIFO pointer.
//
// Carries a W-bit pointer from another clock domain into the domain of clk.
// Because the pointer is Gray coded, at most one bit changes per increment,
// so each bit can be synchronized on its own without ever producing a value
// that the pointer never held. Two stages, as in the source design;
// the asynchronous active-low reset (clears both stages) is also the source's.
//
// Timing: a change of d_in is seen on q_out two to three rising edges of clk
// later.
module fifo_ptr_sync #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_in,
  output logic [W-1:0] q_out
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta  <= '0;
      q_out <= '0;
    end else begin
      meta  <= d_in;
      q_out <= meta;
    end
  end

endmodule
