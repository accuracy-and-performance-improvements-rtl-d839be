// vmac_cu: vector multiply-accumulate compute unit.
//
// LANES independent signed fixed-point MACs (16 in the main configuration:
// a 256-bit vector unit with 16-bit granularity, one DSP slice per lane).
// Every accepted beat multiplies pixel lane i by weight lane i and adds the
// product to accumulator i. A beat flagged last ends the dot product: the
// accumulated vector (including that beat) is put on acc_out with out_valid
// high for one cycle, and the accumulators restart from zero on the next
// beat, so back-to-back dot products need no idle cycle.
//
// The binary point is not tracked here: with pixels in QXp.Yp and weights in
// QXw.Yw the accumulators hold Yp+Yw fraction bits, which the output unit
// knows. The 12-bit operands sign-extend naturally into an FPGA DSP multiplier.
//
// Timing: two pipeline stages (product register, accumulator register).
// acc_out/out_valid appear two rising edges after the last beat is taken.
// There is no back-pressure: the caller must be able to take every result.
// Lane count follows the source design; accumulator width (48, a DSP48E1
// accumulator) and the two-stage pipeline are this design's choices.
module vmac_cu
  import dfx_pkg::*;
#(
  parameter int unsigned LANES = 16,
  parameter int unsigned ACC_W = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  word_t                   pix [LANES],
  input  word_t                   wgt [LANES],
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] acc_out [LANES]
);

  localparam int unsigned PROD_W = 2 * WORD_W;

  logic signed [PROD_W-1:0] prod_q [LANES];
  logic signed [ACC_W-1:0]  acc_q  [LANES];
  logic                     v1_q, l1_q;

  // Stage 1: lane-wise products.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      l1_q <= 1'b0;
      for (int i = 0; i < LANES; i++) prod_q[i] <= '0;
    end else begin
      v1_q <= in_valid;
      l1_q <= in_valid && in_last;
      if (in_valid)
        for (int i = 0; i < LANES; i++) prod_q[i] <= pix[i] * wgt[i];
    end
  end

  // Stage 2: accumulate; on the last beat dump and clear.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < LANES; i++) begin
        acc_q[i]   <= '0;
        acc_out[i] <= '0;
      end
    end else begin
      out_valid <= v1_q && l1_q;
      if (v1_q) begin
        for (int i = 0; i < LANES; i++) begin
          if (l1_q) begin
            acc_out[i] <= acc_q[i] + ACC_W'(prod_q[i]);
            acc_q[i]   <= '0;
          end else begin
            acc_q[i]   <= acc_q[i] + ACC_W'(prod_q[i]);
          end
        end
      end
    end
  end

endmodule
