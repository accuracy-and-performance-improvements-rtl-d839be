// dfx_output_unit: dynamic fixed-point output unit.
//
// Sits between a compute unit and the vector register file. The format of the
// accumulators is known (prod_frac = pixel fraction bits + weight fraction
// bits), and the wanted output format (out_frac fraction bits of a 12-bit
// word) is supplied by the input unit from the measured range of the data.
// Each lane is shifted so its binary point lands at out_frac, low bits are
// truncated, and a value that no longer fits is clamped to the largest or
// smallest 12-bit word; sat_any reports that some lane was clamped.
//
// Timing: one register stage; out_valid follows in_valid by one clock.
// prod_frac and out_frac are sampled with the data. The source design gives the
// unit's job and places it; truncation with clamping is its stated rule for
// out-of-range results, and the shift-based datapath (instead of a DSP slice
// per unit) is this design's choice.
module dfx_output_unit
  import dfx_pkg::*;
#(
  parameter int unsigned LANES = 16,
  parameter int unsigned ACC_W = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] acc_in [LANES],
  input  logic [4:0]              prod_frac,
  input  frac_t                   out_frac,
  output logic                    out_valid,
  output word_t                   out_data [LANES],
  output logic                    sat_any
);

  word_t q      [LANES];
  logic  sat_l  [LANES];
  logic  sat_c;

  always_comb begin
    sat_c = 1'b0;
    for (int i = 0; i < LANES; i++) begin
      q[i]  = requantize(RQ_W'(acc_in[i]), 32'(prod_frac), 32'(out_frac), sat_l[i]);
      sat_c = sat_c | sat_l[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sat_any   <= 1'b0;
      for (int i = 0; i < LANES; i++) out_data[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sat_any <= sat_c;
        for (int i = 0; i < LANES; i++) out_data[i] <= q[i];
      end
    end
  end

endmodule
