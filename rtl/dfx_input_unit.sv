// dfx_input_unit: dynamic fixed-point input unit on the incoming AXI stream.
//
// Two jobs, both from the source design's per-layer quantization flow:
//  1. Quantize: every IN_W-bit word of the stream, in the format the data
//     arrives in (cfg_in_frac fraction bits), is converted to the 12-bit
//     working format (cfg_q_frac fraction bits), truncating low bits and
//     clamping values out of range.
//  2. Measure: over one frame (the beats up to and including tlast) it keeps
//     the largest magnitude seen. At the end of the frame it reports it
//     (meas_maxabs) together with the format that just covers it: the number
//     of integer bits is the bit length of the integer part plus a sign bit,
//     and meas_frac is the rest of the 12-bit word (0 if nothing is left).
//     The output unit uses meas_frac as its output format.
// Range is the only statistic kept; the source design speaks of the distribution
// without saying which statistic decides the format, so this is a choice.
//
// Interface: AXI4-Stream style valid/ready/last, IN_LANES words per beat on
// the slave side, the same number of 12-bit words on the master side.
// Timing: one register stage, full throughput (s_tready is high whenever the
// output register is free or being drained). meas_valid pulses for one clock
// in the cycle after the tlast beat is accepted, with meas_frac/meas_maxabs
// valid from then until the next frame ends.
module dfx_input_unit
  import dfx_pkg::*;
#(
  parameter int unsigned IN_LANES = 4,
  parameter int unsigned IN_W     = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(IN_W)-1:0] cfg_in_frac,
  input  frac_t                  cfg_q_frac,

  input  logic                   s_tvalid,
  output logic                   s_tready,
  input  logic signed [IN_W-1:0] s_tdata [IN_LANES],
  input  logic                   s_tlast,

  output logic                   m_tvalid,
  input  logic                   m_tready,
  output word_t                  m_tdata [IN_LANES],
  output logic                   m_tlast,
  output logic                   m_tsat,      // some word of this beat was clamped

  output logic                   meas_valid,
  output frac_t                  meas_frac,
  output logic [IN_W-1:0]        meas_maxabs
);

  logic            take;
  logic [IN_W-1:0] beat_max, run_max, frame_max;
  word_t           q [IN_LANES];
  logic            sat_l [IN_LANES];
  logic            sat_c;
  logic [IN_W-1:0] int_part;
  int unsigned     int_len;
  frac_t           frac_c;

  assign s_tready = !m_tvalid || m_tready;
  assign take     = s_tvalid && s_tready;

  always_comb begin
    beat_max = '0;
    sat_c    = 1'b0;
    for (int i = 0; i < IN_LANES; i++) begin
      logic [IN_W-1:0] a;
      a = s_tdata[i][IN_W-1] ? IN_W'(-s_tdata[i]) : IN_W'(s_tdata[i]);
      if (a > beat_max) beat_max = a;
      q[i]  = requantize(RQ_W'(s_tdata[i]), 32'(cfg_in_frac), 32'(cfg_q_frac), sat_l[i]);
      sat_c = sat_c | sat_l[i];
    end
    frame_max = (beat_max > run_max) ? beat_max : run_max;
    // Integer part of the largest magnitude and its bit length.
    int_part = frame_max >> cfg_in_frac;
    int_len  = 0;
    for (int b = 0; b < IN_W; b++) if (int_part[b]) int_len = b + 1;
    if (int_len + 1 >= WORD_W) frac_c = '0;
    else                       frac_c = frac_t'(WORD_W - 1 - int_len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_tvalid    <= 1'b0;
      m_tlast     <= 1'b0;
      m_tsat      <= 1'b0;
      run_max     <= '0;
      meas_valid  <= 1'b0;
      meas_frac   <= frac_t'(WORD_W - 1);
      meas_maxabs <= '0;
      for (int i = 0; i < IN_LANES; i++) m_tdata[i] <= '0;
    end else begin
      meas_valid <= 1'b0;
      if (take) begin
        m_tvalid <= 1'b1;
        m_tlast  <= s_tlast;
        m_tsat   <= sat_c;
        for (int i = 0; i < IN_LANES; i++) m_tdata[i] <= q[i];
        if (s_tlast) begin
          run_max     <= '0;
          meas_valid  <= 1'b1;
          meas_frac   <= frac_c;
          meas_maxabs <= frame_max;
        end else begin
          run_max <= frame_max;
        end
      end else if (m_tready) begin
        m_tvalid <= 1'b0;
      end
    end
  end

endmodule
