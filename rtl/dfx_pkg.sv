// dfx_pkg: shared types and helper functions of the dynamic fixed-point
// compute subsystem.
//
// A feature-map or weight value is a WORD_W-bit two's-complement fixed-point
// number QX.Y with X + Y = WORD_W (X counts the sign bit). The position of the
// binary point is not stored with the data: it travels as a separate "frac"
// number (Y, 0..WORD_W-1) that the input unit measures and the output unit
// applies, so one layer can use Q4.8 and the next Q2.10 on the same hardware.
// The 12-bit word follows the source design's main configuration; the encoding of
// the format as a fraction-bit count is this design's own choice.
//
// Also holds the binary/Gray conversions used by the dual-clock FIFOs.
package dfx_pkg;

  localparam int unsigned WORD_W = 12;  // working word width
  localparam int unsigned FRAC_W = 4;   // width of a fraction-bit count

  typedef logic signed [WORD_W-1:0] word_t;
  typedef logic [FRAC_W-1:0]        frac_t;

  // Binary to reflected Gray code: neighbouring values differ in one bit.
  function automatic logic [31:0] bin2gray(input logic [31:0] b);
    return b ^ (b >> 1);
  endfunction

  // Gray code back to binary: each bit is the XOR of all Gray bits above it.
  function automatic logic [31:0] gray2bin(input logic [31:0] g);
    logic [31:0] b;
    b[31] = g[31];
    for (int i = 30; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Width of the intermediate used by requantize(); wide enough for a 48-bit
  // accumulator shifted left by up to WORD_W-1 places.
  localparam int unsigned RQ_W = 64;

  // Move a fixed-point value with from_frac fraction bits to a WORD_W-bit
  // word with to_frac fraction bits. Dropped low bits are truncated (floor,
  // the arithmetic shift the source design calls truncation); a value outside the
  // target range is clamped to the largest or smallest word and sat is set.
  function automatic word_t requantize(input logic signed [RQ_W-1:0] v,
                                       input int unsigned from_frac,
                                       input int unsigned to_frac,
                                       output logic sat);
    logic signed [RQ_W-1:0] s;
    localparam logic signed [RQ_W-1:0] MAXV = RQ_W'((1 << (WORD_W-1)) - 1);
    localparam logic signed [RQ_W-1:0] MINV = -RQ_W'(1 << (WORD_W-1));
    if (from_frac >= to_frac) s = v >>> (from_frac - to_frac);
    else                      s = v <<< (to_frac - from_frac);
    sat = 1'b0;
    if (s > MAXV) begin
      sat = 1'b1;
      return word_t'(MAXV);
    end
    if (s < MINV) begin
      sat = 1'b1;
      return word_t'(MINV);
    end
    return word_t'(s);
  endfunction

endpackage
