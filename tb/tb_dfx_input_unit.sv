// tb_dfx_input_unit: sends frames of random 16-bit fixed-point words (random
// incoming format and target format per frame, random frame length, random
// back-pressure on the output) and checks every quantized word against a
// real-arithmetic reference (floor, clamped to 12 bits), the last flag, and
// the measured largest magnitude and recommended format reported one clock
// after each frame ends.
module tb_dfx_input_unit;
  import dfx_pkg::*;
  localparam int IN_LANES = 4, IN_W = 16;
  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_in_frac = '0;
  frac_t cfg_q_frac = '0;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic signed [IN_W-1:0] s_tdata [IN_LANES];
  logic m_tvalid, m_tready = 0, m_tlast, m_tsat, meas_valid;
  word_t m_tdata [IN_LANES];
  frac_t meas_frac;
  logic [IN_W-1:0] meas_maxabs;
  longint exp_w [$];
  bit exp_l [$];
  int checks = 0, failures = 0, frames = 0, stalls = 0, clamps = 0, meas_seen = 0;
  int exp_maxabs, exp_frac;
  bit meas_due = 0;

  dfx_input_unit #(.IN_LANES(IN_LANES), .IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic real pow2(input int e);
    real r = 1.0;
    if (e >= 0) for (int k = 0; k < e; k++) r = r * 2.0;
    else        for (int k = 0; k < -e; k++) r = r / 2.0;
    return r;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: random ready, check words.
  always @(negedge clk) m_tready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (rst_n && m_tvalid && !m_tready) stalls++;
    if (rst_n && m_tvalid && m_tready) begin
      for (int i = 0; i < IN_LANES; i++) begin
        longint e;
        e = exp_w.pop_front();
        checks++;
        if (longint'(m_tdata[i]) != e) begin
          failures++; $display("word got %0d expected %0d", m_tdata[i], e);
        end
      end
      checks++;
      if (m_tlast !== exp_l.pop_front()) begin failures++; $display("tlast mismatch"); end
      if (m_tsat) clamps++;
    end
    if (rst_n && meas_valid) begin
      meas_seen++;
      checks++;
      if (!meas_due) begin failures++; $display("meas_valid not expected"); end
      checks++;
      if (int'(meas_maxabs) != exp_maxabs || int'(meas_frac) != exp_frac) begin
        failures++;
        $display("meas maxabs=%0d frac=%0d expected %0d %0d", meas_maxabs, meas_frac,
                 exp_maxabs, exp_frac);
      end
      meas_due = 0;
    end
  end

  initial begin
    for (int i = 0; i < IN_LANES; i++) s_tdata[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      int len, maxabs, shift;
      @(negedge clk);
      wait (exp_w.size() == 0 && !meas_due);
      @(negedge clk);
      cfg_in_frac = 4'($urandom_range(0, 15));
      cfg_q_frac  = frac_t'($urandom_range(0, 11));
      len   = $urandom_range(1, 30);
      shift = $urandom_range(0, 15);   // spread of magnitudes in this frame
      maxabs = 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        s_tvalid = 1; s_tlast = (k == len - 1);
        for (int i = 0; i < IN_LANES; i++) begin
          logic signed [IN_W-1:0] v;
          real sc;
          longint e;
          v = IN_W'($urandom);
          v = v >>> shift;
          if (f == 7 && k == 0 && i == 0) v = 16'sh8000;   // most negative word
          s_tdata[i] = v;
          if ((v < 0 ? -int'(v) : int'(v)) > maxabs) maxabs = (v < 0 ? -int'(v) : int'(v));
          sc = real'(int'(v)) * pow2(int'(cfg_q_frac) - int'(cfg_in_frac));
          e = longint'($floor(sc));
          if (e > 2047) e = 2047;
          if (e < -2048) e = -2048;
          exp_w.push_back(e);
        end
        exp_l.push_back(s_tlast);
        @(posedge clk);
        while (!s_tready) @(posedge clk);
      end
      // Reference format: fewest integer bits X (sign included) whose range
      // covers the integer part of the largest magnitude.
      begin
        int ip, x;
        ip = maxabs >> cfg_in_frac;
        x = 1;
        while ((1 << (x - 1)) <= ip) x++;
        exp_maxabs = maxabs;
        exp_frac   = (12 - x < 0) ? 0 : 12 - x;
      end
      meas_due = 1;
      frames++;
      @(negedge clk);
      s_tvalid = 0; s_tlast = 0;
    end
    wait (exp_w.size() == 0 && !meas_due);
    repeat (3) @(posedge clk);
    checks++;
    if (meas_seen != 200) begin failures++; $display("%0d measurements", meas_seen); end
    checks++;
    if (stalls == 0 || clamps == 0) begin failures++; $display("stalls=%0d clamps=%0d", stalls, clamps); end
    $display("frames=%0d stalls=%0d clamped beats=%0d", frames, stalls, clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
