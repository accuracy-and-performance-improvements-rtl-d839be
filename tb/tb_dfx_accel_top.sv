// tb_dfx_accel_top: end-to-end test of the dynamic fixed-point compute
// subsystem at its default size (12 compute units of 16 lanes, 3 clusters).
//
// For each of three phases it
//   1. sends a calibration frame through the input unit and checks the
//      quantized stream and the measured output format (Q4.8, then Q2.10),
//   2. runs a batch of dot products of mixed length (1 to 24 beats) on every
//      compute unit, with the DSP clock at 2x, 3x and 1.5x the fabric clock,
//      random gaps on the image and weight ports and random back-pressure on
//      the result ports,
//   3. checks every result word and saturation flag against a reference
//      computed here: floor(sum(pixel*weight) / 2^(prod_frac - out_frac)),
//      clamped to 12 bits.
// It counts the mechanisms of the design and fails if one never happened:
// image FIFO full, weight FIFO empty stall, last beat held for the result
// path, result FIFO full, clamping, format measurement, clock-ratio change.
module tb_dfx_accel_top;
  import dfx_pkg::*;
  localparam int N_CU = 12, CPC = 4, LANES = 16, IN_LANES = 4, IN_W = 16;
  localparam int N_CL = N_CU / CPC;
  localparam int MAXB = 200;

  logic clk_fab = 0, clk_dsp = 0, rst_fab_n = 0, rst_dsp_n = 0;
  realtime fab_per = 10.0, dsp_per = 5.0;
  always #(fab_per / 2) clk_fab = ~clk_fab;
  always #(dsp_per / 2) clk_dsp = ~clk_dsp;

  logic [3:0] cfg_in_frac = 4'd8;
  frac_t cfg_q_frac = 4'd8;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic signed [IN_W-1:0] s_axis_tdata [IN_LANES];
  logic m_axis_tvalid, m_axis_tready = 1, m_axis_tlast, m_axis_tsat;
  word_t m_axis_tdata [IN_LANES];
  logic meas_valid;
  frac_t meas_frac;
  logic [IN_W-1:0] meas_maxabs;
  logic [4:0] cfg_prod_frac = 5'd18;
  logic img_valid [N_CL], img_ready [N_CL], img_last [N_CL];
  word_t img_data [N_CL][LANES];
  logic wgt_valid [N_CU], wgt_ready [N_CU];
  word_t wgt_data [N_CU][LANES];
  logic res_valid [N_CU], res_ready [N_CU], res_sat [N_CU];
  word_t res_data [N_CU][LANES];

  dfx_accel_top dut (.*);

  // stimulus and expectations
  word_t  img_seq [N_CL][MAXB][LANES];
  bit     last_seq [N_CL][MAXB];
  word_t  wgt_seq [N_CU][MAXB][LANES];
  int     nbeats;
  longint exp_w [N_CU][$];
  bit     exp_s [N_CU][$];
  int     checks = 0, failures = 0;
  int     res_bias = 4, in_bias = 4;
  int     n_meas = 0, n_img_full = 0, n_wgt_empty = 0, n_last_hold = 0;
  int     n_res_full = 0, n_sat = 0, n_results = 0, n_ratio = 0;
  int     out_frac_now = 8;
  longint m_exp [$];

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real pow2(input int e);
    real r = 1.0;
    if (e >= 0) for (int k = 0; k < e; k++) r = r * 2.0;
    else        for (int k = 0; k < -e; k++) r = r / 2.0;
    return r;
  endfunction

  // ---------------------------------------------------------------- monitors
  always @(posedge clk_fab) begin
    if (rst_fab_n) begin
      for (int c = 0; c < N_CL; c++) if (img_valid[c] && !img_ready[c]) n_img_full++;
      for (int k = 0; k < N_CU; k++) begin
        if (res_valid[k] && res_ready[k]) begin
          n_results++;
          if (exp_w[k].size() < LANES) begin
            failures++; $display("cu %0d: unexpected result", k);
          end else begin
            bit s;
            for (int l = 0; l < LANES; l++) begin
              longint e;
              e = exp_w[k].pop_front();
              checks++;
              if (longint'(res_data[k][l]) != e) begin
                failures++; $display("cu %0d lane %0d: got %0d expected %0d", k, l, res_data[k][l], e);
              end
            end
            s = exp_s[k].pop_front();
            checks++;
            if (res_sat[k] !== s) begin failures++; $display("cu %0d: sat %b expected %b", k, res_sat[k], s); end
            if (res_sat[k]) n_sat++;
          end
        end
      end
      if (meas_valid) n_meas++;
      if (m_axis_tvalid && m_axis_tready) begin
        for (int i = 0; i < IN_LANES; i++) begin
          longint e;
          e = m_exp.pop_front();
          checks++;
          if (longint'(m_axis_tdata[i]) != e) begin
            failures++; $display("input unit word %0d expected %0d", m_axis_tdata[i], e);
          end
        end
      end
    end
  end

  always @(posedge clk_dsp) begin
    if (rst_dsp_n) begin
      if (dut.g_cl[0].img_rv && !dut.g_cl[0].all_w) n_wgt_empty++;
      if (dut.g_cl[0].img_rv && dut.g_cl[0].all_w && dut.g_cl[0].img_rlast && !dut.g_cl[0].fire)
        n_last_hold++;
      if (!dut.g_cl[0].res_wr[0]) n_res_full++;
    end
  end

  // Result ports: random ready; res_hold blocks them for a while to let the
  // result FIFOs fill up.
  int res_hold = 0;
  always @(negedge clk_fab) begin
    if (res_hold > 0) res_hold--;
    for (int k = 0; k < N_CU; k++)
      res_ready[k] <= (res_hold == 0) && ($urandom_range(0, 3) < res_bias);
  end

  // ---------------------------------------------------------------- drivers
  // Clocked drivers: while go is set, each port offers its next beat with a
  // random valid and advances on a handshake.
  bit go = 0;
  int img_b [N_CL];
  int wgt_b [N_CU];

  always @(negedge clk_fab) begin
    for (int c = 0; c < N_CL; c++) begin
      if (go && img_b[c] < nbeats) begin
        img_valid[c] <= ($urandom_range(0, 3) < in_bias);
        img_data[c]  <= img_seq[c][img_b[c]];
        img_last[c]  <= last_seq[c][img_b[c]];
      end else img_valid[c] <= 1'b0;
    end
    for (int k = 0; k < N_CU; k++) begin
      if (go && wgt_b[k] < nbeats) begin
        wgt_valid[k] <= ($urandom_range(0, 3) < in_bias);
        wgt_data[k]  <= wgt_seq[k][wgt_b[k]];
      end else wgt_valid[k] <= 1'b0;
    end
  end

  always @(posedge clk_fab) begin
    for (int c = 0; c < N_CL; c++) if (img_valid[c] && img_ready[c]) img_b[c]++;
    for (int k = 0; k < N_CU; k++) if (wgt_valid[k] && wgt_ready[k]) wgt_b[k]++;
  end

  // Calibration frame: words in Q8.8 whose largest magnitude has an integer
  // part of int_max; the expected output format is checked.
  task automatic calibrate(int int_max, int exp_frac);
    int nb = 6;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk_fab);
      s_axis_tvalid = 1;
      s_axis_tlast  = (b == nb - 1);
      for (int i = 0; i < IN_LANES; i++) begin
        int v;
        v = $urandom_range(0, int_max * 256);
        if (b == 2 && i == 1) v = int_max * 256 + 7;     // the largest one
        if ($urandom_range(0, 1)) v = -v;
        s_axis_tdata[i] = IN_W'(v);
        m_exp.push_back(longint'($floor(real'(v) * pow2(int'(cfg_q_frac) - int'(cfg_in_frac)))));
      end
      @(posedge clk_fab);
      while (!s_axis_tready) @(posedge clk_fab);
    end
    @(negedge clk_fab);
    s_axis_tvalid = 0; s_axis_tlast = 0;
    repeat (2) @(posedge clk_fab);
    checks++;
    if (int'(meas_frac) != exp_frac) begin
      failures++; $display("measured format Q%0d.%0d, expected frac %0d", 12 - meas_frac, meas_frac, exp_frac);
    end
    checks++;
    if (int'(meas_maxabs) != int_max * 256 + 7) begin failures++; $display("maxabs %0d", meas_maxabs); end
    out_frac_now = int'(meas_frac);
    repeat (4) @(posedge clk_dsp);
  endtask

  // One batch of dot products on every compute unit.
  task automatic run_batch(int pscale, int wscale, bit force_sat);
    int lens [$];
    int b;
    lens = '{1, 1, 1, 2, 24, 3, 1, 7, 12, 1, 2, 16, 5, 1, 1, 9, 20, 4, 1, 3};
    b = 0;
    foreach (lens[j]) begin
      for (int c = 0; c < N_CL; c++) begin
        longint acc [CPC][LANES];
        for (int u = 0; u < CPC; u++) for (int l = 0; l < LANES; l++) acc[u][l] = 0;
        for (int t = 0; t < lens[j]; t++) begin
          last_seq[c][b + t] = (t == lens[j] - 1);
          for (int l = 0; l < LANES; l++) begin
            img_seq[c][b + t][l] = word_t'($urandom_range(0, 2 * pscale) - pscale);
            if (force_sat && j == 4) img_seq[c][b + t][l] = word_t'(12'h7ff);
          end
          for (int u = 0; u < CPC; u++) begin
            for (int l = 0; l < LANES; l++) begin
              word_t w;
              w = word_t'($urandom_range(0, 2 * wscale) - wscale);
              if (force_sat && j == 4) w = (l % 2) ? word_t'(12'h7ff) : word_t'(12'h800);
              wgt_seq[c * CPC + u][b + t][l] = w;
              acc[u][l] += longint'(img_seq[c][b + t][l]) * longint'(w);
            end
          end
        end
        for (int u = 0; u < CPC; u++) begin
          bit s = 0;
          for (int l = 0; l < LANES; l++) begin
            longint e;
            e = longint'($floor(real'(acc[u][l]) * pow2(out_frac_now - int'(cfg_prod_frac))));
            if (e > 2047) begin e = 2047; s = 1; end
            if (e < -2048) begin e = -2048; s = 1; end
            exp_w[c * CPC + u].push_back(e);
          end
          exp_s[c * CPC + u].push_back(s);
        end
      end
      b += lens[j];
    end
    nbeats = b;
    for (int c = 0; c < N_CL; c++) img_b[c] = 0;
    for (int k = 0; k < N_CU; k++) wgt_b[k] = 0;
    go = 1;
    for (int c = 0; c < N_CL; c++) while (img_b[c] < nbeats) @(posedge clk_fab);
    for (int k = 0; k < N_CU; k++) while (wgt_b[k] < nbeats) @(posedge clk_fab);
    go = 0;
    // wait until every result has been read
    for (int k = 0; k < N_CU; k++) while (exp_w[k].size() != 0) @(posedge clk_fab);
    repeat (4) @(posedge clk_fab);
  endtask

  initial begin
    for (int c = 0; c < N_CL; c++) begin
      img_valid[c] = 0; img_last[c] = 0;
      for (int l = 0; l < LANES; l++) img_data[c][l] = '0;
    end
    for (int k = 0; k < N_CU; k++) begin
      wgt_valid[k] = 0;
      for (int l = 0; l < LANES; l++) wgt_data[k][l] = '0;
    end
    for (int i = 0; i < IN_LANES; i++) s_axis_tdata[i] = '0;
    repeat (3) @(posedge clk_fab);
    rst_fab_n = 1; rst_dsp_n = 1;
    repeat (3) @(posedge clk_fab);

    // Phase 1: DSP clock 2x, layer output format Q4.8, pixels Q4.8, weights Q2.10.
    calibrate(5, 8);
    cfg_prod_frac = 5'd18;
    res_bias = 4; in_bias = 3;
    run_batch(400, 600, 1'b1);
    n_ratio++;

    // Phase 2: DSP clock 3x, heavy result back-pressure, output format Q2.10.
    dsp_per = 10.0 / 3.0;
    calibrate(1, 10);
    cfg_prod_frac = 5'd20;     // pixels Q2.10, weights Q2.10
    res_bias = 1; in_bias = 4; res_hold = 1500;
    run_batch(800, 800, 1'b0);
    n_ratio++;

    // Phase 3: DSP clock 1.5x, sparse inputs (starved compute units).
    dsp_per = 10.0 / 1.5;
    calibrate(5, 8);
    cfg_prod_frac = 5'd18;
    res_bias = 3; in_bias = 1;
    run_batch(300, 900, 1'b1);
    n_ratio++;

    $display("results=%0d meas=%0d img_full=%0d wgt_empty=%0d last_hold=%0d res_full=%0d sat=%0d ratios=%0d",
             n_results, n_meas, n_img_full, n_wgt_empty, n_last_hold, n_res_full, n_sat, n_ratio);
    checks++; if (n_results != 3 * 20 * N_CU) begin failures++; $display("result count %0d", n_results); end
    checks++; if (n_meas != 3)      begin failures++; $display("format measurement count wrong"); end
    checks++; if (n_img_full == 0)  begin failures++; $display("image FIFO never full"); end
    checks++; if (n_wgt_empty == 0) begin failures++; $display("weight FIFO never starved a cluster"); end
    checks++; if (n_last_hold == 0) begin failures++; $display("last beat never held"); end
    checks++; if (n_res_full == 0)  begin failures++; $display("result FIFO never full"); end
    checks++; if (n_sat == 0)       begin failures++; $display("no clamped result"); end
    checks++; if (m_exp.size() != 0) begin failures++; $display("input unit words missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
