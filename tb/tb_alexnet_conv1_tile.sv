// tb_alexnet_conv1_tile: runs a tile of the first convolution layer of an
// AlexNet-like network on the full-size subsystem (12 units, 3 clusters).
//
// Layer shape: 11x11x3 kernels, 96 output maps, so every output value is a
// 363-term dot product. Each cluster computes one output position (its pixels
// are broadcast to all 16 lanes of its units); lane l of unit u holds output
// map 16*u + l. Pass A covers maps 0..63, pass B maps 32..95, so all 96 maps
// are produced at 3 positions.
//
// Data: pixels uniformly in [-2, 2) quantized to Q4.8, weights roughly normal
// (sum of uniforms, sigma about 0.06) quantized to Q2.10; products carry 18
// fraction bits. The output format is measured by the input unit from a
// calibration frame whose largest value is 5.x, giving Q4.8 as for layer 1 of
// the reference network.
//
// Checks: every output word equals floor(sum / 2^10), clamped, of the
// quantized operands (exact integer reference), and stays within the
// worst-case quantization bound of the real-valued convolution. Prints the
// mean absolute error against the real-valued result.
module tb_alexnet_conv1_tile;
  import dfx_pkg::*;
  localparam int N_CU = 12, CPC = 4, LANES = 16, IN_LANES = 4, IN_W = 16;
  localparam int N_CL = N_CU / CPC;
  localparam int KH = 11, KW = 11, CH = 3, MAPS = 96;
  localparam int NB = KH * KW * CH;   // 363 beats per dot product

  logic clk_fab = 0, clk_dsp = 0, rst_fab_n = 0, rst_dsp_n = 0;
  always #5.0 clk_fab = ~clk_fab;
  always #2.5 clk_dsp = ~clk_dsp;    // DSP clock at 2x

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

  // layer data
  real   wr  [MAPS][NB];       // real weights
  word_t wq  [MAPS][NB];       // Q2.10 weights
  real   xr  [N_CL][NB];       // real pixels of each cluster's window
  word_t xq  [N_CL][NB];       // Q4.8 pixels
  int    map_base;             // first map of the current pass
  longint exp_w [N_CU][$];
  real    exp_r [N_CU][$];
  real    exp_b [N_CU][$];
  int checks = 0, failures = 0, results = 0, clamped = 0;
  real err_sum = 0.0;
  int  err_n = 0;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand();   // uniform in [0, 1)
    return real'($urandom_range(0, 32'h00ff_ffff)) / 16777216.0;
  endfunction

  // ------------------------------------------------------------ drivers
  bit go = 0;
  int img_b [N_CL];
  int wgt_b [N_CU];
  always @(negedge clk_fab) begin
    for (int c = 0; c < N_CL; c++) begin
      if (go && img_b[c] < NB) begin
        img_valid[c] <= 1'b1;
        for (int l = 0; l < LANES; l++) img_data[c][l] <= xq[c][img_b[c]];
        img_last[c] <= (img_b[c] == NB - 1);
      end else img_valid[c] <= 1'b0;
    end
    for (int k = 0; k < N_CU; k++) begin
      if (go && wgt_b[k] < NB) begin
        wgt_valid[k] <= 1'b1;
        for (int l = 0; l < LANES; l++)
          wgt_data[k][l] <= wq[map_base + 16 * (k % CPC) + l][wgt_b[k]];
      end else wgt_valid[k] <= 1'b0;
    end
    for (int k = 0; k < N_CU; k++) res_ready[k] <= 1'b1;
  end
  always @(posedge clk_fab) begin
    for (int c = 0; c < N_CL; c++) if (img_valid[c] && img_ready[c]) img_b[c]++;
    for (int k = 0; k < N_CU; k++) if (wgt_valid[k] && wgt_ready[k]) wgt_b[k]++;
  end

  // ------------------------------------------------------------ monitor
  always @(posedge clk_fab) begin
    if (rst_fab_n) begin
      for (int k = 0; k < N_CU; k++) begin
        if (res_valid[k] && res_ready[k]) begin
          results++;
          if (res_sat[k]) clamped++;
          for (int l = 0; l < LANES; l++) begin
            longint e;
            real r, bnd, got;
            e = exp_w[k].pop_front();
            r = exp_r[k].pop_front();
            bnd = exp_b[k].pop_front();
            got = real'(int'(res_data[k][l])) / 256.0;
            checks++;
            if (longint'(res_data[k][l]) != e) begin
              failures++; $display("cu %0d lane %0d: got %0d expected %0d", k, l, res_data[k][l], e);
            end
            if (e > -2048 && e < 2047) begin
              checks++;
              if ((got - r > bnd) || (r - got > bnd)) begin
                failures++; $display("cu %0d lane %0d: %f vs real %f beyond %f", k, l, got, r, bnd);
              end
              err_sum += (got > r) ? got - r : r - got;
              err_n++;
            end
          end
        end
      end
    end
  end

  task automatic run_pass(int base);
    map_base = base;
    for (int c = 0; c < N_CL; c++) begin
      for (int u = 0; u < CPC; u++) begin
        for (int l = 0; l < LANES; l++) begin
          int m;
          longint acc;
          real racc, bnd;
          longint e;
          m = base + 16 * u + l;
          acc = 0; racc = 0.0; bnd = 0.0;
          for (int t = 0; t < NB; t++) begin
            real ax, aw;
            acc  += longint'(xq[c][t]) * longint'(wq[m][t]);
            racc += xr[c][t] * wr[m][t];
            ax = (xr[c][t] < 0) ? -xr[c][t] : xr[c][t];
            aw = (wr[m][t] < 0) ? -wr[m][t] : wr[m][t];
            bnd += ax / 1024.0 + aw / 256.0 + 1.0 / 262144.0;
          end
          e = acc >>> 10;
          if (e > 2047) e = 2047;
          if (e < -2048) e = -2048;
          exp_w[c * CPC + u].push_back(e);
          exp_r[c * CPC + u].push_back(racc);
          exp_b[c * CPC + u].push_back(bnd + 1.0 / 256.0);  // plus output truncation
        end
      end
    end
    for (int c = 0; c < N_CL; c++) img_b[c] = 0;
    for (int k = 0; k < N_CU; k++) wgt_b[k] = 0;
    go = 1;
    for (int k = 0; k < N_CU; k++) while (exp_w[k].size() != 0) @(posedge clk_fab);
    go = 0;
    repeat (4) @(posedge clk_fab);
  endtask

  initial begin
    realtime t0, t1;
    // layer data
    for (int m = 0; m < MAPS; m++)
      for (int t = 0; t < NB; t++) begin
        real g;
        g = (urand() + urand() + urand() + urand() - 2.0) * 0.1;
        wr[m][t] = g;
        wq[m][t] = word_t'(int'($floor(g * 1024.0)));
        wr[m][t] = g;
      end
    for (int c = 0; c < N_CL; c++)
      for (int t = 0; t < NB; t++) begin
        xr[c][t] = urand() * 4.0 - 2.0;
        xq[c][t] = word_t'(int'($floor(xr[c][t] * 256.0)));
      end
    for (int c = 0; c < N_CL; c++) begin img_valid[c] = 0; img_last[c] = 0; end
    for (int k = 0; k < N_CU; k++) wgt_valid[k] = 0;
    for (int i = 0; i < IN_LANES; i++) s_axis_tdata[i] = '0;
    repeat (3) @(posedge clk_fab);
    rst_fab_n = 1; rst_dsp_n = 1;
    repeat (3) @(posedge clk_fab);

    // calibration frame: largest value 5.x in Q8.8 -> output format Q4.8
    for (int b = 0; b < 4; b++) begin
      @(negedge clk_fab);
      s_axis_tvalid = 1; s_axis_tlast = (b == 3);
      for (int i = 0; i < IN_LANES; i++)
        s_axis_tdata[i] = IN_W'((b == 1 && i == 2) ? -(5 * 256 + 40) : $urandom_range(0, 1200));
      @(posedge clk_fab);
    end
    @(negedge clk_fab); s_axis_tvalid = 0; s_axis_tlast = 0;
    repeat (3) @(posedge clk_fab);
    checks++;
    if (meas_frac != 4'd8) begin failures++; $display("measured fraction bits %0d", meas_frac); end
    repeat (4) @(posedge clk_dsp);

    t0 = $realtime;
    run_pass(0);
    run_pass(32);
    t1 = $realtime;
    // Operands arrive at one beat per fabric clock, so each pass should take
    // about NB fabric cycles plus the pipeline and FIFO latency.
    checks++;
    if ((t1 - t0) / 10.0 > 2.0 * (NB + 40)) begin
      failures++; $display("tile took %0d fabric cycles", int'((t1 - t0) / 10.0));
    end
    checks++;
    if (results != 2 * N_CU) begin failures++; $display("results %0d", results); end
    $display("conv1 tile: %0d output values, %0d clamped vectors, mean |error| vs real = %f (%0d values), %0d fabric cycles",
             results * LANES, clamped, err_sum / err_n, err_n, int'((t1 - t0) / 10.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
