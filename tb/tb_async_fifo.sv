// tb_async_fifo: streams random words through the dual-clock FIFO with random
// valid/ready on both sides, at read/write clock ratios of 1.5, 2 and 3 (and
// a slower read clock), and checks that every word arrives once and in order.
// Also checks that the FIFO fills (wr_ready low) and runs empty, and that the
// first word takes the expected few read-clock cycles to cross.
module tb_async_fifo;
  localparam int DW = 16, AW = 3;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic [DW-1:0] sb [$];
  int checks = 0, failures = 0, fulls = 0, empties = 0, received = 0;
  realtime wper = 10.0, rper = 5.0;

  async_fifo #(.DW(DW), .AW(AW)) dut (.*);

  always #(wper / 2) wclk = ~wclk;
  always #(rper / 2) rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reader: random ready, compare against the scoreboard.
  int rd_bias = 1;
  always @(posedge rclk) begin
    if (rrst_n) begin
      if (rd_valid && rd_ready) begin
        checks++;
        if (sb.size() == 0) begin
          failures++; $display("read with nothing written: %h", rd_data);
        end else begin
          logic [DW-1:0] e;
          e = sb.pop_front();
          if (rd_data !== e) begin failures++; $display("read %h expected %h", rd_data, e); end
        end
        received++;
      end
      if (!rd_valid) empties++;
    end
  end
  bit force_read = 0;
  always @(negedge rclk) rd_ready <= ($urandom_range(0, 3) < rd_bias) || force_read;

  task automatic push_words(int n, int wr_bias);
    int sent = 0;
    while (sent < n) begin
      @(negedge wclk);
      if (wr_valid && wr_ready_q) begin sent++; end
      if (sent < n) begin
        if (!(wr_valid && !wr_ready_q)) begin
          wr_valid = ($urandom_range(0, 3) < wr_bias);
          wr_data  = DW'($urandom);
        end
      end else wr_valid = 0;
    end
  endtask

  // wr_ready sampled at the rising edge, together with the handshake
  logic wr_ready_q;
  always @(posedge wclk) begin
    wr_ready_q <= wr_ready;
    if (wrst_n && wr_valid && wr_ready) sb.push_back(wr_data);
    if (wrst_n && !wr_ready) fulls++;
  end

  initial begin
    realtime t0;
    int lat;
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // first-word latency, reader always ready
    rd_bias = 4;
    @(negedge wclk);
    wr_valid = 1; wr_data = 16'h1234;
    @(posedge wclk); t0 = $realtime;
    @(negedge wclk); wr_valid = 0;
    lat = 0;
    while (!rd_valid) begin @(posedge rclk); lat++; end
    checks++;
    if (lat < 2 || lat > 6) begin failures++; $display("first word latency %0d read cycles", lat); end
    repeat (4) @(posedge rclk);
    // ratio phases: read clock 2x, 3x, 1.5x, 0.5x the write clock
    for (int ph = 0; ph < 4; ph++) begin
      case (ph)
        0: rper = 5.0;
        1: rper = 10.0 / 3.0;
        2: rper = 10.0 / 1.5;
        default: rper = 20.0;
      endcase
      rd_bias = (ph == 3) ? 4 : 1;      // slow reader forces full
      push_words(400, (ph == 3) ? 4 : 3);
      rd_bias = 4;
      wait (sb.size() == 0);
      repeat (10) @(posedge rclk);
    end
    // Pessimistic full flag: fill the FIFO with the reader stopped, take one
    // word out, and count write clocks until wr_ready returns. The pop
    // pointer needs two synchronizer stages, so at least two.
    begin
      int wait_w;
      rper = 5.0;
      rd_bias = 0;
      repeat (4) @(posedge rclk);
      while (wr_ready) begin
        @(negedge wclk); wr_valid = 1; wr_data = DW'($urandom);
        @(posedge wclk);
      end
      @(negedge wclk); wr_valid = 0;
      repeat (6) @(posedge rclk);
      force_read = 1;
      @(posedge rclk);
      #0.1 force_read = 0;
      wait_w = 0;
      while (!wr_ready) begin @(posedge wclk); wait_w++; end
      checks++;
      if (wait_w < 2 || wait_w > 4) begin failures++; $display("full released after %0d write clocks", wait_w); end
      $display("full released %0d write clocks after a read", wait_w);
      rd_bias = 4;
      while (sb.size() != 0) @(posedge rclk);
      repeat (4) @(posedge rclk);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FIFO never full"); end
    checks++;
    if (empties == 0) begin failures++; $display("FIFO never empty"); end
    checks++;
    if (received != 1 + 4 * 400 + 2**AW + 1)   // a full FIFO holds 2**AW words plus the show-ahead word begin failures++; $display("received %0d words", received); end
    $display("fulls=%0d empties=%0d received=%0d", fulls, empties, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
