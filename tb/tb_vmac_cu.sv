// tb_vmac_cu: feeds random 12-bit pixel and weight vectors as dot products of
// random length (1 to 40 beats, with idle gaps and back-to-back runs) and
// checks each lane's result against a reference sum, that results come out
// exactly two clocks after the last beat, and that full-scale operands
// accumulate without overflow.
module tb_vmac_cu;
  import dfx_pkg::*;
  localparam int LANES = 16, ACC_W = 48;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, out_valid;
  word_t pix [LANES], wgt [LANES];
  logic signed [ACC_W-1:0] acc_out [LANES];
  longint ref_acc [LANES];
  longint exp_q [$];   // LANES values per expected result
  longint exp_t [$];
  longint cycle = 0;
  int checks = 0, failures = 0, results = 0;

  vmac_cu #(.LANES(LANES), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: time-stamps last beats and checks results as they appear.
  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid && in_last) exp_t.push_back(cycle);
    if (rst_n && out_valid) begin
      longint t;
      results++;
      if (exp_t.size() == 0 || exp_q.size() < LANES) begin
        failures++; $display("unexpected result");
      end else begin
        t = exp_t.pop_front();
        checks++;
        if (cycle != t + 2) begin failures++; $display("latency %0d", cycle - t); end
        for (int i = 0; i < LANES; i++) begin
          longint e;
          e = exp_q.pop_front();
          checks++;
          if (longint'(acc_out[i]) != e) begin
            failures++; $display("lane %0d got %0d expected %0d", i, acc_out[i], e);
          end
        end
      end
    end
  end

  task automatic beat(bit last, bit extreme);
    @(negedge clk);
    in_valid = 1; in_last = last;
    for (int i = 0; i < LANES; i++) begin
      if (extreme) begin
        pix[i] = word_t'(12'h800); wgt[i] = word_t'(12'h800);
      end else begin
        pix[i] = word_t'($urandom); wgt[i] = word_t'($urandom);
      end
      ref_acc[i] += longint'(pix[i]) * longint'(wgt[i]);
    end
    if (last) begin
      for (int i = 0; i < LANES; i++) begin
        exp_q.push_back(ref_acc[i]);
        ref_acc[i] = 0;
      end
    end
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < LANES; i++) begin ref_acc[i] = 0; pix[i] = '0; wgt[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 60; d++) begin
      int len;
      len = (d < 5) ? 1 : $urandom_range(1, 40);
      for (int k = 0; k < len; k++) begin
        beat(k == len - 1, 1'b0);
        if ($urandom_range(0, 5) == 0) begin
          @(negedge clk); in_valid = 0; in_last = 0;
        end
      end
      if (d % 3 == 0) begin @(negedge clk); in_valid = 0; in_last = 0; end
    end
    // 4096 full-scale products: (-2048)^2 * 4096 = 2^34, beyond 32 bits
    for (int k = 0; k < 4096; k++) beat(k == 4095, 1'b1);
    @(negedge clk); in_valid = 0; in_last = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (results != 61 || exp_t.size() != 0) begin
      failures++; $display("results %0d, pending %0d", results, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
