// tb_dfx_output_unit: random accumulator values and random product/output
// formats; each lane is checked against floor(acc / 2^(prod_frac-out_frac))
// (or the matching left shift) clamped to the 12-bit range, computed in real
// arithmetic. Checks the one-clock latency and the saturation flag, and that
// both clamping directions occur.
module tb_dfx_output_unit;
  import dfx_pkg::*;
  localparam int LANES = 16, ACC_W = 48;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, sat_any;
  logic signed [ACC_W-1:0] acc_in [LANES];
  logic [4:0] prod_frac = '0;
  frac_t out_frac = '0;
  word_t out_data [LANES];
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, exact = 0;

  dfx_output_unit #(.LANES(LANES), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  initial begin
    for (int i = 0; i < LANES; i++) acc_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      real    scaled [LANES];
      longint e [LANES];
      bit     esat;
      @(negedge clk);
      in_valid  = 1;
      prod_frac = 5'($urandom_range(0, 22));
      out_frac  = frac_t'($urandom_range(0, 11));
      esat = 0;
      for (int i = 0; i < LANES; i++) begin
        int mag;
        logic signed [63:0] r;
        mag = $urandom_range(0, 30);
        r = {$urandom, $urandom};
        r = r >>> (63 - mag);
        acc_in[i] = ACC_W'(r);
        scaled[i] = real'(longint'(acc_in[i])) * pow2(int'(out_frac) - int'(prod_frac));
        e[i] = longint'($floor(scaled[i]));
        if ($floor(scaled[i]) > 2047.0) begin e[i] = 2047; esat = 1; sat_hi++; end
        else if ($floor(scaled[i]) < -2048.0) begin e[i] = -2048; esat = 1; sat_lo++; end
        else if (scaled[i] == $floor(scaled[i])) exact++;
      end
      @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("out_valid missing"); end
      checks++;
      if (sat_any !== esat) begin failures++; $display("n=%0d sat_any=%b expected %b", n, sat_any, esat); end
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (longint'(out_data[i]) != e[i]) begin
          failures++;
          $display("n=%0d lane %0d acc=%0d pf=%0d of=%0d got %0d expected %0d",
                   n, i, acc_in[i], prod_frac, out_frac, out_data[i], e[i]);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid stuck"); end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("clamping not exercised"); end
    $display("sat_hi=%0d sat_lo=%0d exact=%0d", sat_hi, sat_lo, exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
