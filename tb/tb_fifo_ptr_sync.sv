// tb_fifo_ptr_sync: checks that the pointer synchronizer delays its input by
// exactly two clock edges, clears on reset, and follows a Gray-code counter.
module tb_fifo_ptr_sync;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [3];
  int checks = 0, failures = 0;

  fifo_ptr_sync #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d_in(d), .q_out(q));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 5'h1f;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q !== '0) begin failures++; $display("reset: q=%h", q); end
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] b;
      b = W'(n);
      @(negedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      if (n >= 3) begin
        checks++;
        // d was updated at the previous negedges; q must equal d two edges ago
        if (q !== hist[1]) begin
          failures++; $display("n=%0d q=%h expected %h", n, q, hist[1]);
        end
      end
      d = (n < 100) ? (b ^ (b >> 1)) : W'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
