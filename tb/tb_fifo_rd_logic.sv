// tb_fifo_rd_logic: drives pop requests and a push pointer (as the write side
// would, Gray coded) and checks the read address sequence, the Gray pop
// pointer, read acceptance and the empty flag against a counting model.
module tb_fifo_rd_logic;
  localparam int AW = 3;
  localparam int D = 2**AW;
  logic clk = 0, rst_n = 0, pop = 0;
  logic [AW:0] wgs = '0, rg;
  logic [AW-1:0] raddr;
  logic ren, empty;
  int checks = 0, failures = 0, empties = 0, fulls = 0;
  int wcount = 0, rcount = 0;

  fifo_rd_logic #(.AW(AW)) dut (.rclk(clk), .rrst_n(rst_n), .pop(pop),
    .wptr_gray_sync(wgs), .rptr_gray(rg), .raddr(raddr), .ren(ren), .empty(empty));

  always #5 clk = ~clk;

  function automatic logic [AW:0] gray(input int v);
    logic [AW:0] b;
    b = (AW+1)'(v);
    return b ^ (b >> 1);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // alternate stretches of eager and rare popping so the FIFO both
      // drains and fills up completely
      pop = ((n / 100) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 7) == 0);
      // the write side advances (never more than D ahead)
      if (wcount - rcount < D && $urandom_range(0, 1) == 0) wcount++;
      if (wcount - rcount == D) fulls++;
      wgs = gray(wcount);
      #1;
      checks++;
      if (empty !== (wcount == rcount)) begin
        failures++; $display("n=%0d empty=%b w=%0d r=%0d", n, empty, wcount, rcount);
      end
      checks++;
      if (ren !== (pop && wcount != rcount)) begin
        failures++; $display("n=%0d ren=%b", n, ren);
      end
      checks++;
      if (raddr !== AW'(rcount % D)) begin
        failures++; $display("n=%0d raddr=%0d expected %0d", n, raddr, rcount % D);
      end
      if (empty) empties++;
      @(posedge clk);
      if (ren) rcount++;
      #1;
      checks++;
      if (rg !== gray(rcount)) begin
        failures++; $display("n=%0d rptr_gray=%b expected %b", n, rg, gray(rcount));
      end
    end
    checks++;
    if (empties == 0) begin failures++; $display("empty never seen"); end
    checks++;
    if (fulls == 0) begin failures++; $display("full occupancy never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
