// tb_fifo_wr_logic: drives push requests and a pop pointer (as the read side
// would, Gray coded) and checks the write address sequence, the Gray push
// pointer, write acceptance and the full flag against a counting model.
module tb_fifo_wr_logic;
  localparam int AW = 3;
  localparam int D = 2**AW;
  logic clk = 0, rst_n = 0, push = 0;
  logic [AW:0] rgs = '0, wg;
  logic [AW-1:0] waddr;
  logic wen, full;
  int checks = 0, failures = 0, fulls = 0;
  int wcount = 0, rcount = 0;

  fifo_wr_logic #(.AW(AW)) dut (.wclk(clk), .wrst_n(rst_n), .push(push),
    .rptr_gray_sync(rgs), .wptr_gray(wg), .waddr(waddr), .wen(wen), .full(full));

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
      push = ($urandom_range(0, 3) != 0);
      // the read side sometimes advances (never past the write count)
      if (rcount < wcount && $urandom_range(0, 2) == 0) rcount++;
      rgs = gray(rcount);
      #1;
      checks++;
      if (full !== (wcount - rcount == D)) begin
        failures++; $display("n=%0d full=%b w=%0d r=%0d", n, full, wcount, rcount);
      end
      checks++;
      if (wen !== (push && (wcount - rcount < D))) begin
        failures++; $display("n=%0d wen=%b", n, wen);
      end
      checks++;
      if (waddr !== AW'(wcount % D)) begin
        failures++; $display("n=%0d waddr=%0d expected %0d", n, waddr, wcount % D);
      end
      if (full) fulls++;
      @(posedge clk);
      if (wen) wcount++;
      #1;
      checks++;
      if (wg !== gray(wcount)) begin
        failures++; $display("n=%0d wptr_gray=%b expected %b", n, wg, gray(wcount));
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
