// tb_fifo_ram: writes random words on one clock and reads them back on an
// unrelated clock; checks the registered read and that rdata holds while re
// is low.
module tb_fifo_ram;
  localparam int DW = 12, AW = 4;
  logic wclk = 0, rclk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata, hold;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  fifo_ram #(.DW(DW), .AW(AW)) dut (.*);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 20; round++) begin
      // fill every address with fresh data
      for (int a = 0; a < 2**AW; a++) begin
        @(negedge wclk);
        we = 1; waddr = AW'(a); wdata = DW'($urandom); model[a] = wdata;
      end
      @(negedge wclk); we = 0;
      // read in a random order
      for (int k = 0; k < 2**AW; k++) begin
        int a;
        a = $urandom_range(0, 2**AW - 1);
        @(negedge rclk); re = 1; raddr = AW'(a);
        @(negedge rclk); re = 0;
        checks++;
        if (rdata !== model[a]) begin
          failures++; $display("addr %0d read %h expected %h", a, rdata, model[a]);
        end
        hold = rdata;
        raddr = AW'(a + 1);
        @(negedge rclk);
        checks++;
        if (rdata !== hold) begin failures++; $display("rdata changed with re low"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
