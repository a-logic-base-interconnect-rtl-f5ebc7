// tb_async_fifo: dual-clock FIFO with unrelated clocks (10 ns and 7 ns).
// Random pushes and pops; every popped word must equal the next word of an
// independent scoreboard queue; full and empty must be honoured (push only
// when not full, pop only when not empty) and both must occur; wlevel may
// never be below the true occupancy.
module tb_async_fifo;
  localparam int W = 16, D = 8;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wen, ren, wfull, rempty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D):0] wlevel;
  logic [W-1:0] sb [$];
  int checks = 0, failures = 0, fulls = 0, empties = 0, popped = 0;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.wclk, .wrst_n, .wen, .wdata, .wfull, .wlevel,
    .rclk, .rrst_n, .ren, .rdata, .rempty);

  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    wen = 0; wdata = 0;
    repeat (3) @(posedge wclk); #1 wrst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(posedge wclk); #1;
      wen = (i < 2000) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      if (wfull) fulls++;
      if (wen && !wfull) begin
        wdata = W'($urandom);
        sb.push_back(wdata);
      end else wen = 0;
      chk(int'(wlevel) >= 0 && int'(wlevel) <= D, "wlevel in range");
    end
    @(posedge wclk); #1 wen = 0;
  end

  // reader
  initial begin
    ren = 0;
    repeat (3) @(posedge rclk); #1 rrst_n = 1;
    for (int i = 0; i < 12000; i++) begin
      @(posedge rclk); #1;
      ren = (i < 2400) ? ($urandom % 5 == 0) : ($urandom % 3 != 0);
      if (rempty) begin empties++; ren = 0; end
      if (ren) begin
        chk(sb.size() > 0, "pop only what was pushed");
        if (sb.size() > 0) chk(rdata == sb.pop_front(), "data in order");
        popped++;
      end
    end
    ren = 0;
    chk(fulls > 0 && empties > 0, "full and empty both reached");
    chk(popped > 1000, "traffic flowed");
    $display("async_fifo: popped %0d, full %0d, empty %0d", popped, fulls, empties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // occupancy seen by the writer never under-counts
  always @(posedge wclk) if (wrst_n) begin
    checks++;
    if (int'(wlevel) < sb.size() - 1) failures++;
  end
endmodule
