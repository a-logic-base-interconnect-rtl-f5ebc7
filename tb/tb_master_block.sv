// tb_master_block: checks destination decode (AR and AW to the vault in
// address bits [11:8]), write-packet locking (W follows its AW, no new AW
// before WLAST), round-robin response arbitration with R bursts kept whole,
// and removal of the master-index ID bits.
module tb_master_block;
  import smc_pkg::*;
  localparam int NS = 16;
  logic clk = 0, rst_n = 0;
  axi_req_t req; axi_rsp_t rsp;
  axi_ax_t ar, aw; axi_w_t w;
  logic [NS-1:0] arv, arr, awv, awr, wv, wr, rv, rr, bv, br;
  axi_r_t r_in [NS]; axi_b_t b_in [NS];
  int checks = 0, failures = 0;

  master_block #(.NSLV(NS)) dut (.clk, .rst_n, .req_i(req), .rsp_o(rsp),
    .ar_o(ar), .ar_valid_o(arv), .ar_ready_i(arr), .aw_o(aw), .aw_valid_o(awv), .aw_ready_i(awr),
    .w_o(w), .w_valid_o(wv), .w_ready_i(wr), .r_i(r_in), .r_valid_i(rv), .r_ready_o(rr),
    .b_i(b_in), .b_valid_i(bv), .b_ready_o(br));

  always #5 clk = ~clk;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, s2, first, got [$];
    logic [NS-1:0] sel;
    req = '0; arr = '0; awr = '0; wr = '0; rv = '0; bv = '0;
    for (int i = 0; i < NS; i++) begin r_in[i] = '0; b_in[i] = '0; end
    repeat (2) @(posedge clk); #2 rst_n = 1;
    // ---- AR decode ----
    for (int i = 0; i < 200; i++) begin
      s = $urandom % NS;
      req.ar_valid = 1; req.ar.addr = {$urandom} & ~32'hF00 | (s << 8);
      arr = NS'($urandom); #1;
      chk(arv == (NS'(1) << s), "AR one-hot destination");
      chk(rsp.ar_ready == arr[s], "AR ready from destination");
      chk(ar.addr == req.ar.addr, "AR payload");
      @(posedge clk); #2;
    end
    req.ar_valid = 0;
    // ---- write packet ----
    for (int i = 0; i < 50; i++) begin
      int nbeats;
      s = $urandom % NS; nbeats = 1 + $urandom % 4;
      req.aw_valid = 1; req.aw.addr = 32'(s << 8); req.aw.len = 8'(nbeats - 1);
      awr = '1; wr = '1; req.w_valid = 0; #1;
      chk(awv == (NS'(1) << s), "AW one-hot destination");
      chk(wv == 0, "no W before AW accepted");
      @(posedge clk); #2;
      s2 = (s + 1) % NS;
      req.aw.addr = 32'(s2 << 8);     // next AW waits for the packet to finish
      for (int k = 0; k < nbeats; k++) begin
        req.w_valid = 1; req.w.last = (k == nbeats - 1); req.w.data = DATA_W'(k);
        wr = NS'($urandom) | (NS'(1) << s); #1;
        chk(wv == (NS'(1) << s), "W follows its AW");
        chk(awv == 0 && !rsp.aw_ready, "AW blocked during W");
        chk(rsp.w_ready == 1, "W ready from locked slave");
        @(posedge clk); #2;
      end
      req.w_valid = 0; req.aw_valid = 0; #1;
    end
    // ---- R arbitration: slaves 3 and 9 each send 3-beat bursts ----
    req.r_ready = 1;
    first = -1;
    foreach (r_in[i]) r_in[i] = '0;
    r_in[3].id = 8'h25; r_in[9].id = 8'h47;
    rv = '0; rv[3] = 1; rv[9] = 1;
    begin
      int beats3 = 0, beats9 = 0, cur = -1, cnt = 0, order [$];
      for (int c = 0; c < 12 && (rv != 0); c++) begin
        r_in[3].last = (beats3 == 2); r_in[9].last = (beats9 == 2);
        #1;
        chk(rsp.r_valid, "R valid");
        chk(rr == 16'h0008 || rr == 16'h0200, "one R accepted");
        if (rr[3]) begin chk(rsp.r.id == 8'h05, "R id stripped"); order.push_back(3); end
        if (rr[9]) begin chk(rsp.r.id == 8'h07, "R id stripped"); order.push_back(9); end
        @(posedge clk); #2;
        if (rr[3] && beats3++ == 2) rv[3] = 0;
        if (rr[9] && beats9++ == 2) rv[9] = 0;
      end
      chk(order.size() == 6, "six R beats");
      chk(order[0] == order[1] && order[1] == order[2] && order[3] == order[4] && order[4] == order[5]
          && order[0] != order[3], "R bursts not interleaved");
    end
    // ---- B round robin among three slaves ----
    req.b_ready = 1;
    bv = '0; bv[1] = 1; bv[5] = 1; bv[12] = 1;
    b_in[1].id = 8'h11; b_in[5].id = 8'h35; b_in[12].id = 8'h2c;
    for (int c = 0; c < 3; c++) begin
      #1;
      chk(rsp.b_valid && $onehot(br), "one B accepted");
      for (int i = 0; i < NS; i++) if (br[i]) begin
        got.push_back(i);
        chk(rsp.b.id == {4'h0, b_in[i].id[3:0]}, "B id stripped");
      end
      sel = br;
      @(posedge clk); #2;
      bv &= ~sel;
    end
    chk(got.size() == 3 && got[0] != got[1] && got[1] != got[2] && got[0] != got[2], "each B once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
