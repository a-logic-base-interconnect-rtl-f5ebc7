// tb_slave_block: checks the two-level arbitration (round-robin among the
// four main ports, fixed priority of main over PIM, PIM served only when no
// main port requests), ID extension with the master index, W locking to the
// write winner until WLAST, and routing of R/B by the ID's master field.
module tb_slave_block;
  import smc_pkg::*;
  localparam int NMAIN = 4, NPIM = 1, NM = 5;
  logic clk = 0, rst_n = 0;
  axi_ax_t ar [NM], aw [NM]; axi_w_t w [NM];
  logic [NM-1:0] arv, arr, awv, awr, wv, wr, rv, rr, bv, br;
  axi_r_t r; axi_b_t b;
  axi_req_t sreq; axi_rsp_t srsp;
  logic pim_lost;
  int checks = 0, failures = 0;

  slave_block #(.NMAIN(NMAIN), .NPIM(NPIM)) dut (.clk, .rst_n,
    .ar_i(ar), .ar_valid_i(arv), .ar_ready_o(arr), .aw_i(aw), .aw_valid_i(awv), .aw_ready_o(awr),
    .w_i(w), .w_valid_i(wv), .w_ready_o(wr), .r_o(r), .r_valid_o(rv), .r_ready_i(rr),
    .b_o(b), .b_valid_o(bv), .b_ready_i(br), .slv_req_o(sreq), .slv_rsp_i(srsp), .pim_lost_o(pim_lost));

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

  function automatic int widx(logic [NM-1:0] v);
    for (int i = 0; i < NM; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    int cnt [NM];
    int m;
    arv = '0; awv = '0; wv = '0; rr = '0; br = '0; srsp = '0;
    for (int i = 0; i < NM; i++) begin
      ar[i] = '0; ar[i].id = 8'(i + 8'h0a); ar[i].addr = 32'(i * 1000);
      aw[i] = '0; aw[i].id = 8'(i + 8'h03); aw[i].addr = 32'(i * 77);
      w[i] = '0; w[i].data = DATA_W'(i); cnt[i] = 0;
    end
    repeat (2) @(posedge clk); #2 rst_n = 1;
    // ---- all ports request AR: main ports share round-robin, PIM starves ----
    srsp.ar_ready = 1; arv = '1;
    for (int c = 0; c < 40; c++) begin
      #1;
      m = widx(arr);
      chk(sreq.ar_valid && $onehot(arr), "one AR grant");
      chk(m < NMAIN, "main port beats PIM");
      chk(pim_lost, "PIM loss flagged");
      chk(sreq.ar.id == {4'(m), ar[m].id[3:0]} && sreq.ar.addr == ar[m].addr, "AR muxed with master index");
      if (m >= 0) cnt[m]++;
      @(posedge clk); #2;
    end
    for (int i = 0; i < NMAIN; i++) chk(cnt[i] == 10, "round-robin share");
    // ---- only the PIM requests ----
    arv = 5'b10000; #1;
    chk(arr == 5'b10000 && sreq.ar.id[7:4] == 4, "PIM served when mains idle");
    chk(!pim_lost, "no PIM loss when mains idle");
    @(posedge clk); #2;
    // ---- not ready: no grant advances ----
    arv = 5'b00110; srsp.ar_ready = 0; #1;
    m = sreq.ar.id[7:4];
    @(posedge clk); #2;
    chk(sreq.ar.id[7:4] == 4'(m) && arr == 0, "grant held while slave not ready");
    arv = '0; srsp.ar_ready = 1;
    // ---- write lock ----
    srsp.aw_ready = 1; srsp.w_ready = 1;
    awv = 5'b00100; #1;
    chk(awr == 5'b00100 && sreq.aw.id == {4'd2, aw[2].id[3:0]}, "AW granted with index");
    @(posedge clk); #2;
    awv = 5'b01011;                              // others want to write meanwhile
    wv = 5'b00110; w[2].last = 0; w[1].last = 1; #1;
    chk(!sreq.aw_valid && awr == 0, "no AW while a burst is in its data phase");
    chk(sreq.w_valid && sreq.w.data == DATA_W'(2) && wr == 5'b00100, "W from the write winner only");
    @(posedge clk); #2;
    w[2].last = 1; #1;
    chk(wr == 5'b00100 && sreq.w.last, "last W");
    @(posedge clk); #2;
    wv = '0; #1;
    chk(sreq.aw_valid && widx(awr) != 2, "next AW after WLAST");
    @(posedge clk); #2;
    awv = '0;
    // ---- response routing ----
    for (int i = 0; i < 30; i++) begin
      m = $urandom % NM;
      srsp.r_valid = 1; srsp.r.id = {4'(m), 4'($urandom)}; srsp.r.data = DATA_W'(i);
      srsp.b_valid = 1; srsp.b.id = {4'((m + 1) % NM), 4'h9};
      rr = NM'($urandom); br = NM'($urandom); #1;
      chk(rv == (NM'(1) << m) && r.data == DATA_W'(i), "R routed by ID");
      chk(bv == (NM'(1) << ((m + 1) % NM)), "B routed by ID");
      chk(sreq.r_ready == rr[m] && sreq.b_ready == br[(m + 1) % NM], "response ready from its master");
      @(posedge clk); #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
