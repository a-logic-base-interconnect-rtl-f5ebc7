// tb_smc_top_masked: the cube at its default parameters in open page under
// MASKED traffic: random full 256-byte READs whose row bits are zero, so
// that nearly every access hits a row already open (each link port keeps to
// two banks of its own). Each link port first writes 32 full bursts, then
// streams 300 reads of them with no gaps; every beat is compared with the
// data written. The delivered read bandwidth is measured over the window in
// which all four ports are reading and must reach 80 GB/s. With row hits
// the DRAM banks are no longer the limit; what remains is each vault's
// single in-order response path, which a master port busy with another
// vault's burst holds up. Also checked: no DRAM timing violation in any
// vault and every transaction completes. Clocks: interconnect 1 GHz (10
// units), DRAM 1.25 GHz (8 units).
module tb_smc_top_masked;
  import smc_pkg::*;
  localparam int NL = 4, NM = 5, NV = 16, NRD = 300;
  logic ic_clk = 0, dram_clk = 0, ic_rst_n = 1, dram_rst_n = 1;
  axi_req_t lreq [NM];
  axi_rsp_t lrsp [NM];
  dram_cmd_t dcmd [NV];
  logic [2*DQ_W-1:0] dq_o [NV], dq_i [NV];
  logic [2*DQ_W/8-1:0] dm [NV];
  logic [NV-1:0] dq_oe, init_done, pim_lost;
  logic [NM-1:0] mot_stall;
  logic [3:0] vev [NV];
  bit start = 0;

  smc_top dut (.ic_clk, .ic_rst_n, .dram_clk, .dram_rst_n,
    .remap_mode_i(3'd0), .open_page_i(1'b1), .link_req_i(lreq), .link_rsp_o(lrsp), .dram_cmd_o(dcmd),
    .dq_o, .dm_o(dm), .dq_oe_o(dq_oe), .dq_i, .init_done_o(init_done),
    .mot_stall_o(mot_stall), .pim_lost_o(pim_lost), .vault_ev_o(vev));

  int viol [NV], n_act [NV], n_rd [NV], n_wr [NV], n_pre [NV], n_ref [NV], n_mrs [NV], n_ap [NV], n_pd [NV];
  for (genvar v = 0; v < NV; v++) begin : g_dram
    dram_model u_dram (.clk(dram_clk), .cmd_i(dcmd[v]), .dq_i(dq_o[v]), .dm_i(dm[v]), .dq_oe_i(dq_oe[v]),
      .dq_o(dq_i[v]), .violations(viol[v]), .n_act(n_act[v]), .n_rd(n_rd[v]), .n_wr(n_wr[v]),
      .n_pre(n_pre[v]), .n_ref(n_ref[v]), .n_mrs(n_mrs[v]), .n_ap(n_ap[v]), .n_pd_cycles(n_pd[v]));
  end

  bit  done [NL];
  int  err [NL], rdb [NL], wrb [NL], rdn [NL], lmax [NL], lmin [NL];
  longint lsum [NL], tfa [NL], tlr [NL];
  for (genvar m = 0; m < NL; m++) begin : g_m
    axi_traffic_master #(.MIDX(m), .NWR(32), .NRD(NRD), .GAP(0), .FULL(1), .VAULT_ID(1),
                         .MAXRD(40), .MASKED(1)) u_m (
      .clk(ic_clk), .start(start), .req(lreq[m]), .rsp(lrsp[m]), .done(done[m]),
      .errors(err[m]), .rd_beats(rdb[m]), .wr_beats(wrb[m]), .lat_sum(lsum[m]),
      .lat_max(lmax[m]), .reads_done(rdn[m]), .lat_min(lmin[m]),
      .t_first_ar(tfa[m]), .t_last_r(tlr[m]));
  end
  assign lreq[NL] = '0;   // PIM port idle

  always #5 ic_clk = ~ic_clk;
  always #4 dram_clk = ~dram_clk;

  int ss_beats = 0, ss_cycles = 0;
  always @(posedge ic_clk) if (start) begin
    bit all_on;
    all_on = 1;
    for (int m = 0; m < NL; m++) all_on &= (tfa[m] >= 0) && (rdn[m] < NRD);
    if (all_on) begin
      ss_cycles++;
      for (int m = 0; m < NL; m++) ss_beats += int'(lrsp[m].r_valid && lreq[m].r_ready);
    end
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #5000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, sum_v;
    bit all;
    real gbps;
    #1 ic_rst_n = 0; dram_rst_n = 0;
    #30 ic_rst_n = 1; dram_rst_n = 1;
    n = 0;
    while (!(&init_done) && n < 2000) begin @(posedge ic_clk); n++; end
    chk(&init_done, "all vaults finish initialisation");
    if (!(&init_done)) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    repeat (10) @(posedge ic_clk);
    #1 start = 1;
    n = 0;
    do begin
      @(posedge ic_clk);
      n++;
      all = 1;
      for (int m = 0; m < NL; m++) all &= done[m];
    end while (!all && n < 100000);
    chk(all, "all ports complete");
    repeat (20) @(posedge ic_clk);
    for (int m = 0; m < NL; m++) begin
      checks += rdb[m];
      chk(err[m] == 0, $sformatf("port %0d: %0d data errors", m, err[m]));
      $display("port %0d: %0d reads (%0d beats), read latency min %0d avg %0d max %0d ns",
               m, rdn[m], rdb[m], lmin[m], int'(lsum[m] / longint'(rdn[m] > 0 ? rdn[m] : 1)), lmax[m]);
    end
    gbps = real'(ss_beats) * 32.0 / real'(ss_cycles > 0 ? ss_cycles : 1);
    $display("masked read stream on %0d link ports, %0d vaults: %0d beats in %0d ns with all ports busy = %0.1f GB/s",
             NL, NV, ss_beats, ss_cycles, gbps);
    chk(gbps >= 80.0, "masked read bandwidth of at least 80 GB/s");
    sum_v = 0;
    for (int v = 0; v < NV; v++) sum_v += viol[v];
    chk(sum_v == 0, $sformatf("DRAM timing violations %0d", sum_v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
