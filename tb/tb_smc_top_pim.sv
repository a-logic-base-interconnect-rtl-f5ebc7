// tb_smc_top_pim: interference of PIM traffic with the main links, on the
// cube at its default parameters (four link ports, one PIM port, sixteen
// vaults, closed page, default mapping). The four link ports issue random
// full 256-byte reads at a moderate rate (one burst every 1 + Random[0,34]
// clocks each, about 56 GB/s together). Run 0 has the PIM port idle; run 1
// adds a PIM stream of random full-burst reads (one every 1 + Random[0,16]
// clocks, about 28 GB/s). Bandwidth is measured while all link ports are
// reading. Checks: every beat matches the data written, no DRAM timing
// violation, the link ports keep at least 95% of the bandwidth they had
// alone, and the PIM receives at least 20 GB/s of its request. The average
// link read latency of both runs is printed.
module tb_smc_top_pim;
  import smc_pkg::*;
  localparam int NM = 5, NV = 16, NRD = 300;
  logic ic_clk = 0, dram_clk = 0, ic_rst_n = 1, dram_rst_n = 1;
  axi_req_t lreq [NM];
  axi_rsp_t lrsp [NM];
  dram_cmd_t dcmd [NV];
  logic [2*DQ_W-1:0] dq_o [NV], dq_i [NV];
  logic [2*DQ_W/8-1:0] dm [NV];
  logic [NV-1:0] dq_oe, init_done, pim_lost;
  logic [NM-1:0] mot_stall;
  logic [3:0] vev [NV];
  int run = 0;

  smc_top dut (.ic_clk, .ic_rst_n, .dram_clk, .dram_rst_n, .remap_mode_i(3'd0),
    .open_page_i(1'b0), .link_req_i(lreq), .link_rsp_o(lrsp), .dram_cmd_o(dcmd),
    .dq_o, .dm_o(dm), .dq_oe_o(dq_oe), .dq_i, .init_done_o(init_done),
    .mot_stall_o(mot_stall), .pim_lost_o(pim_lost), .vault_ev_o(vev));

  int viol [NV], n_act [NV], n_rd [NV], n_wr [NV], n_pre [NV], n_ref [NV], n_mrs [NV], n_ap [NV], n_pd [NV];
  for (genvar v = 0; v < NV; v++) begin : g_dram
    dram_model u_dram (.clk(dram_clk), .cmd_i(dcmd[v]), .dq_i(dq_o[v]), .dm_i(dm[v]), .dq_oe_i(dq_oe[v]),
      .dq_o(dq_i[v]), .violations(viol[v]), .n_act(n_act[v]), .n_rd(n_rd[v]), .n_wr(n_wr[v]),
      .n_pre(n_pre[v]), .n_ref(n_ref[v]), .n_mrs(n_mrs[v]), .n_ap(n_ap[v]), .n_pd_cycles(n_pd[v]));
  end

  axi_req_t mreq [2][NM];
  axi_rsp_t mrsp [2][NM];
  bit  start [2], done [2][NM];
  int  err [2][NM], rdb [2][NM], wrb [2][NM], rdn [2][NM], lmax [2][NM], lmin [2][NM];
  longint lsum [2][NM], tfa [2][NM], tlr [2][NM];
  for (genvar r = 0; r < 2; r++) begin : g_run
    for (genvar m = 0; m < NM; m++) begin : g_m
      localparam bit PIM_ON = (m == NM - 1) && (r == 1);
      localparam bit IDLE   = (m == NM - 1) && (r == 0);
      axi_traffic_master #(.MIDX(m), .NWR(IDLE ? 1 : 64), .NRD(IDLE ? 1 : (PIM_ON ? 2 * NRD : NRD)),
                           .GAP(m == NM - 1 ? 16 : 34), .FULL(1), .VAULT_ID(1), .MAXRD(40)) u_m (
        .clk(ic_clk), .start(start[r]), .req(mreq[r][m]), .rsp(mrsp[r][m]), .done(done[r][m]),
        .errors(err[r][m]), .rd_beats(rdb[r][m]), .wr_beats(wrb[r][m]), .lat_sum(lsum[r][m]),
        .lat_max(lmax[r][m]), .reads_done(rdn[r][m]), .lat_min(lmin[r][m]),
        .t_first_ar(tfa[r][m]), .t_last_r(tlr[r][m]));
      assign mrsp[r][m] = (run == r) ? lrsp[m] : '0;
    end
  end
  for (genvar m = 0; m < NM; m++) begin : g_port
    assign lreq[m] = mreq[run][m];
  end

  always #5 ic_clk = ~ic_clk;
  always #4 dram_clk = ~dram_clk;

  // window: all four link ports reading
  int main_beats [2], pim_beats [2], win [2];
  initial for (int r = 0; r < 2; r++) begin main_beats[r] = 0; pim_beats[r] = 0; win[r] = 0; end
  always @(posedge ic_clk) begin
    bit all_on;
    all_on = start[run];
    for (int m = 0; m < NM - 1; m++) all_on &= (tfa[run][m] >= 0) && (rdn[run][m] < NRD);
    if (all_on) begin
      win[run]++;
      for (int m = 0; m < NM - 1; m++) main_beats[run] += int'(lrsp[m].r_valid && lreq[m].r_ready);
      pim_beats[run] += int'(lrsp[NM-1].r_valid && lreq[NM-1].r_ready);
    end
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #5000000;
    $display("watchdog expired in run %0d", run);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, sum_v;
    real bw_main [2], bw_pim [2], amat [2];
    for (int r = 0; r < 2; r++) start[r] = 0;
    #1 ic_rst_n = 0; dram_rst_n = 0;
    #30 ic_rst_n = 1; dram_rst_n = 1;
    n = 0;
    while (!(&init_done) && n < 2000) begin @(posedge ic_clk); n++; end
    chk(&init_done, "all vaults finish initialisation");
    if (!(&init_done)) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    for (int r = 0; r < 2; r++) begin
      bit all;
      longint ls;
      int rn;
      repeat (100) @(posedge ic_clk);
      run = r;
      #1 start[r] = 1;
      n = 0;
      do begin
        @(posedge ic_clk);
        n++;
        all = 1;
        for (int m = 0; m < NM; m++) all &= done[r][m];
      end while (!all && n < 200000);
      chk(all, $sformatf("run %0d completes", r));
      repeat (20) @(posedge ic_clk);
      ls = 0; rn = 0;
      for (int m = 0; m < NM; m++) begin
        checks += rdb[r][m];
        chk(err[r][m] == 0, $sformatf("run %0d port %0d: %0d data errors", r, m, err[r][m]));
        if (m < NM - 1) begin ls += lsum[r][m]; rn += rdn[r][m]; end
      end
      bw_main[r] = real'(main_beats[r]) * 32.0 / real'(win[r] > 0 ? win[r] : 1);
      bw_pim[r]  = real'(pim_beats[r]) * 32.0 / real'(win[r] > 0 ? win[r] : 1);
      amat[r]    = real'(ls) / real'(rn > 0 ? rn : 1);
      $display("run %0d: links %0.1f GB/s, PIM %0.1f GB/s, link read latency avg %0.1f ns (window %0d ns)",
               r, bw_main[r], bw_pim[r], amat[r], win[r]);
    end
    chk(bw_main[1] >= 0.95 * bw_main[0], "link bandwidth kept within 5% with the PIM active");
    chk(bw_pim[1] >= 20.0, "PIM receives at least 20 GB/s");
    $display("link latency increase with PIM: %0.1f %%", 100.0 * (amat[1] - amat[0]) / amat[0]);
    sum_v = 0;
    for (int v = 0; v < NV; v++) sum_v += viol[v];
    chk(sum_v == 0, $sformatf("DRAM timing violations %0d", sum_v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
