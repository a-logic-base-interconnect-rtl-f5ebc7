// tb_smc_top: the whole logic base at its default parameters (four link
// ports, one PIM port, sixteen vaults, 256-bit flits, MoT 32), each vault
// on a behavioural DRAM model, interconnect clock 1 GHz (10 units) and DRAM
// clock 1.25 GHz (8 units). Phases:
//   0. closed page, default mapping RC-BA-VA-OF: all five ports write random
//      bursts and read them back;
//   1. open page, mapping BA-RC-VA-OF: the same with new data;
//   2. closed page, default mapping: the four link ports stream reads of
//      full 256-byte bursts with no gaps (uniform random read traffic) and
//      the delivered read bandwidth is measured.
// Between phases the cube idles long enough to power down and refresh.
// Checks: every read beat equals the data written, no DRAM timing
// violation in any vault, every transaction completes, and each mechanism
// happens at least once: MoT admission stall, PIM losing to a main port,
// refresh, power-down, auto-precharge, look-ahead activation, open-page
// row-miss precharge, and a change of address mapping. The random read
// stream must deliver at least 80 GB/s, the read bandwidth HMC requires.
module tb_smc_top;
  import smc_pkg::*;
  localparam int NM = 5, NV = 16, NPH = 3;
  logic ic_clk = 0, dram_clk = 0, ic_rst_n = 1, dram_rst_n = 1;
  logic [2:0] remap_mode = 3'd0;
  logic open_page = 0;
  axi_req_t lreq [NM];
  axi_rsp_t lrsp [NM];
  dram_cmd_t dcmd [NV];
  logic [2*DQ_W-1:0] dq_o [NV], dq_i [NV];
  logic [2*DQ_W/8-1:0] dm [NV];
  logic [NV-1:0] dq_oe, init_done, pim_lost;
  logic [NM-1:0] mot_stall;
  logic [3:0] vev [NV];
  int phase = 0;

  smc_top dut (.ic_clk, .ic_rst_n, .dram_clk, .dram_rst_n, .remap_mode_i(remap_mode),
    .open_page_i(open_page), .link_req_i(lreq), .link_rsp_o(lrsp), .dram_cmd_o(dcmd),
    .dq_o, .dm_o(dm), .dq_oe_o(dq_oe), .dq_i, .init_done_o(init_done),
    .mot_stall_o(mot_stall), .pim_lost_o(pim_lost), .vault_ev_o(vev));

  int viol [NV], n_act [NV], n_rd [NV], n_wr [NV], n_pre [NV], n_ref [NV], n_mrs [NV], n_ap [NV], n_pd [NV];
  for (genvar v = 0; v < NV; v++) begin : g_dram
    dram_model u_dram (.clk(dram_clk), .cmd_i(dcmd[v]), .dq_i(dq_o[v]), .dm_i(dm[v]), .dq_oe_i(dq_oe[v]),
      .dq_o(dq_i[v]), .violations(viol[v]), .n_act(n_act[v]), .n_rd(n_rd[v]), .n_wr(n_wr[v]),
      .n_pre(n_pre[v]), .n_ref(n_ref[v]), .n_mrs(n_mrs[v]), .n_ap(n_ap[v]), .n_pd_cycles(n_pd[v]));
  end

  // traffic masters: [phase][port]
  axi_req_t mreq [NPH][NM];
  axi_rsp_t mrsp [NPH][NM];
  bit  start [NPH], done [NPH][NM];
  int  err [NPH][NM], rdb [NPH][NM], wrb [NPH][NM], rdn [NPH][NM], lmax [NPH][NM], lmin [NPH][NM];
  longint lsum [NPH][NM], tfa [NPH][NM], tlr [NPH][NM];
  for (genvar ph = 0; ph < NPH; ph++) begin : g_ph
    for (genvar m = 0; m < NM; m++) begin : g_m
      localparam bit STREAM = (ph == 2);
      axi_traffic_master #(.MIDX(m), .NWR(STREAM ? (m < 4 ? 64 : 1) : 30),
                           .NRD(STREAM ? (m < 4 ? 400 : 1) : 40), .GAP(STREAM ? 0 : 3), .FULL(STREAM),
                           .VAULT_ID(STREAM), .MAXRD(40)) u_m (
        .clk(ic_clk), .start(start[ph]), .req(mreq[ph][m]), .rsp(mrsp[ph][m]), .done(done[ph][m]),
        .errors(err[ph][m]), .rd_beats(rdb[ph][m]), .wr_beats(wrb[ph][m]), .lat_sum(lsum[ph][m]),
        .lat_max(lmax[ph][m]), .reads_done(rdn[ph][m]), .lat_min(lmin[ph][m]),
        .t_first_ar(tfa[ph][m]), .t_last_r(tlr[ph][m]));
      assign mrsp[ph][m] = (phase == ph) ? lrsp[m] : '0;
    end
  end
  for (genvar m = 0; m < NM; m++) begin : g_port
    assign lreq[m] = mreq[phase][m];
  end

  always #5 ic_clk = ~ic_clk;
  always #4 dram_clk = ~dram_clk;

  int n_stall = 0, n_pim_lost = 0, n_early = 0, n_miss = 0, n_refr = 0, n_pdc = 0, n_modes = 0;
  // steady-state window of the read stream: all four link ports reading
  int ss_beats = 0, ss_cycles = 0;
  always @(posedge ic_clk) if (phase == 2) begin
    bit all_on;
    all_on = 1;
    for (int m = 0; m < 4; m++) all_on &= (tfa[2][m] >= 0) && (rdn[2][m] < 400);
    if (all_on) begin
      ss_cycles++;
      for (int m = 0; m < 4; m++) ss_beats += int'(lrsp[m].r_valid && lreq[m].r_ready);
    end
  end
  always @(posedge ic_clk) if (ic_rst_n) begin
    n_stall    += $countones(mot_stall);
    n_pim_lost += $countones(pim_lost);
  end
  always @(posedge dram_clk) if (dram_rst_n)
    for (int v = 0; v < NV; v++) begin
      n_early += int'(vev[v][0]);
      n_miss  += int'(vev[v][1]);
      n_refr  += int'(vev[v][2]);
      n_pdc   += int'(vev[v][3]);
    end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #20000000;
    $display("watchdog expired in phase %0d", phase);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum_v, sum_ap;
    for (int ph = 0; ph < NPH; ph++) start[ph] = 0;
    #1 ic_rst_n = 0; dram_rst_n = 0;
    #30 ic_rst_n = 1; dram_rst_n = 1;
    begin
      int n;
      n = 0;
      while (!(&init_done) && n < 2000) begin @(posedge ic_clk); n++; end
      chk(&init_done, "all vaults finish initialisation within 2000 clocks");
      if (!(&init_done)) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    for (int ph = 0; ph < NPH; ph++) begin
      bit all;
      int n_cyc;
      repeat (ph == 0 ? 200 : 10000) @(posedge ic_clk);  // idle: power-down, refresh
      phase = ph;
      open_page  = (ph == 1);
      remap_mode = (ph == 1) ? 3'd2 : 3'd0;
      if (ph > 0) n_modes++;
      #1 start[ph] = 1;
      n_cyc = 0;
      do begin
        @(posedge ic_clk);
        n_cyc++;
        all = 1;
        for (int m = 0; m < NM; m++) all &= done[ph][m];
      end while (!all && n_cyc < 200000);
      chk(all, $sformatf("phase %0d completes", ph));
      repeat (20) @(posedge ic_clk);
      for (int m = 0; m < NM; m++) begin
        checks += rdb[ph][m];
        chk(err[ph][m] == 0, $sformatf("phase %0d port %0d: %0d data errors", ph, m, err[ph][m]));
        $display("phase %0d port %0d: %0d reads (%0d beats), %0d write beats, read latency min %0d avg %0d max %0d ns",
                 ph, m, rdn[ph][m], rdb[ph][m], wrb[ph][m], lmin[ph][m], int'(lsum[ph][m] / longint'(rdn[ph][m] > 0 ? rdn[ph][m] : 1)), lmax[ph][m]);
      end
    end
    begin
      real gbps;
      gbps = real'(ss_beats) * 32.0 / real'(ss_cycles);   // bytes per ns
      $display("random read stream on 4 link ports: %0d beats in %0d ns with all ports busy = %0.1f GB/s",
               ss_beats, ss_cycles, gbps);
      chk(gbps >= 80.0, "random read bandwidth of at least 80 GB/s");
    end
    sum_v = 0; sum_ap = 0;
    for (int v = 0; v < NV; v++) begin sum_v += viol[v]; sum_ap += n_ap[v]; end
    chk(sum_v == 0, $sformatf("DRAM timing violations %0d", sum_v));
    chk(n_stall > 0,    "MoT admission stall happened");
    chk(n_pim_lost > 0, "PIM lost arbitration to a main port");
    chk(n_refr > 0,     "refresh happened");
    chk(n_pdc > 0,      "power-down happened");
    chk(sum_ap > 0,     "auto-precharge happened");
    chk(n_early > 0,    "look-ahead activation happened");
    chk(n_miss > 0,     "open-page row-miss precharge happened");
    chk(n_modes > 0,    "address mapping changed");
    $display("events: MoT stalls %0d, PIM losses %0d, refreshes %0d, power-down clocks %0d, auto-precharges %0d, look-ahead %0d, row-miss PRE %0d",
             n_stall, n_pim_lost, n_refr, n_pdc, sum_ap, n_early, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
