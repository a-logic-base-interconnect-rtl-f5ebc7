// tb_vault_controller: one vault controller between a self-checking AXI
// traffic master (interconnect clock, 10 time units) and the behavioural
// DRAM model (DRAM clock, 8 units: the 1 GHz / 1.25 GHz ratio). Three phases:
//   1. closed page: random writes, then random read-back;
//   2. open page: the same with another address region;
//   3. open page, every read to one address (the highest row-hit case).
// Refresh is made frequent (T_REFI = 1500) so that it occurs in a short run.
// Checks: all data read back equals what was written, the DRAM model sees
// no timing violation, refresh, power-down, auto-precharge, look-ahead
// activation and row-miss precharge all happen, the unloaded read latency
// is the DRAM's tRCD + CL + burst plus the clock-crossing overhead, and the
// single-row stream reaches at least 95 % of the bus peak (2 beats per
// BL/2 DRAM clocks) that refresh leaves.
module tb_vault_controller;
  import smc_pkg::*;
  localparam int T_REFI = 1500;
  logic ic_clk = 0, dram_clk = 0, ic_rst_n = 0, dram_rst_n = 0;
  logic open_page = 0;
  axi_req_t req, mreq [3];
  axi_rsp_t rsp, mrsp [3];
  dram_cmd_t dcmd;
  logic [2*DQ_W-1:0] dq_o, dq_i;
  logic [2*DQ_W/8-1:0] dm;
  logic dq_oe, init_done;
  logic [3:0] ev;
  bit  start [3], done [3];
  int  err [3], rdb [3], wrb [3], rdn [3], lmax [3], lmin [3];
  longint lsum [3], tfa [3], tlr [3];
  int  viol, n_act, n_rd, n_wr, n_pre, n_ref, n_mrs, n_ap, n_pd;
  int  checks = 0, failures = 0, n_early = 0, n_miss = 0;
  int  phase = 0;

  vault_controller #(.T_REFI(T_REFI)) dut (
    .ic_clk, .ic_rst_n, .dram_clk, .dram_rst_n, .open_page_i(open_page),
    .req_i(req), .rsp_o(rsp), .dram_cmd_o(dcmd), .dq_o, .dm_o(dm), .dq_oe_o(dq_oe), .dq_i,
    .init_done_o(init_done), .ev_o(ev));

  dram_model u_dram (.clk(dram_clk), .cmd_i(dcmd), .dq_i(dq_o), .dm_i(dm), .dq_oe_i(dq_oe), .dq_o(dq_i),
    .violations(viol), .n_act, .n_rd, .n_wr, .n_pre, .n_ref, .n_mrs, .n_ap, .n_pd_cycles(n_pd));

  for (genvar p = 0; p < 3; p++) begin : g_m
    axi_traffic_master #(.MIDX(p + 1), .NWR(p == 2 ? 1 : 40), .NRD(p == 2 ? 48 : 60),
                         .GAP(p == 2 ? 0 : 3), .FIXED(p == 2)) u_m (
      .clk(ic_clk), .start(start[p]), .req(mreq[p]), .rsp(mrsp[p]), .done(done[p]), .errors(err[p]),
      .rd_beats(rdb[p]), .wr_beats(wrb[p]), .lat_sum(lsum[p]), .lat_max(lmax[p]), .reads_done(rdn[p]),
      .lat_min(lmin[p]), .t_first_ar(tfa[p]), .t_last_r(tlr[p]));
  end
  assign req = mreq[phase];
  for (genvar p = 0; p < 3; p++) begin : g_rsp
    assign mrsp[p] = (phase == p) ? rsp : '0;
  end

  always #5 ic_clk = ~ic_clk;
  always #4 dram_clk = ~dram_clk;
  always @(posedge dram_clk) begin
    n_early += int'(ev[0]);
    n_miss  += int'(ev[1]);
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #4000000;
    $display("watchdog expired in phase %0d", phase);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) start[p] = 0;
    #30 ic_rst_n = 1; dram_rst_n = 1;
    wait (init_done);
    repeat (100) @(posedge ic_clk);          // idle long enough to power down
    for (int p = 0; p < 3; p++) begin
      phase = p;
      open_page = (p > 0);
      #1 start[p] = 1;
      wait (done[p]);
      repeat (20) @(posedge ic_clk);
      checks += rdb[p];
      chk(err[p] == 0, $sformatf("phase %0d: %0d data errors", p, err[p]));
      $display("phase %0d: %0d reads, %0d read beats, latency min %0d avg %0d max %0d ic clocks",
               p, rdn[p], rdb[p], lmin[p], int'(lsum[p] / rdn[p]), lmax[p]);
    end
    begin
      // unloaded read: ACT, tRCD, RD, CL, 8 data clocks on the DRAM side (0.8 units
      // of the interconnect clock each), plus up to 8 clocks of crossing and queueing
      real dram_part;
      dram_part = (18.0 + 18.0 + 8.0 + 2.0) * 0.8;
      chk(lmin[0] >= int'(dram_part) && lmin[0] <= int'(dram_part) + 12,
          $sformatf("unloaded closed-page read latency %0d ic clocks (DRAM part %0.1f)", lmin[0], dram_part));
    end
    begin
      // bandwidth of phase 3: beats per ic clock against the DRAM peak of
      // 2 beats per 8 DRAM clocks = 2 / 6.4 beats per ic clock
      real bw, peak;
      bw   = real'(rdb[2]) / real'(tlr[2] - tfa[2]);
      peak = 2.0 / (8.0 * 0.8);
      // refresh takes tRFC plus a precharge every T_REFI clocks out of the peak
      peak = peak * (1.0 - real'(138 + 2 * 18) / real'(T_REFI));
      $display("single-row stream: %0.3f beats/clock = %0.1f %% of the peak left by refresh", bw, 100.0 * bw / peak);
      chk(bw >= 0.95 * peak, "single-row stream reaches 95% of the DRAM peak");
    end
    chk(viol == 0, $sformatf("DRAM timing violations %0d", viol));
    chk(n_ref > 2, "refresh happened");
    chk(n_pd > 0, "power-down happened");
    chk(n_ap > 0, "auto-precharge (closed page) happened");
    chk(n_early > 0, "look-ahead ACT/PRE happened");
    chk(n_miss > 0, "row-miss precharge (open page) happened");
    chk(n_mrs == 1, "mode register set once");
    $display("ACT %0d RD %0d WR %0d PRE %0d REF %0d AP %0d pd-clocks %0d early %0d miss-pre %0d",
             n_act, n_rd, n_wr, n_pre, n_ref, n_ap, n_pd, n_early, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
