// tb_log_interconnect: four main ports and one PIM port, each driven by a
// self-checking traffic master, write and read back through the
// interconnect into sixteen behavioural memory ports. Checks: every read
// beat returns the data written (so routing, W locking, ID extension and
// response return are right), no request reaches a port other than the
// one named by its remapped vault field, every transaction completes, and
// the MoT limit and the PIM's loss to main ports both occur.
module tb_log_interconnect;
  import smc_pkg::*;
  localparam int NMAIN = 4, NPIM = 1, NM = 5, NS = 16, MOT = 4;
  logic clk = 0, rst_n = 0, start = 0;
  axi_req_t mreq [NM], sreq [NS];
  axi_rsp_t mrsp [NM], srsp [NS];
  logic [NM-1:0] mot_stall;
  logic [NS-1:0] pim_lost;
  bit  done [NM];
  int  err [NM], rdb [NM], wrb [NM], rdn [NM], latmax [NM];
  longint lat [NM];
  int  misr [NS], served [NS];
  int  checks = 0, failures = 0, n_stall = 0, n_pim_lost = 0;

  log_interconnect #(.NMAIN(NMAIN), .NPIM(NPIM), .NSLV(NS), .MOT(MOT)) dut (
    .clk, .rst_n, .remap_mode_i(3'd1), .mst_req_i(mreq), .mst_rsp_o(mrsp),
    .slv_req_o(sreq), .slv_rsp_i(srsp), .mot_stall_o(mot_stall), .pim_lost_o(pim_lost));

  for (genvar m = 0; m < NM; m++) begin : g_m
    axi_traffic_master #(.MIDX(m), .NWR(24), .NRD(40), .GAP(m == 4 ? 0 : 2)) u_m (
      .clk, .start, .req(mreq[m]), .rsp(mrsp[m]), .done(done[m]), .errors(err[m]),
      .rd_beats(rdb[m]), .wr_beats(wrb[m]), .lat_sum(lat[m]), .lat_max(latmax[m]), .reads_done(rdn[m]),
      .lat_min(), .t_first_ar(), .t_last_r());
  end
  for (genvar s = 0; s < NS; s++) begin : g_s
    axi_mem_slave #(.SIDX(s)) u_s (.clk, .req(sreq[s]), .rsp(srsp[s]), .misrouted(misr[s]), .served(served[s]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_stall    += $countones(mot_stall);
    n_pim_lost += $countones(pim_lost);
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    #2 rst_n = 1; start = 1;
    do begin
      @(posedge clk);
      all = 1;
      foreach (done[m]) all &= done[m];
    end while (!all);
    repeat (5) @(posedge clk);
    for (int m = 0; m < NM; m++) begin
      checks += rdb[m];  // every read beat was compared by its master
      chk(err[m] == 0, $sformatf("master %0d data errors %0d", m, err[m]));
      chk(rdn[m] == 40, "all reads completed");
      $display("master %0d: %0d read beats, %0d write beats, avg read latency %0d, max %0d",
               m, rdb[m], wrb[m], int'(lat[m] / rdn[m]), latmax[m]);
    end
    for (int s = 0; s < NS; s++) chk(misr[s] == 0, $sformatf("port %0d misrouted %0d", s, misr[s]));
    chk(n_stall > 0, "MoT limit reached");
    chk(n_pim_lost > 0, "PIM lost arbitration to a main port");
    $display("MoT stall cycles %0d, PIM losses %0d", n_stall, n_pim_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
