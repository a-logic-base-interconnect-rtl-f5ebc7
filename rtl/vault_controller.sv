// vault_controller: AXI4 slave to DDR DRAM controller of one memory vault.
//
// Interconnect clock domain: vc_axi_if arbitrates AW/AR round-robin into the
// command queue (CMDQ) and pushes W beats into the write-data FIFO; it also
// drains the response FIFO onto R and B. DRAM clock domain: vc_master_fsm
// (with its bank FSMs and power/refresh/configuration FSM) executes the
// commands on the vault's DDR bus. The three queues are dual-clock FIFOs, so
// the two clocks may be unrelated. The read data FIFO also carries the write
// responses. Latency through the queues: two synchroniser stages each way
// plus the DRAM access itself.
// Following the original: the AW/AR round-robin into the CMDQ, the WData
// FIFO, the dual-clock CMDQ and RData FIFO, per-bank FSMs under one master
// FSM, open and closed page. This design's choices: FIFO depths (CMDQ 8,
// WData 16 = two full bursts, RData 32 = four full read bursts; no sizes
// are given), the B responses sharing the RData FIFO, and the DRAM timings
// not given (refresh interval, tRFC, init wait, power-down threshold).
// open_page_i is a static configuration input; ev_o = {power-down,
// refresh, row-miss precharge, look-ahead activation} for measurement.
module vault_controller
  import smc_pkg::*;
#(
  parameter int unsigned VA_W       = 4,
  parameter int unsigned CMDQ_DEPTH = 8,
  parameter int unsigned WD_DEPTH   = 16,
  parameter int unsigned RESP_DEPTH = 32,
  parameter int unsigned T_RCD      = 18,
  parameter int unsigned T_RP       = 18,
  parameter int unsigned T_RAS      = 35,
  parameter int unsigned T_WR       = 19,
  parameter int unsigned T_CL       = 18,
  parameter int unsigned T_CCD      = 7,
  parameter int unsigned T_INIT     = 200,
  parameter int unsigned T_REFI     = 9750,
  parameter int unsigned T_RFC      = 138,
  parameter int unsigned PD_IDLE    = 64
) (
  input  logic                ic_clk,
  input  logic                ic_rst_n,
  input  logic                dram_clk,
  input  logic                dram_rst_n,
  input  logic                open_page_i,
  input  axi_req_t            req_i,
  output axi_rsp_t            rsp_o,
  output dram_cmd_t           dram_cmd_o,
  output logic [2*DQ_W-1:0]   dq_o,
  output logic [2*DQ_W/8-1:0] dm_o,
  output logic                dq_oe_o,
  input  logic [2*DQ_W-1:0]   dq_i,
  output logic                init_done_o,
  output logic [3:0]          ev_o     // {power-down, refresh, row-miss PRE, look-ahead}
);
  localparam int unsigned RLW = $clog2(RESP_DEPTH);

  logic      cmd_push, cmd_full, cmd_pop, cmd_empty;
  vc_cmd_t   cmd_w, cmd_r;
  logic      wd_push, wd_full, wd_pop, wd_empty;
  vc_wdata_t wd_w, wd_r;
  logic      rs_push, rs_pop, rs_empty, rs_full;
  vc_resp_t  rs_w, rs_r;
  logic [RLW:0] rs_level;

  vc_axi_if u_axi (
    .clk(ic_clk), .rst_n(ic_rst_n), .req_i, .rsp_o,
    .cmd_push_o(cmd_push), .cmd_o(cmd_w), .cmd_full_i(cmd_full),
    .wd_push_o(wd_push), .wd_o(wd_w), .wd_full_i(wd_full),
    .rs_pop_o(rs_pop), .rs_i(rs_r), .rs_empty_i(rs_empty));

  async_fifo #(.WIDTH($bits(vc_cmd_t)), .DEPTH(CMDQ_DEPTH)) u_cmdq (
    .wclk(ic_clk), .wrst_n(ic_rst_n), .wen(cmd_push), .wdata(cmd_w), .wfull(cmd_full), .wlevel(),
    .rclk(dram_clk), .rrst_n(dram_rst_n), .ren(cmd_pop), .rdata(cmd_r), .rempty(cmd_empty));

  async_fifo #(.WIDTH($bits(vc_wdata_t)), .DEPTH(WD_DEPTH)) u_wdata (
    .wclk(ic_clk), .wrst_n(ic_rst_n), .wen(wd_push), .wdata(wd_w), .wfull(wd_full), .wlevel(),
    .rclk(dram_clk), .rrst_n(dram_rst_n), .ren(wd_pop), .rdata(wd_r), .rempty(wd_empty));

  async_fifo #(.WIDTH($bits(vc_resp_t)), .DEPTH(RESP_DEPTH)) u_rdata (
    .wclk(dram_clk), .wrst_n(dram_rst_n), .wen(rs_push), .wdata(rs_w), .wfull(rs_full), .wlevel(rs_level),
    .rclk(ic_clk), .rrst_n(ic_rst_n), .ren(rs_pop), .rdata(rs_r), .rempty(rs_empty));

  vc_master_fsm #(
    .VA_W(VA_W), .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_WR(T_WR), .T_CL(T_CL),
    .T_CCD(T_CCD), .RESP_DEPTH(RESP_DEPTH), .T_INIT(T_INIT), .T_REFI(T_REFI),
    .T_RFC(T_RFC), .PD_IDLE(PD_IDLE)
  ) u_mfsm (
    .clk(dram_clk), .rst_n(dram_rst_n), .open_page_i,
    .cmd_i(cmd_r), .cmd_empty_i(cmd_empty), .cmd_pop_o(cmd_pop),
    .wd_i(wd_r), .wd_empty_i(wd_empty), .wd_pop_o(wd_pop),
    .rs_push_o(rs_push), .rs_o(rs_w), .rs_level_i(rs_level),
    .dram_cmd_o, .dq_o, .dm_o, .dq_oe_o, .dq_i,
    .init_done_o, .ev_early_o(ev_o[0]), .ev_miss_pre_o(ev_o[1]), .ev_ref_o(ev_o[2]), .ev_pd_o(ev_o[3]));

  // The response FIFO space is reserved before a read or write is issued.
  a_no_resp_overflow: assert property (@(posedge dram_clk) disable iff (!dram_rst_n) rs_push |-> !rs_full);
endmodule
