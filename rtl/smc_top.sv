// smc_top: logic base of the Smart Memory Cube.
//
// The cube keeps the Hybrid Memory Cube's external view -- serial links in
// front, DRAM vaults behind -- and adds a processor-in-memory (PIM) port to
// the logic-base interconnect. NMAIN AXI4 ports come from the serial link
// controllers and NPIM AXI4 ports from PIM devices; both are top-level ports
// here. The log_interconnect (1 GHz in the reference configuration) routes
// them to NVAULT vault_controllers, each running its vault's DRAM bus on its
// own clock (1.25 GHz, tCK = 0.8 ns). The address mapping mode and the page
// policy are static configuration inputs shared by all ports and vaults.
//
// Interface: link_req_i/link_rsp_o carry AXI4 (256-bit data, 8-bit IDs)
// for ports 0..NMAIN-1 (links, high priority) and NMAIN..NM-1 (PIM, low
// priority). Each vault has its own DRAM command bus, 64-bit-per-clock data
// (the two edges of a 32-bit DDR bus) and init_done flag. mot_stall_o,
// pim_lost_o and vault_ev_o ({power-down, refresh, row-miss precharge,
// look-ahead activation}) are per-cycle event flags for measurement only.
// Both resets are asynchronous; ic_rst_n and dram_rst_n may be released in
// any order, and traffic may start once all init_done_o bits are high.
//
// From the document: the port counts, 16 vaults, the 256-bit flit, the two
// clock rates and the split into interconnect and vault controllers. Own
// choices: MOT = 32 (no value given; the smallest power of two that
// delivers more than 80 GB/s of random reads over four ports) and VA_W
// derived from NVAULT, so NMAIN = 8, NVAULT = 32 gives the larger cube.
// Lint reports the resets as used both synchronously and asynchronously:
// the synchronous use is only the "disable iff" of the assertions.
module smc_top
  import smc_pkg::*;
#(
  parameter int unsigned NMAIN  = 4,
  parameter int unsigned NPIM   = 1,
  parameter int unsigned NVAULT = 16,
  parameter int unsigned MOT    = 32,
  parameter int unsigned T_REFI = 9750,
  localparam int unsigned NM    = NMAIN + NPIM
) (
  input  logic                ic_clk,
  input  logic                ic_rst_n,
  input  logic                dram_clk,
  input  logic                dram_rst_n,
  input  logic [2:0]          remap_mode_i,
  input  logic                open_page_i,
  input  axi_req_t            link_req_i [NM],
  output axi_rsp_t            link_rsp_o [NM],
  output dram_cmd_t           dram_cmd_o [NVAULT],
  output logic [2*DQ_W-1:0]   dq_o       [NVAULT],
  output logic [2*DQ_W/8-1:0] dm_o       [NVAULT],
  output logic [NVAULT-1:0]   dq_oe_o,
  input  logic [2*DQ_W-1:0]   dq_i       [NVAULT],
  output logic [NVAULT-1:0]   init_done_o,
  output logic [NM-1:0]       mot_stall_o,
  output logic [NVAULT-1:0]   pim_lost_o,
  output logic [3:0]          vault_ev_o [NVAULT]
);
  localparam int unsigned VA_W = $clog2(NVAULT);

  axi_req_t vreq [NVAULT];
  axi_rsp_t vrsp [NVAULT];

  log_interconnect #(.NMAIN(NMAIN), .NPIM(NPIM), .NSLV(NVAULT), .MOT(MOT)) u_ic (
    .clk(ic_clk), .rst_n(ic_rst_n), .remap_mode_i,
    .mst_req_i(link_req_i), .mst_rsp_o(link_rsp_o),
    .slv_req_o(vreq), .slv_rsp_i(vrsp),
    .mot_stall_o, .pim_lost_o);

  for (genvar v = 0; v < NVAULT; v++) begin : g_vault
    vault_controller #(.VA_W(VA_W), .T_REFI(T_REFI)) u_vc (
      .ic_clk, .ic_rst_n, .dram_clk, .dram_rst_n, .open_page_i,
      .req_i(vreq[v]), .rsp_o(vrsp[v]),
      .dram_cmd_o(dram_cmd_o[v]), .dq_o(dq_o[v]), .dm_o(dm_o[v]), .dq_oe_o(dq_oe_o[v]),
      .dq_i(dq_i[v]), .init_done_o(init_done_o[v]), .ev_o(vault_ev_o[v]));
  end
endmodule
