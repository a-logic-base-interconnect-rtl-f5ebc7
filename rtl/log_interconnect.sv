// log_interconnect: AXI4 logarithmic interconnect of the cube's logic base.
//
// NMAIN main ports (serial links) and NPIM PIM ports connect to NSLV vault
// ports. Per master port: issue_logic (MoT admission), one addr_remapper for
// AR and one for AW (shared mapping mode), and a master_block (destination
// decode, response arbitration). Per vault port: a slave_block (round-robin
// within the main group and within the PIM group, fixed priority main over
// PIM, W locking, ID extension, response routing). The request and response
// paths are combinational from port to port; the only state is in the
// arbiters' pointers, the write/read locks and the MoT counters, so a
// request crosses the network in the cycle it is accepted.
// Following the original: issue logic, address remappers, master and slave
// blocks, single-cycle arbitration, 256-bit data. This design's choices:
// no extra buffering inside the network (the vault FIFOs are the slave-port
// FIFOs), one shared remap mode, and MOT = 32 (no value is given).
module log_interconnect
  import smc_pkg::*;
#(
  parameter int unsigned NMAIN = 4,
  parameter int unsigned NPIM  = 1,
  parameter int unsigned NSLV  = 16,
  parameter int unsigned MOT   = 32,
  localparam int unsigned NM   = NMAIN + NPIM
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    remap_mode_i,
  input  axi_req_t      mst_req_i [NM],
  output axi_rsp_t      mst_rsp_o [NM],
  output axi_req_t      slv_req_o [NSLV],
  input  axi_rsp_t      slv_rsp_i [NSLV],
  output logic [NM-1:0] mot_stall_o,
  output logic [NSLV-1:0] pim_lost_o
);
  localparam int unsigned VA_W = $clog2(NSLV);

  // master block <-> slave block wiring, indexed [master][slave]
  axi_ax_t         ar_m [NM];
  axi_ax_t         aw_m [NM];
  axi_w_t          w_m  [NM];
  logic [NSLV-1:0] ar_v_ms [NM], ar_r_ms [NM];
  logic [NSLV-1:0] aw_v_ms [NM], aw_r_ms [NM];
  logic [NSLV-1:0] w_v_ms  [NM], w_r_ms  [NM];
  logic [NSLV-1:0] r_v_ms  [NM], r_r_ms  [NM];
  logic [NSLV-1:0] b_v_ms  [NM], b_r_ms  [NM];
  // slave block view, indexed [slave][master]
  logic [NM-1:0]   ar_v_sm [NSLV], ar_r_sm [NSLV];
  logic [NM-1:0]   aw_v_sm [NSLV], aw_r_sm [NSLV];
  logic [NM-1:0]   w_v_sm  [NSLV], w_r_sm  [NSLV];
  logic [NM-1:0]   r_v_sm  [NSLV], r_r_sm  [NSLV];
  logic [NM-1:0]   b_v_sm  [NSLV], b_r_sm  [NSLV];
  axi_r_t          r_s [NSLV];
  axi_b_t          b_s [NSLV];

  for (genvar m = 0; m < NM; m++) begin : g_mst
    axi_req_t gated_req, mapped_req;
    axi_rsp_t mb_rsp;
    logic [ADDR_W-1:0] ar_mapped, aw_mapped;

    issue_logic #(.MOT(MOT)) u_issue (
      .clk, .rst_n, .mst_req_i(mst_req_i[m]), .mst_rsp_o(mst_rsp_o[m]),
      .ic_req_o(gated_req), .ic_rsp_i(mb_rsp),
      .outstanding_o(), .stall_o(mot_stall_o[m]));

    always_comb begin
      mapped_req         = gated_req;
      mapped_req.ar.addr = ar_mapped;
      mapped_req.aw.addr = aw_mapped;
    end
    addr_remapper #(.VA_W(VA_W)) u_remap_ar (
      .addr_i(gated_req.ar.addr), .mode_i(remap_mode_i), .addr_o(ar_mapped));
    addr_remapper #(.VA_W(VA_W)) u_remap_aw (
      .addr_i(gated_req.aw.addr), .mode_i(remap_mode_i), .addr_o(aw_mapped));

    master_block #(.NSLV(NSLV)) u_mb (
      .clk, .rst_n, .req_i(mapped_req), .rsp_o(mb_rsp),
      .ar_o(ar_m[m]), .ar_valid_o(ar_v_ms[m]), .ar_ready_i(ar_r_ms[m]),
      .aw_o(aw_m[m]), .aw_valid_o(aw_v_ms[m]), .aw_ready_i(aw_r_ms[m]),
      .w_o(w_m[m]),   .w_valid_o(w_v_ms[m]),   .w_ready_i(w_r_ms[m]),
      .r_i(r_s), .r_valid_i(r_v_ms[m]), .r_ready_o(r_r_ms[m]),
      .b_i(b_s), .b_valid_i(b_v_ms[m]), .b_ready_o(b_r_ms[m]));

    for (genvar s = 0; s < NSLV; s++) begin : g_x
      assign ar_v_sm[s][m] = ar_v_ms[m][s];
      assign aw_v_sm[s][m] = aw_v_ms[m][s];
      assign w_v_sm[s][m]  = w_v_ms[m][s];
      assign r_r_sm[s][m]  = r_r_ms[m][s];
      assign b_r_sm[s][m]  = b_r_ms[m][s];
      assign ar_r_ms[m][s] = ar_r_sm[s][m];
      assign aw_r_ms[m][s] = aw_r_sm[s][m];
      assign w_r_ms[m][s]  = w_r_sm[s][m];
      assign r_v_ms[m][s]  = r_v_sm[s][m];
      assign b_v_ms[m][s]  = b_v_sm[s][m];
    end
  end

  for (genvar s = 0; s < NSLV; s++) begin : g_slv
    slave_block #(.NMAIN(NMAIN), .NPIM(NPIM)) u_sb (
      .clk, .rst_n,
      .ar_i(ar_m), .ar_valid_i(ar_v_sm[s]), .ar_ready_o(ar_r_sm[s]),
      .aw_i(aw_m), .aw_valid_i(aw_v_sm[s]), .aw_ready_o(aw_r_sm[s]),
      .w_i(w_m),   .w_valid_i(w_v_sm[s]),   .w_ready_o(w_r_sm[s]),
      .r_o(r_s[s]), .r_valid_o(r_v_sm[s]), .r_ready_i(r_r_sm[s]),
      .b_o(b_s[s]), .b_valid_o(b_v_sm[s]), .b_ready_i(b_r_sm[s]),
      .slv_req_o(slv_req_o[s]), .slv_rsp_i(slv_rsp_i[s]), .pim_lost_o(pim_lost_o[s]));
  end
endmodule
