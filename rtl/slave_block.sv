// slave_block: slave-side half of the logarithmic interconnect (one per vault).
//
// AR and AW requests from all master blocks go through a hier_arbiter each:
// round-robin among the main ports, round-robin among the PIM ports, then
// fixed priority for the main ports. The winner's request is multiplexed to
// the vault port with the master index written into ID bits [7:4]. After an
// AW is accepted the W multiplexer stays locked on that master until WLAST,
// and no further AW is granted meanwhile (one write in its data phase per
// vault port, this design's choice). R and B responses from the vault are
// routed to the master named by ID bits [7:4]. Arbitration is single-cycle:
// a request offered in a cycle can be forwarded in the same cycle.
module slave_block
  import smc_pkg::*;
#(
  parameter int unsigned NMAIN = 4,
  parameter int unsigned NPIM  = 1,
  localparam int unsigned NM   = NMAIN + NPIM
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the master blocks
  input  axi_ax_t       ar_i [NM],
  input  logic [NM-1:0] ar_valid_i,
  output logic [NM-1:0] ar_ready_o,
  input  axi_ax_t       aw_i [NM],
  input  logic [NM-1:0] aw_valid_i,
  output logic [NM-1:0] aw_ready_o,
  input  axi_w_t        w_i [NM],
  input  logic [NM-1:0] w_valid_i,
  output logic [NM-1:0] w_ready_o,
  // responses towards the master blocks
  output axi_r_t        r_o,
  output logic [NM-1:0] r_valid_o,
  input  logic [NM-1:0] r_ready_i,
  output axi_b_t        b_o,
  output logic [NM-1:0] b_valid_o,
  input  logic [NM-1:0] b_ready_i,
  // vault port
  output axi_req_t      slv_req_o,
  input  axi_rsp_t      slv_rsp_i,
  output logic          pim_lost_o
);
  localparam int unsigned MW = $clog2(NM > 1 ? NM : 2);

  logic [MW-1:0] ar_idx, aw_idx, w_sel_q, r_dst, b_dst;
  logic          ar_any, aw_any, ar_lost, aw_lost, w_busy_q, ar_fire, aw_fire;

  hier_arbiter #(.NMAIN(NMAIN), .NPIM(NPIM)) u_ar_arb (
    .clk, .rst_n, .req_i(ar_valid_i), .adv_i(ar_fire),
    .idx_o(ar_idx), .any_o(ar_any), .pim_lost_o(ar_lost));
  hier_arbiter #(.NMAIN(NMAIN), .NPIM(NPIM)) u_aw_arb (
    .clk, .rst_n, .req_i(w_busy_q ? '0 : aw_valid_i), .adv_i(aw_fire),
    .idx_o(aw_idx), .any_o(aw_any), .pim_lost_o(aw_lost));

  assign r_dst = MW'(slv_rsp_i.r.id[ID_W-1:MID_W]);
  assign b_dst = MW'(slv_rsp_i.b.id[ID_W-1:MID_W]);

  always_comb begin
    slv_req_o          = '0;
    slv_req_o.ar       = ar_i[ar_idx];
    slv_req_o.ar.id    = {MID_W'(ar_idx), ar_i[ar_idx].id[MID_W-1:0]};
    slv_req_o.ar_valid = ar_any;
    slv_req_o.aw       = aw_i[aw_idx];
    slv_req_o.aw.id    = {MID_W'(aw_idx), aw_i[aw_idx].id[MID_W-1:0]};
    slv_req_o.aw_valid = aw_any;
    slv_req_o.w        = w_i[w_sel_q];
    slv_req_o.w_valid  = w_busy_q && w_valid_i[w_sel_q];
    slv_req_o.r_ready  = r_ready_i[r_dst];
    slv_req_o.b_ready  = b_ready_i[b_dst];

    ar_fire = ar_any && slv_rsp_i.ar_ready;
    aw_fire = aw_any && slv_rsp_i.aw_ready;
    ar_ready_o = '0;
    aw_ready_o = '0;
    w_ready_o  = '0;
    ar_ready_o[ar_idx]  = ar_any && slv_rsp_i.ar_ready;
    aw_ready_o[aw_idx]  = aw_any && slv_rsp_i.aw_ready;
    w_ready_o[w_sel_q]  = w_busy_q && slv_rsp_i.w_ready;

    r_o       = slv_rsp_i.r;
    b_o       = slv_rsp_i.b;
    r_valid_o = '0;
    b_valid_o = '0;
    r_valid_o[r_dst] = slv_rsp_i.r_valid;
    b_valid_o[b_dst] = slv_rsp_i.b_valid;
    pim_lost_o = ar_lost || aw_lost;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_busy_q <= 1'b0;
      w_sel_q  <= '0;
    end else if (!w_busy_q) begin
      if (aw_fire) begin
        w_busy_q <= 1'b1;
        w_sel_q  <= aw_idx;
      end
    end else if (slv_req_o.w_valid && slv_rsp_i.w_ready && slv_req_o.w.last) begin
      w_busy_q <= 1'b0;
    end
  end
endmodule
