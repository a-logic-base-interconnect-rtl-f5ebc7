// vc_axi_if: AXI front end of a vault controller (interconnect clock domain).
//
// A two-way round-robin arbiter picks AW or AR each cycle and pushes the
// winner as a command {wr, id, addr, len} into the command queue (CMDQ) if it
// has room. W beats are pushed into the write-data FIFO independently, in
// arrival order, which is the order of the writes in the CMDQ because the
// interconnect delivers each write burst whole. Read data and write
// responses come back through one response FIFO whose entries are tagged
// R or B; the head entry is presented on the matching channel and popped on
// its handshake. Everything is combinational apart from the arbiter pointer.
// Following the original: the round-robin AW/AR arbiter feeding the CMDQ and
// the WData FIFO. This design's choice: B responses share the RData FIFO,
// and width conversion is done on the DRAM side (in vc_master_fsm).
module vc_axi_if
  import smc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  req_i,
  output axi_rsp_t  rsp_o,
  output logic      cmd_push_o,
  output vc_cmd_t   cmd_o,
  input  logic      cmd_full_i,
  output logic      wd_push_o,
  output vc_wdata_t wd_o,
  input  logic      wd_full_i,
  output logic      rs_pop_o,
  input  vc_resp_t  rs_i,
  input  logic      rs_empty_i
);
  logic [1:0] gnt;
  logic       idx, any;

  // requester 0 = AW, 1 = AR
  rr_arbiter #(.N(2)) u_arb (
    .clk, .rst_n, .req_i({req_i.ar_valid, req_i.aw_valid}), .adv_i(cmd_push_o),
    .gnt_o(gnt), .idx_o(idx), .any_o(any));

  always_comb begin
    cmd_push_o = any && !cmd_full_i;
    cmd_o.wr   = !idx;
    cmd_o.id   = idx ? req_i.ar.id   : req_i.aw.id;
    cmd_o.addr = idx ? req_i.ar.addr : req_i.aw.addr;
    cmd_o.len  = idx ? req_i.ar.len  : req_i.aw.len;

    wd_push_o  = req_i.w_valid && !wd_full_i;
    wd_o.data  = req_i.w.data;
    wd_o.strb  = req_i.w.strb;

    rsp_o          = '0;
    rsp_o.aw_ready = gnt[0] && !cmd_full_i;
    rsp_o.ar_ready = gnt[1] && !cmd_full_i;
    rsp_o.w_ready  = !wd_full_i;
    rsp_o.r.id     = rs_i.id;
    rsp_o.r.data   = rs_i.data;
    rsp_o.r.last   = rs_i.last;
    rsp_o.r_valid  = !rs_empty_i && !rs_i.is_b;
    rsp_o.b.id     = rs_i.id;
    rsp_o.b_valid  = !rs_empty_i && rs_i.is_b;
    rs_pop_o = (rsp_o.r_valid && req_i.r_ready) || (rsp_o.b_valid && req_i.b_ready);
  end
endmodule
