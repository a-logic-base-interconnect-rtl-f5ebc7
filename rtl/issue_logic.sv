// issue_logic: admission control of one AXI master port of the interconnect.
//
// A transaction may enter the memory system only while the port has fewer
// than MOT transactions outstanding (the "MoT" limit of the interconnect).
// Reads and writes share one counter: it rises when an AR or AW handshake
// happens and falls on the last R beat of a read or on the B response of a
// write. When AR and AW compete for the last free slot, AR wins (this
// design's choice). All other signals pass through unchanged; gating adds
// no latency. stall_o flags a cycle in which a valid request is held back.
module issue_logic
  import smc_pkg::*;
#(
  parameter int unsigned MOT = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t mst_req_i,
  output axi_rsp_t mst_rsp_o,
  output axi_req_t ic_req_o,
  input  axi_rsp_t ic_rsp_i,
  output logic [$clog2(MOT+1)-1:0] outstanding_o,
  output logic     stall_o
);
  localparam int unsigned CW = $clog2(MOT + 1);
  logic [CW-1:0] cnt_q;
  logic ar_ok, aw_ok, ar_hs, aw_hs, r_done, b_done;

  always_comb begin
    ar_ok = (int'(cnt_q) < MOT);
    aw_ok = (int'(cnt_q) + ((ar_ok && mst_req_i.ar_valid) ? 1 : 0) < MOT);

    ic_req_o          = mst_req_i;
    ic_req_o.ar_valid = mst_req_i.ar_valid && ar_ok;
    ic_req_o.aw_valid = mst_req_i.aw_valid && aw_ok;

    mst_rsp_o          = ic_rsp_i;
    mst_rsp_o.ar_ready = ic_rsp_i.ar_ready && ar_ok;
    mst_rsp_o.aw_ready = ic_rsp_i.aw_ready && aw_ok;

    ar_hs  = ic_req_o.ar_valid && ic_rsp_i.ar_ready;
    aw_hs  = ic_req_o.aw_valid && ic_rsp_i.aw_ready;
    r_done = ic_rsp_i.r_valid && mst_req_i.r_ready && ic_rsp_i.r.last;
    b_done = ic_rsp_i.b_valid && mst_req_i.b_ready;
    stall_o = (mst_req_i.ar_valid && !ar_ok) || (mst_req_i.aw_valid && !aw_ok);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= CW'(int'(cnt_q) + int'(ar_hs) + int'(aw_hs) - int'(r_done) - int'(b_done));
  end

  assign outstanding_o = cnt_q;

  // A port can never retire more transactions than it issued.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (int'(cnt_q) + int'(ar_hs) + int'(aw_hs)) >= (int'(r_done) + int'(b_done)));
endmodule
