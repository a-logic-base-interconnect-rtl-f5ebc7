// master_block: master-side half of the logarithmic interconnect.
//
// Request side: the destination vault is the VA field of the (already
// remapped) address, bits [OF_W +: VA_W]. AR is steered to that slave block
// with a one-hot valid. A write travels as one packet: AW is steered like AR,
// and once it is accepted the W beats follow to the same slave block until
// WLAST; no new AW leaves before then (W ahead of AW is not supported).
// Response side: R and B from all slave blocks that target this master meet
// in two round-robin arbiters; an R burst keeps its grant until RLAST. The
// master-index bits the slave block put into the ID (bits [7:4]) are cleared
// on the way out. Everything is combinational except the write-lock and
// read-lock registers, so a request reaches the slave block in the cycle it
// is offered.
// Following the original: destination decode in the master block and
// response arbitration there. This design's choices: round-robin for the
// responses, the write-packet lock and the ID layout.
module master_block
  import smc_pkg::*;
#(
  parameter int unsigned NSLV   = 16,
  parameter int unsigned OF_W_P = OF_W,
  parameter int unsigned VA_W   = $clog2(NSLV)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  axi_req_t             req_i,
  output axi_rsp_t             rsp_o,
  // towards the slave blocks
  output axi_ax_t              ar_o,
  output logic [NSLV-1:0]      ar_valid_o,
  input  logic [NSLV-1:0]      ar_ready_i,
  output axi_ax_t              aw_o,
  output logic [NSLV-1:0]      aw_valid_o,
  input  logic [NSLV-1:0]      aw_ready_i,
  output axi_w_t               w_o,
  output logic [NSLV-1:0]      w_valid_o,
  input  logic [NSLV-1:0]      w_ready_i,
  // responses from the slave blocks
  input  axi_r_t               r_i [NSLV],
  input  logic [NSLV-1:0]      r_valid_i,
  output logic [NSLV-1:0]      r_ready_o,
  input  axi_b_t               b_i [NSLV],
  input  logic [NSLV-1:0]      b_valid_i,
  output logic [NSLV-1:0]      b_ready_o
);
  localparam int unsigned SW = $clog2(NSLV > 1 ? NSLV : 2);

  logic [SW-1:0] ar_dst, aw_dst, w_dst_q;
  logic          w_busy_q;

  assign ar_dst = SW'(req_i.ar.addr[OF_W_P +: VA_W]);
  assign aw_dst = SW'(req_i.aw.addr[OF_W_P +: VA_W]);

  // ---------------- requests ----------------
  always_comb begin
    ar_o       = req_i.ar;
    aw_o       = req_i.aw;
    w_o        = req_i.w;
    ar_valid_o = '0;
    aw_valid_o = '0;
    w_valid_o  = '0;
    ar_valid_o[ar_dst] = req_i.ar_valid;
    if (!w_busy_q) aw_valid_o[aw_dst] = req_i.aw_valid;
    if (w_busy_q)  w_valid_o[w_dst_q] = req_i.w_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_busy_q <= 1'b0;
      w_dst_q  <= '0;
    end else if (!w_busy_q) begin
      if (req_i.aw_valid && aw_ready_i[aw_dst]) begin
        w_busy_q <= 1'b1;
        w_dst_q  <= aw_dst;
      end
    end else if (req_i.w_valid && w_ready_i[w_dst_q] && req_i.w.last) begin
      w_busy_q <= 1'b0;
    end
  end

  // ---------------- responses ----------------
  logic [SW-1:0]   r_idx, b_idx, r_sel, r_sel_q;
  logic            r_any, b_any, r_lock_q, r_fire, b_fire;

  rr_arbiter #(.N(NSLV)) u_r_arb (
    .clk, .rst_n, .req_i(r_valid_i), .adv_i(r_fire && !r_lock_q),
    .gnt_o(), .idx_o(r_idx), .any_o(r_any));
  rr_arbiter #(.N(NSLV)) u_b_arb (
    .clk, .rst_n, .req_i(b_valid_i), .adv_i(b_fire),
    .gnt_o(), .idx_o(b_idx), .any_o(b_any));

  always_comb begin
    r_sel = r_lock_q ? r_sel_q : r_idx;
    rsp_o          = '0;
    rsp_o.ar_ready = ar_ready_i[ar_dst];
    rsp_o.aw_ready = !w_busy_q && aw_ready_i[aw_dst];
    rsp_o.w_ready  = w_busy_q && w_ready_i[w_dst_q];
    rsp_o.r_valid  = r_lock_q ? r_valid_i[r_sel_q] : r_any;
    rsp_o.r        = r_i[r_sel];
    rsp_o.r.id     = {{(ID_W-MID_W){1'b0}}, r_i[r_sel].id[MID_W-1:0]};
    rsp_o.b_valid  = b_any;
    rsp_o.b        = b_i[b_idx];
    rsp_o.b.id     = {{(ID_W-MID_W){1'b0}}, b_i[b_idx].id[MID_W-1:0]};
    r_ready_o = '0;
    b_ready_o = '0;
    r_ready_o[r_sel] = req_i.r_ready && rsp_o.r_valid;
    b_ready_o[b_idx] = req_i.b_ready && b_any;
    r_fire = rsp_o.r_valid && req_i.r_ready;
    b_fire = b_any && req_i.b_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_lock_q <= 1'b0;
      r_sel_q  <= '0;
    end else if (r_fire) begin
      r_lock_q <= !rsp_o.r.last;
      r_sel_q  <= r_sel;
    end
  end
endmodule
