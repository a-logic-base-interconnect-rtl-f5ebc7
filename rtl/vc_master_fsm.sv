// vc_master_fsm: DRAM-side master FSM of a vault controller.
//
// It owns the vault's DDR command bus and instantiates the per-bank
// read-write FSMs (bank_fsm) and the power/refresh/configuration FSM
// (dram_mgmt_fsm). Commands are taken from the CMDQ head in order. A burst of
// 256-bit AXI beats becomes a series of column accesses of BL words of DQ_W
// bits (two beats each with the defaults); the column address is the beat
// index times DATA_W/DQ_W. Per DRAM clock at most one command is issued:
//   1. the management FSM, whenever it holds the bus;
//   2. for the current transaction: RD/WR if its row is open and tRCD, tCCD,
//      read/write turnaround, write data and response-FIFO credit allow;
//      PRE if another row is open (open page); ACT if the bank is idle;
//   3. otherwise, latency hiding: ACT (or, in open page, PRE on a row miss)
//      for the bank of the next CMDQ entry if that is a different bank.
// Closed page: the last column access of a transaction carries
// auto-precharge. Open page: rows stay open until a miss or a refresh.
// Commands are registered onto the pins one clock after the decision. Write
// data leaves T_WL clocks after the WR on the pins, read data is captured
// T_CL clocks after the RD, each as BL/2 clocks of 2*DQ_W bits (both DDR
// edges side by side, rising edge in the low half), through delay lines.
// Four captured clocks make one beat; beats and write responses go to the
// response FIFO, whose free space is reserved before a RD or a final WR is
// issued. The in-order service with one-entry look-ahead, BL=16, tWTR and
// the turnaround rule are this design's choices; the DRAM timings are the
// published HMC values at tCK = 0.8 ns.
module vc_master_fsm
  import smc_pkg::*;
#(
  parameter int unsigned VA_W       = 4,
  parameter int unsigned T_RCD      = 18,
  parameter int unsigned T_RP       = 18,
  parameter int unsigned T_RAS      = 35,
  parameter int unsigned T_WR       = 19,
  parameter int unsigned T_CL       = 18,
  parameter int unsigned T_CCD      = 7,
  parameter int unsigned T_WL       = 1,
  parameter int unsigned T_WTR      = 2,
  parameter int unsigned BL         = 16,
  parameter int unsigned RESP_DEPTH = 32,
  parameter int unsigned T_INIT     = 200,
  parameter int unsigned T_REFI     = 9750,
  parameter int unsigned T_RFC      = 138,
  parameter int unsigned PD_IDLE    = 64,
  localparam int unsigned RLW       = $clog2(RESP_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                open_page_i,
  // CMDQ read side
  input  vc_cmd_t             cmd_i,
  input  logic                cmd_empty_i,
  output logic                cmd_pop_o,
  // write-data FIFO read side
  input  vc_wdata_t           wd_i,
  input  logic                wd_empty_i,
  output logic                wd_pop_o,
  // response FIFO write side
  output logic                rs_push_o,
  output vc_resp_t            rs_o,
  input  logic [RLW:0]        rs_level_i,
  // DRAM bus
  output dram_cmd_t           dram_cmd_o,
  output logic [2*DQ_W-1:0]   dq_o,
  output logic [2*DQ_W/8-1:0] dm_o,
  output logic                dq_oe_o,
  input  logic [2*DQ_W-1:0]   dq_i,
  // status / events
  output logic                init_done_o,
  output logic                ev_early_o,     // look-ahead ACT/PRE issued
  output logic                ev_miss_pre_o,  // PRE for a row miss (open page)
  output logic                ev_ref_o,
  output logic                ev_pd_o
);
  localparam int unsigned WPC   = 2 * DQ_W;                 // bits per DRAM clock
  localparam int unsigned WPB   = DATA_W / WPC;             // clocks per beat
  localparam int unsigned BPC   = (BL * DQ_W) / DATA_W;     // beats per column access
  localparam int unsigned NCLK  = BL / 2;                   // data clocks per access
  localparam int unsigned BEAT_W = OF_W - $clog2(STRB_W);   // beat index in a row
  localparam int unsigned COLS_PER_BEAT = DATA_W / DQ_W;
  localparam int unsigned CCD   = (T_CCD > NCLK) ? T_CCD : NCLK;
  localparam int unsigned RTW   = T_CL + NCLK + 1 - T_WL;   // RD -> WR turnaround
  localparam int unsigned WTR   = T_WL + NCLK + T_WTR;      // WR -> RD turnaround
  localparam int unsigned DRD   = T_CL + NCLK;              // read capture line
  localparam int unsigned DWR   = T_WL + NCLK;              // write data line
  localparam int unsigned MQ    = 4;                        // reads in flight
  localparam int unsigned CW    = 8;

  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [1:0]      nb;     // beats kept from this access
    logic            last;   // carries the last beat of its burst
  } rd_meta_t;

  // ---------------- current transaction ----------------
  logic              cur_v_q, cur_wr_q;
  logic [ID_W-1:0]   cur_id_q;
  logic [BA_W-1:0]   cur_ba_q;
  logic [RC_W-1:0]   cur_row_q;
  logic [BEAT_W-1:0] cur_beat_q;
  logic [LEN_W:0]    cur_left_q;
  logic [1:0]        nb;

  logic [BA_W-1:0]   nxt_ba;
  logic [RC_W-1:0]   nxt_row;
  assign nxt_ba  = cmd_i.addr[OF_W + VA_W +: BA_W];
  assign nxt_row = cmd_i.addr[OF_W + VA_W + BA_W +: RC_W];
  assign nb      = (cur_left_q >= (LEN_W+1)'(BPC)) ? 2'(BPC) : 2'(cur_left_q);

  // ---------------- bank FSMs ----------------
  logic [NBANK-1:0] b_act, b_rd, b_wr, b_pre, b_open, b_actok, b_colok, b_preok, b_idle;
  logic [RC_W-1:0]  b_row [NBANK];
  logic             ap;

  // ---------------- management FSM ----------------
  logic      m_hold, m_cmd_v, m_prea, m_cke, ctrl_idle;
  dram_cmd_t m_cmd;

  dram_mgmt_fsm #(.T_INIT(T_INIT), .T_REFI(T_REFI), .T_RFC(T_RFC), .PD_IDLE(PD_IDLE),
                  .T_RP(T_RP), .T_CL(T_CL), .BL(BL)) u_mgmt (
    .clk, .rst_n, .ctrl_idle_i(ctrl_idle), .bank_idle_i(b_idle), .bank_pre_ok_i(b_preok),
    .bank_open_i(b_open), .hold_o(m_hold), .cmd_valid_o(m_cmd_v), .cmd_o(m_cmd),
    .prea_o(m_prea), .cke_o(m_cke), .init_done_o(init_done_o), .ref_o(ev_ref_o), .pd_o(ev_pd_o));

  // ---------------- timing between column commands ----------------
  logic [CW-1:0] ccd_q, rtw_q, wtr_q;
  logic [$clog2(RESP_DEPTH+1)+1:0] rd_infl_q;
  logic [2:0]    b_pend_q;
  logic [1:0]    wb_cnt_q;
  vc_wdata_t     wbuf_q [2];
  logic          res_ok_rd, res_ok_b;

  always_comb begin
    res_ok_rd = (int'(rs_level_i) + int'(rd_infl_q) + int'(b_pend_q) + int'(nb)) <= RESP_DEPTH;
    res_ok_b  = (int'(rs_level_i) + int'(rd_infl_q) + int'(b_pend_q) + 1) <= RESP_DEPTH
                && b_pend_q < 3'd4;
  end

  // ---------------- command decision ----------------
  dram_op_e          op;
  logic [BA_W-1:0]   op_ba;
  logic [DRAM_A_W-1:0] op_a;
  logic              is_col, last_op, early, miss_pre, cur_load, meta_full;
  logic [NBANK-1:0]  mbank;

  always_comb begin
    op       = DC_NOP;
    op_ba    = cur_ba_q;
    op_a     = '0;
    is_col   = 1'b0;
    early    = 1'b0;
    miss_pre = 1'b0;
    last_op  = (cur_left_q <= (LEN_W+1)'(BPC));
    ap       = !open_page_i && last_op;
    if (!m_hold && cur_v_q) begin
      if (b_open[cur_ba_q] && b_row[cur_ba_q] == cur_row_q) begin
        if (b_colok[cur_ba_q] && ccd_q == 0) begin
          if (cur_wr_q) begin
            if (rtw_q == 0 && wb_cnt_q == nb && (!last_op || res_ok_b)) op = DC_WR;
          end else begin
            if (wtr_q == 0 && res_ok_rd && !meta_full) op = DC_RD;
          end
        end
        is_col = (op != DC_NOP);
        op_a   = DRAM_A_W'(int'(cur_beat_q) * COLS_PER_BEAT);
        op_a[10] = ap;
      end else if (b_open[cur_ba_q]) begin
        if (b_preok[cur_ba_q]) begin
          op = DC_PRE;
          miss_pre = 1'b1;
        end
      end else if (b_actok[cur_ba_q]) begin
        op   = DC_ACT;
        op_a = DRAM_A_W'(cur_row_q);
      end
    end
    if (!m_hold && cur_v_q && op == DC_NOP && !cmd_empty_i && nxt_ba != cur_ba_q) begin
      op_ba = nxt_ba;
      if (b_actok[nxt_ba]) begin
        op    = DC_ACT;
        op_a  = DRAM_A_W'(nxt_row);
        early = 1'b1;
      end else if (open_page_i && b_open[nxt_ba] && b_row[nxt_ba] != nxt_row && b_preok[nxt_ba]) begin
        op    = DC_PRE;
        early = 1'b1;
      end
    end
    mbank = '0;
    mbank[op_ba] = 1'b1;
    b_act = (op == DC_ACT) ? mbank : '0;
    b_rd  = (op == DC_RD)  ? mbank : '0;
    b_wr  = (op == DC_WR)  ? mbank : '0;
    b_pre = m_prea ? '1 : ((op == DC_PRE) ? mbank : '0);
    cur_load  = !cur_v_q && !cmd_empty_i && !m_hold;
    cmd_pop_o = cur_load;
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    bank_fsm #(.T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_WR(T_WR), .T_WL(T_WL), .BL(BL)) u_bank (
      .clk, .rst_n, .act_i(b_act[b]), .rd_i(b_rd[b]), .wr_i(b_wr[b]), .pre_i(b_pre[b]),
      .ap_i(ap), .row_i(op_a[RC_W-1:0]), .is_open_o(b_open[b]), .open_row_o(b_row[b]),
      .act_ok_o(b_actok[b]), .col_ok_o(b_colok[b]), .pre_ok_o(b_preok[b]), .idle_o(b_idle[b]));
  end

  assign ev_early_o    = early;
  assign ev_miss_pre_o = miss_pre;

  // ---------------- command pins, transaction state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dram_cmd_o <= dram_encode(DC_NOP, '0, '0, 1'b0);
      cur_v_q    <= 1'b0;
      cur_wr_q   <= 1'b0;
      cur_id_q   <= '0;
      cur_ba_q   <= '0;
      cur_row_q  <= '0;
      cur_beat_q <= '0;
      cur_left_q <= '0;
      ccd_q      <= '0;
      rtw_q      <= '0;
      wtr_q      <= '0;
    end else begin
      dram_cmd_o <= m_cmd_v ? m_cmd : dram_encode(op, op_ba, op_a, m_cke);
      if (ccd_q != 0) ccd_q <= ccd_q - 1'b1;
      if (rtw_q != 0) rtw_q <= rtw_q - 1'b1;
      if (wtr_q != 0) wtr_q <= wtr_q - 1'b1;
      if (cur_load) begin
        cur_v_q    <= 1'b1;
        cur_wr_q   <= cmd_i.wr;
        cur_id_q   <= cmd_i.id;
        cur_ba_q   <= nxt_ba;
        cur_row_q  <= nxt_row;
        cur_beat_q <= cmd_i.addr[OF_W-1 -: BEAT_W];
        cur_left_q <= (LEN_W+1)'(cmd_i.len) + 1'b1;
      end
      if (is_col) begin
        ccd_q      <= CW'(CCD - 1);
        if (op == DC_RD) rtw_q <= CW'(RTW - 1);
        else             wtr_q <= CW'(WTR - 1);
        cur_beat_q <= cur_beat_q + BEAT_W'(nb);
        cur_left_q <= cur_left_q - (LEN_W+1)'(nb);
        if (last_op) cur_v_q <= 1'b0;
      end
    end
  end

  // ---------------- write data: buffer and delay line ----------------
  logic [1:0] need;
  assign need     = nb;
  assign wd_pop_o = cur_v_q && cur_wr_q && !is_col && (wb_cnt_q < need) && !wd_empty_i;

  logic                wl_v_q  [DWR];
  logic [WPC-1:0]      wl_d_q  [DWR];
  logic [WPC/8-1:0]    wl_m_q  [DWR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_cnt_q <= '0;
      for (int k = 0; k < int'(DWR); k++) begin
        wl_v_q[k] <= 1'b0;
        wl_d_q[k] <= '0;
        wl_m_q[k] <= '0;
      end
      wbuf_q[0] <= '0;
      wbuf_q[1] <= '0;
    end else begin
      if (wd_pop_o) begin
        wbuf_q[wb_cnt_q[0]] <= wd_i;
        wb_cnt_q <= wb_cnt_q + 1'b1;
      end
      for (int k = 0; k < int'(DWR); k++) begin
        if (k + 1 < int'(DWR)) begin
          wl_v_q[k] <= wl_v_q[k+1];
          wl_d_q[k] <= wl_d_q[k+1];
          wl_m_q[k] <= wl_m_q[k+1];
        end else begin
          wl_v_q[k] <= 1'b0;
        end
      end
      if (is_col && op == DC_WR) begin
        wb_cnt_q <= '0;
        for (int i = 0; i < int'(NCLK); i++) begin
          wl_v_q[T_WL + i] <= 1'b1;
          wl_d_q[T_WL + i] <= wbuf_q[i / WPB].data[(i % WPB)*WPC +: WPC];
          wl_m_q[T_WL + i] <= ((i / WPB) < int'(nb)) ? ~wbuf_q[i / WPB].strb[(i % WPB)*(WPC/8) +: WPC/8] : '1;
        end
      end
    end
  end

  assign dq_o    = wl_d_q[0];
  assign dm_o    = wl_m_q[0];
  assign dq_oe_o = wl_v_q[0];

  // ---------------- read data: capture line, metadata, assembly ----------------
  logic          cap_q [DRD];
  rd_meta_t      meta_q [MQ];
  logic [1:0]    mwp_q, mrp_q;
  logic [2:0]    mcnt_q;
  logic [$clog2(NCLK)-1:0] word_q;
  logic [DATA_W-WPC-1:0] asm_q;   // the older words of the beat being assembled
  logic          push_r, push_b, beat_done;
  logic [ID_W-1:0] bid_q [4];
  logic [1:0]    bwp_q, brp_q;
  rd_meta_t      mh;
  int unsigned   beat_of_word;

  assign meta_full = (mcnt_q == 3'(MQ));
  assign mh        = meta_q[mrp_q];

  always_comb begin
    beat_of_word = int'(word_q) / WPB;
    beat_done = cap_q[0] && ((int'(word_q) % WPB) == WPB - 1);
    push_r    = beat_done && (beat_of_word < int'(mh.nb));
    push_b    = !push_r && (b_pend_q != 0);
    rs_push_o = push_r || push_b;
    rs_o.is_b = !push_r;
    rs_o.id   = push_r ? mh.id : bid_q[brp_q];
    rs_o.data = {dq_i, asm_q};
    rs_o.last = push_r ? (mh.last && beat_of_word == int'(mh.nb) - 1) : 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(DRD); k++) cap_q[k] <= 1'b0;
      for (int k = 0; k < int'(MQ); k++) meta_q[k] <= '0;
      for (int k = 0; k < 4; k++) bid_q[k] <= '0;
      mwp_q <= '0; mrp_q <= '0; mcnt_q <= '0;
      bwp_q <= '0; brp_q <= '0; b_pend_q <= '0;
      word_q <= '0; asm_q <= '0; rd_infl_q <= '0;
    end else begin
      for (int k = 0; k < int'(DRD); k++) cap_q[k] <= (k + 1 < int'(DRD)) ? cap_q[k+1] : 1'b0;
      if (is_col && op == DC_RD)
        for (int i = 0; i < int'(NCLK); i++) cap_q[T_CL + i] <= 1'b1;
      // metadata queue of column reads in flight
      if (is_col && op == DC_RD) begin
        meta_q[mwp_q] <= '{id: cur_id_q, nb: nb, last: last_op};
        mwp_q <= mwp_q + 1'b1;
      end
      if (cap_q[0]) begin
        asm_q  <= {dq_i, asm_q[DATA_W-WPC-1:WPC]};
        word_q <= (int'(word_q) == NCLK - 1) ? '0 : word_q + 1'b1;
        if (int'(word_q) == NCLK - 1) mrp_q <= mrp_q + 1'b1;
      end
      mcnt_q <= mcnt_q + 3'(is_col && op == DC_RD) - 3'(cap_q[0] && int'(word_q) == NCLK - 1);
      rd_infl_q <= rd_infl_q + ((is_col && op == DC_RD) ? $bits(rd_infl_q)'(nb) : '0)
                             - $bits(rd_infl_q)'(push_r);
      // write responses: posted once the last WR of a burst is on the bus
      if (is_col && op == DC_WR && last_op) begin
        bid_q[bwp_q] <= cur_id_q;
        bwp_q <= bwp_q + 1'b1;
      end
      if (push_b) brp_q <= brp_q + 1'b1;
      b_pend_q <= b_pend_q + 3'(is_col && op == DC_WR && last_op) - 3'(push_b);
    end
  end

  assign ctrl_idle = !cur_v_q && cmd_empty_i && (rd_infl_q == 0) && (b_pend_q == 0) && !wl_v_q[0];

  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) m_cmd_v |-> op == DC_NOP);
endmodule
