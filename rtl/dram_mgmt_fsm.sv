// dram_mgmt_fsm: power-up, auto-refresh and power-down control of one vault.
//
// Power-up: CKE is held low for T_INIT clocks, then the FSM precharges all
// banks, issues two auto-refreshes (tRFC each) and loads the mode register
// (tMRD), and raises init_done_o. Refresh: a counter requests a refresh every
// T_REFI clocks. The FSM then takes the command bus (hold_o), waits until
// every bank is idle or may be precharged, precharges all banks if any is
// open, waits for them to be idle, issues REF and waits tRFC. Power-down:
// after PD_IDLE clocks in which the controller has no work and all banks
// are idle, CKE drops; it rises again when work arrives or a refresh falls
// due, and the bus is released T_XP clocks later. While hold_o is high the
// master FSM issues nothing. The sequences follow DDR SDRAM practice; the
// time constants are this design's (the source gives none for them).
module dram_mgmt_fsm
  import smc_pkg::*;
#(
  parameter int unsigned NBANK_P = NBANK,
  parameter int unsigned T_INIT  = 200,
  parameter int unsigned T_REFI  = 9750,
  parameter int unsigned T_RFC   = 138,
  parameter int unsigned T_MRD   = 2,
  parameter int unsigned T_XP    = 2,
  parameter int unsigned T_RP    = 18,
  parameter int unsigned PD_IDLE = 64,
  parameter int unsigned T_CL    = 18,
  parameter int unsigned BL      = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ctrl_idle_i,
  input  logic [NBANK_P-1:0] bank_idle_i,
  input  logic [NBANK_P-1:0] bank_pre_ok_i,
  input  logic [NBANK_P-1:0] bank_open_i,
  output logic               hold_o,
  output logic               cmd_valid_o,
  output dram_cmd_t          cmd_o,
  output logic               prea_o,      // precharge-all issued this cycle
  output logic               cke_o,
  output logic               init_done_o,
  output logic               ref_o,       // refresh issued this cycle
  output logic               pd_o         // in power-down
);
  typedef enum logic [3:0] {
    M_INIT_WAIT, M_INIT_PREA, M_INIT_REF1, M_INIT_REF2, M_INIT_MRS,
    M_RUN, M_REF_DRAIN, M_REF_WAIT_IDLE, M_REF_WAIT, M_PD, M_PD_EXIT
  } mgmt_state_e;

  localparam int unsigned CW = 16;

  mgmt_state_e  st_q;
  logic [CW-1:0] cnt_q, refi_q, idle_q;
  logic          ref_pend_q, init_done_q;
  logic          all_idle, all_drainable;
  dram_op_e      op;
  logic [DRAM_A_W-1:0] a;

  assign all_idle      = &bank_idle_i;
  assign all_drainable = &(bank_idle_i | bank_pre_ok_i);

  always_comb begin
    op = DC_NOP;
    a  = '0;
    unique case (st_q)
      M_INIT_PREA: if (cnt_q == 0) begin op = DC_PRE; a[10] = 1'b1; end
      M_INIT_REF1, M_INIT_REF2: if (cnt_q == 0 && all_idle) op = DC_REF;
      M_INIT_MRS:  if (cnt_q == 0) begin op = DC_MRS; a = DRAM_A_W'({BL[4:0], T_CL[4:0]}); end
      M_REF_DRAIN: if (all_drainable && |bank_open_i) begin op = DC_PRE; a[10] = 1'b1; end
      M_REF_WAIT_IDLE: if (all_idle) op = DC_REF;
      default: ;
    endcase
    cke_o       = !(st_q == M_INIT_WAIT || st_q == M_PD);
    cmd_valid_o = (op != DC_NOP);
    cmd_o       = dram_encode(op, '0, a, cke_o);
    prea_o      = (op == DC_PRE);
    ref_o       = (op == DC_REF);
    hold_o      = (st_q != M_RUN) || ref_pend_q;
    pd_o        = (st_q == M_PD);
    init_done_o = init_done_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= M_INIT_WAIT;
      cnt_q       <= CW'(T_INIT - 1);
      refi_q      <= CW'(T_REFI - 1);
      idle_q      <= '0;
      ref_pend_q  <= 1'b0;
      init_done_q <= 1'b0;
    end else begin
      if (cnt_q != 0) cnt_q <= cnt_q - 1'b1;
      if (init_done_q) begin
        if (refi_q == 0) begin
          refi_q     <= CW'(T_REFI - 1);
          ref_pend_q <= 1'b1;
        end else refi_q <= refi_q - 1'b1;
      end
      unique case (st_q)
        M_INIT_WAIT: if (cnt_q == 0) begin st_q <= M_INIT_PREA; cnt_q <= CW'(T_XP - 1); end
        M_INIT_PREA: if (op == DC_PRE) begin st_q <= M_INIT_REF1; cnt_q <= CW'(T_RP - 1); end
        M_INIT_REF1: if (op == DC_REF) begin st_q <= M_INIT_REF2; cnt_q <= CW'(T_RFC - 1); end
        M_INIT_REF2: if (op == DC_REF) begin st_q <= M_INIT_MRS;  cnt_q <= CW'(T_RFC - 1); end
        M_INIT_MRS:  if (op == DC_MRS) begin st_q <= M_REF_WAIT;  cnt_q <= CW'(T_MRD - 1); end
        M_RUN: begin
          if (ref_pend_q) st_q <= M_REF_DRAIN;
          else if (ctrl_idle_i && all_idle) begin
            if (idle_q == CW'(PD_IDLE - 1)) begin
              st_q   <= M_PD;
              idle_q <= '0;
            end else idle_q <= idle_q + 1'b1;
          end else idle_q <= '0;
        end
        M_REF_DRAIN: if (all_drainable) st_q <= M_REF_WAIT_IDLE;
        M_REF_WAIT_IDLE: if (op == DC_REF) begin
          st_q       <= M_REF_WAIT;
          cnt_q      <= CW'(T_RFC - 1);
          ref_pend_q <= 1'b0;
        end
        M_REF_WAIT: if (cnt_q == 0) begin
          st_q        <= M_RUN;
          init_done_q <= 1'b1;
        end
        M_PD: if (!ctrl_idle_i || ref_pend_q || refi_q == 0) begin
          st_q  <= M_PD_EXIT;
          cnt_q <= CW'(T_XP - 1);
        end
        M_PD_EXIT: if (cnt_q == 0) st_q <= M_RUN;
        default: st_q <= M_RUN;
      endcase
    end
  end
endmodule
