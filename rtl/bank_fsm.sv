// bank_fsm: state and timing tracker of one DRAM bank (the bank's
// read-write FSM).
//
// States: IDLE (precharged), OPEN (a row is active; column commands wait for
// tRCD), AUTOPRE (a read or write with auto-precharge was issued; the bank
// precharges itself as soon as tRAS, write recovery and read-to-precharge
// allow) and PRECHARGING (tRP). Down-counters hold the remaining time of
// each constraint. All times are counted in DRAM clocks from the cycle in
// which the controller decides a command; a counter loaded with N-1 allows
// the next command N cycles later. Write recovery counts from the command:
// write latency + BL/2 data clocks + tWR. Read-to-precharge is BL/2 clocks,
// as for DDR SDRAM. A precharge to an idle bank is ignored.
module bank_fsm
  import smc_pkg::*;
#(
  parameter int unsigned T_RCD = 18,
  parameter int unsigned T_RP  = 18,
  parameter int unsigned T_RAS = 35,
  parameter int unsigned T_WR  = 19,
  parameter int unsigned T_WL  = 1,
  parameter int unsigned BL    = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            act_i,
  input  logic            rd_i,
  input  logic            wr_i,
  input  logic            pre_i,
  input  logic            ap_i,     // with rd_i / wr_i: auto-precharge
  input  logic [RC_W-1:0] row_i,
  output logic            is_open_o,
  output logic [RC_W-1:0] open_row_o,
  output logic            act_ok_o,
  output logic            col_ok_o,
  output logic            pre_ok_o,
  output logic            idle_o
);
  typedef enum logic [1:0] {B_IDLE, B_OPEN, B_AUTOPRE, B_PRECHARGING} bank_state_e;
  localparam int unsigned CW = 8;

  bank_state_e       st_q;
  logic [RC_W-1:0]   row_q;
  logic [CW-1:0]     rcd_q, ras_q, wr_q, rtp_q, rp_q;
  logic              timers_done;

  function automatic logic [CW-1:0] dec(logic [CW-1:0] v);
    return (v == 0) ? v : v - 1'b1;
  endfunction

  assign timers_done = (ras_q == 0) && (wr_q == 0) && (rtp_q == 0);
  assign is_open_o   = (st_q == B_OPEN);
  assign open_row_o  = row_q;
  assign idle_o      = (st_q == B_IDLE) || (st_q == B_PRECHARGING && rp_q == 0);
  assign act_ok_o    = idle_o;
  assign col_ok_o    = (st_q == B_OPEN) && (rcd_q == 0);
  assign pre_ok_o    = (st_q == B_OPEN) && timers_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= B_IDLE;
      row_q <= '0;
      rcd_q <= '0;
      ras_q <= '0;
      wr_q  <= '0;
      rtp_q <= '0;
      rp_q  <= '0;
    end else begin
      rcd_q <= dec(rcd_q);
      ras_q <= dec(ras_q);
      wr_q  <= dec(wr_q);
      rtp_q <= dec(rtp_q);
      rp_q  <= dec(rp_q);
      unique case (st_q)
        B_IDLE: if (act_i) begin
          st_q  <= B_OPEN;
          row_q <= row_i;
          rcd_q <= CW'(T_RCD - 1);
          ras_q <= CW'(T_RAS - 1);
        end
        B_OPEN: begin
          if (rd_i) rtp_q <= CW'(BL / 2 - 1);
          if (wr_i) wr_q  <= CW'(T_WL + BL / 2 + T_WR - 1);
          if ((rd_i || wr_i) && ap_i) st_q <= B_AUTOPRE;
          else if (pre_i) begin
            st_q <= B_PRECHARGING;
            rp_q <= CW'(T_RP - 1);
          end
        end
        B_AUTOPRE: if (timers_done) begin
          st_q <= B_PRECHARGING;
          rp_q <= CW'(T_RP - 1);
        end
        B_PRECHARGING: if (rp_q == 0) begin
          if (act_i) begin
            st_q  <= B_OPEN;
            row_q <= row_i;
            rcd_q <= CW'(T_RCD - 1);
            ras_q <= CW'(T_RAS - 1);
          end else st_q <= B_IDLE;
        end
        default: st_q <= B_IDLE;
      endcase
    end
  end

  a_act_legal: assert property (@(posedge clk) disable iff (!rst_n) act_i |-> act_ok_o);
  a_col_legal: assert property (@(posedge clk) disable iff (!rst_n) (rd_i || wr_i) |-> col_ok_o);
endmodule
