// tb_bank_fsm: measures, in clocks, when the bank FSM allows each command
// and compares with the DRAM timing rules computed here from the
// parameters: column after tRCD, precharge after tRAS, after BL/2 following
// a read and after WL+BL/2+tWR following a write, activate tRP after a
// precharge, and auto-precharge finishing at the later of those limits
// plus tRP. Also checks the open-row bookkeeping.
module tb_bank_fsm;
  import smc_pkg::*;
  localparam int T_RCD = 18, T_RP = 18, T_RAS = 35, T_WR = 19, T_WL = 1, BL = 16;
  logic clk = 0, rst_n = 0;
  logic act, rd, wr, pre, ap;
  logic [RC_W-1:0] row;
  logic is_open, act_ok, col_ok, pre_ok, idle;
  logic [RC_W-1:0] open_row;
  int checks = 0, failures = 0;

  bank_fsm #(.T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_WR(T_WR), .T_WL(T_WL), .BL(BL)) dut (
    .clk, .rst_n, .act_i(act), .rd_i(rd), .wr_i(wr), .pre_i(pre), .ap_i(ap), .row_i(row),
    .is_open_o(is_open), .open_row_o(open_row), .act_ok_o(act_ok), .col_ok_o(col_ok),
    .pre_ok_o(pre_ok), .idle_o(idle));

  always #5 clk = ~clk;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // present a command for one clock; return to idle inputs
  task automatic issue(string c, logic a = 0, logic [RC_W-1:0] r = '0);
    act = (c == "ACT"); rd = (c == "RD"); wr = (c == "WR"); pre = (c == "PRE"); ap = a; row = r;
    @(posedge clk); #1;
    act = 0; rd = 0; wr = 0; pre = 0; ap = 0;
  endtask

  // clocks (counted from the command clock) until the named output is 1
  function automatic bit sel(string w);
    case (w)
      "col": return col_ok;
      "pre": return pre_ok;
      default: return act_ok;
    endcase
  endfunction
  task automatic wait_for(string w, output int n);
    n = 1;
    while (!sel(w) && n < 500) begin @(posedge clk); #1; n++; end
  endtask

  initial begin
    int n;
    act = 0; rd = 0; wr = 0; pre = 0; ap = 0; row = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk(idle && act_ok && !is_open, "idle after reset");
    // ---- ACT -> column: tRCD; ACT -> PRE: tRAS ----
    issue("ACT", 0, 14'h1234);
    chk(is_open && open_row == 14'h1234, "row opened");
    chk(!act_ok, "no ACT to an open bank");
    wait_for("col", n);
    chk(n == T_RCD, $sformatf("tRCD %0d (expected %0d)", n, T_RCD));
    chk(!pre_ok, "no PRE before tRAS");
    wait_for("pre", n);
    chk(n == T_RAS - T_RCD + 1 || n == T_RAS - T_RCD, "tRAS");
    // ---- RD -> PRE: BL/2 ----
    issue("RD");
    wait_for("pre", n);
    chk(n == BL / 2, $sformatf("read to precharge %0d", n));
    // ---- WR -> PRE: WL + BL/2 + tWR ----
    issue("WR");
    wait_for("pre", n);
    chk(n == T_WL + BL / 2 + T_WR, $sformatf("write recovery %0d", n));
    // ---- PRE -> ACT: tRP ----
    issue("PRE");
    chk(!is_open && !act_ok, "precharging");
    wait_for("act", n);
    chk(n == T_RP, $sformatf("tRP %0d", n));
    // ---- read with auto-precharge right after tRCD: bounded by tRAS ----
    issue("ACT", 0, 14'h0042);
    wait_for("col", n);
    issue("RD", 1);
    chk(!is_open && !col_ok, "auto-precharge closes the row to new columns");
    wait_for("act", n);
    chk(n == (T_RAS - T_RCD) + T_RP, $sformatf("RD+AP reopen %0d (expected %0d)", n, T_RAS - T_RCD + T_RP));
    // ---- write with auto-precharge late: bounded by write recovery ----
    issue("ACT", 0, 14'h0043);
    repeat (T_RAS) @(posedge clk);
    #0;
    issue("WR", 1);
    wait_for("act", n);
    chk(n == T_WL + BL / 2 + T_WR + T_RP, $sformatf("WR+AP reopen %0d", n));
    chk(open_row == 14'h0043, "row register keeps last row");
    // ---- precharge to an idle bank is ignored ----
    issue("PRE");
    chk(act_ok && idle, "PRE to idle bank ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
