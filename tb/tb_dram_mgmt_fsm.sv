// tb_dram_mgmt_fsm: with shortened timings, checks the power-up sequence
// (CKE low for T_INIT, then PRE-all, REF, REF, MRS with tRP/tRFC spacing,
// bus held until done), periodic refresh (taken every T_REFI, precharge-all
// only once the open bank may be precharged, REF only after all banks are
// idle), and power-down entry after PD_IDLE idle clocks and exit on work.
// The testbench models the banks' idle/open state itself.
module tb_dram_mgmt_fsm;
  import smc_pkg::*;
  localparam int T_INIT = 10, T_REFI = 400, T_RFC = 20, T_MRD = 2, T_XP = 2, PD_IDLE = 16, T_RP = 4;
  logic clk = 0, rst_n = 0;
  logic ctrl_idle, hold, cmd_v, prea, cke, init_done, ref_ev, pd;
  logic [NBANK-1:0] b_idle, b_preok, b_open;
  dram_cmd_t cmd;
  int checks = 0, failures = 0;
  longint cyc = 0;
  dram_op_e seq [$];
  longint   tseq [$];
  int rp_left = 0;

  dram_mgmt_fsm #(.T_INIT(T_INIT), .T_REFI(T_REFI), .T_RFC(T_RFC), .T_MRD(T_MRD), .T_XP(T_XP),
                  .PD_IDLE(PD_IDLE), .T_RP(T_RP)) dut (
    .clk, .rst_n, .ctrl_idle_i(ctrl_idle), .bank_idle_i(b_idle), .bank_pre_ok_i(b_preok),
    .bank_open_i(b_open), .hold_o(hold), .cmd_valid_o(cmd_v), .cmd_o(cmd), .prea_o(prea),
    .cke_o(cke), .init_done_o(init_done), .ref_o(ref_ev), .pd_o(pd));

  always #5 clk = ~clk;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  // command log and bank model
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cmd_v) begin
      seq.push_back(dram_decode(cmd)); tseq.push_back(cyc);
      chk(cmd.cke, "command with CKE high");
      if (dram_decode(cmd) == DC_PRE) chk(cmd.a[10], "precharge-all");
      if (dram_decode(cmd) == DC_REF) chk(b_idle == '1, "REF only with all banks idle");
    end
    if (prea && b_open != 0) begin
      b_open <= '0; b_preok <= '0; b_idle <= '0; rp_left = T_RP;
    end else if (rp_left > 0) begin
      rp_left--;
      if (rp_left == 0) b_idle <= '1;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_ref0, t_ref [$];
    ctrl_idle = 0; b_idle = '1; b_preok = '0; b_open = '0;
    @(posedge clk); #1 rst_n = 1;
    // ---- power-up ----
    for (int i = 0; i < T_INIT - 1; i++) begin
      chk(!cke && hold, "CKE low and bus held during init wait");
      @(posedge clk); #1;
    end
    wait (init_done); #1;
    chk(seq.size() == 4, "four init commands");
    if (seq.size() == 4) begin
      chk(seq[0] == DC_PRE && seq[1] == DC_REF && seq[2] == DC_REF && seq[3] == DC_MRS, "init order PRE REF REF MRS");
      chk(tseq[1] - tseq[0] >= T_RP, "tRP before first REF");
      chk(tseq[2] - tseq[1] >= T_RFC && tseq[3] - tseq[2] >= T_RFC, "tRFC after REF");
    end
    chk(!hold && cke, "bus released after init");
    // ---- refresh with an open bank that cannot be precharged yet ----
    @(posedge clk); #1;
    b_open = 8'h08; b_idle = 8'hf7; b_preok = '0;
    seq.delete(); tseq.delete();
    wait (hold); #1;
    repeat (10) begin
      chk(seq.size() == 0, "no PRE-all before the open bank allows it");
      @(posedge clk); #1;
    end
    b_preok = 8'h08;
    wait (seq.size() == 2);
    chk(seq[0] == DC_PRE && seq[1] == DC_REF, "PRE-all then REF");
    chk(tseq[1] - tseq[0] >= T_RP, "REF after tRP");
    wait (!hold); #1;
    chk(tseq[1] + T_RFC <= cyc + 1, "bus held for tRFC");
    // ---- refresh interval ----
    seq.delete(); tseq.delete();
    ctrl_idle = 0;
    wait (seq.size() == 2); #1;
    chk(seq[0] == DC_REF && seq[1] == DC_REF, "refresh without open banks needs no PRE-all");
    chk(tseq[1] - tseq[0] >= T_REFI - 2 && tseq[1] - tseq[0] <= T_REFI + T_RFC + 4,
        $sformatf("refresh interval %0d", tseq[1] - tseq[0]));
    // ---- power-down ----
    @(posedge clk); #1;
    wait (!hold); #1;
    ctrl_idle = 1;
    begin
      int n = 0;
      while (cke && n < 200) begin @(posedge clk); #1; n++; end
      chk(n >= PD_IDLE && n <= PD_IDLE + 2, $sformatf("power-down after %0d idle clocks", n));
    end
    chk(pd && hold, "bus held in power-down");
    repeat (5) @(posedge clk); #1;
    ctrl_idle = 0;
    @(posedge clk); #1;
    chk(cke, "CKE up on new work");
    begin
      int n = 0;
      while (hold && n < 50) begin @(posedge clk); #1; n++; end
      chk(n + 1 >= T_XP && n <= T_XP + 1, $sformatf("exit after tXP (%0d)", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
