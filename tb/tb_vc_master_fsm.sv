// tb_vc_master_fsm: the DRAM-side master FSM alone, fed from testbench
// queues in its own clock domain and connected to the behavioural DRAM
// model. Checks: exact unloaded read timing (first beat pushed
// 1 + tRCD + 1 + CL + 3 clocks after the command is taken), write data and
// byte masks reach the DRAM (partial-strobe write then read back), a burst
// of 8 beats comes back as 8 beats with RLAST on the last, one B per write,
// closed page uses auto-precharge, open page keeps the row (no second ACT
// for a row hit), and the DRAM model sees no timing violation.
module tb_vc_master_fsm;
  import smc_pkg::*;
  logic clk = 0, rst_n = 0, open_page = 0;
  vc_cmd_t cmd; logic cmd_empty, cmd_pop;
  vc_wdata_t wd; logic wd_empty, wd_pop;
  logic rs_push; vc_resp_t rs;
  dram_cmd_t dcmd;
  logic [2*DQ_W-1:0] dq_o, dq_i;
  logic [2*DQ_W/8-1:0] dm;
  logic dq_oe, init_done, ev_early, ev_miss, ev_ref, ev_pd;
  int viol, n_act, n_rd, n_wr, n_pre, n_ref, n_mrs, n_ap, n_pd;
  vc_cmd_t   cq [$];
  vc_wdata_t wq [$];
  vc_resp_t  rq [$];
  longint cyc = 0, t_pop = 0, t_push [$];
  int checks = 0, failures = 0;

  vc_master_fsm dut (.clk, .rst_n, .open_page_i(open_page),
    .cmd_i(cmd), .cmd_empty_i(cmd_empty), .cmd_pop_o(cmd_pop),
    .wd_i(wd), .wd_empty_i(wd_empty), .wd_pop_o(wd_pop),
    .rs_push_o(rs_push), .rs_o(rs), .rs_level_i(5'(rq.size())),
    .dram_cmd_o(dcmd), .dq_o, .dm_o(dm), .dq_oe_o(dq_oe), .dq_i,
    .init_done_o(init_done), .ev_early_o(ev_early), .ev_miss_pre_o(ev_miss), .ev_ref_o(ev_ref), .ev_pd_o(ev_pd));
  dram_model u_dram (.clk, .cmd_i(dcmd), .dq_i(dq_o), .dm_i(dm), .dq_oe_i(dq_oe), .dq_o(dq_i),
    .violations(viol), .n_act, .n_rd, .n_wr, .n_pre, .n_ref, .n_mrs, .n_ap, .n_pd_cycles(n_pd));

  always #4 clk = ~clk;
  assign cmd_empty = (cq.size() == 0);
  assign cmd       = cmd_empty ? '0 : cq[0];
  assign wd_empty  = (wq.size() == 0);
  assign wd        = wd_empty ? '0 : wq[0];
  // handshakes are captured at the rising edge and applied to the queues at
  // the falling edge, so the queue heads never change at a rising edge
  logic p_cmd = 0, p_wd = 0, p_rs = 0;
  vc_resp_t p_rsv;
  always @(posedge clk) begin
    cyc++;
    p_cmd <= cmd_pop && !cmd_empty;
    p_wd  <= wd_pop && !wd_empty;
    p_rs  <= rs_push && rst_n;
    p_rsv <= rs;
  end
  always @(negedge clk) begin
    if (p_cmd) begin void'(cq.pop_front()); t_pop = cyc; end
    if (p_wd) void'(wq.pop_front());
    if (p_rs) begin rq.push_back(p_rsv); t_push.push_back(cyc); end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vc_cmd_t mk(bit w, int id, int bank, int row, int beat, int len);
    vc_cmd_t c;
    c.wr = w; c.id = 8'(id); c.len = 8'(len - 1);
    c.addr = (32'(row) << 15) | (32'(bank) << 12) | (32'(beat) << 5);
    return c;
  endfunction

  initial begin
    logic [DATA_W-1:0] d [8];
    vc_wdata_t x;
    vc_resp_t r;
    int acts;
    #20 rst_n = 1;
    wait (init_done);
    repeat (5) @(posedge clk);
    // ---- 1. write 8 beats to bank 2 row 5 (closed page) ----
    for (int i = 0; i < 8; i++) begin
      d[i] = {8{$urandom}};
      x.data = d[i]; x.strb = '1;
      wq.push_back(x);
    end
    @(negedge clk) cq.push_back(mk(1, 7, 2, 5, 0, 8));
    wait (rq.size() == 1);
    r = rq.pop_front(); void'(t_push.pop_front());
    chk(r.is_b && r.id == 8'd7, "one B for the write");
    repeat (60) @(posedge clk);
    // ---- 2. unloaded read of one beat: exact timing ----
    @(negedge clk) cq.push_back(mk(0, 3, 2, 5, 3, 1));
    wait (rq.size() == 1);
    r = rq.pop_front();
    chk(!r.is_b && r.id == 8'd3 && r.last && r.data == d[3], "single beat read data");
    chk(t_push[0] - t_pop == 1 + 18 + 1 + 18 + 3,
        $sformatf("unloaded read timing %0d clocks", t_push[0] - t_pop));
    void'(t_push.pop_front());
    repeat (60) @(posedge clk);
    // ---- 3. partial-strobe write of beat 1, then read the burst of 8 ----
    x.data = '1; x.strb = 32'h0000_00f0;
    wq.push_back(x);
    @(negedge clk) cq.push_back(mk(1, 9, 2, 5, 1, 1));
    d[1][32 +: 32] = '1;
    @(negedge clk) cq.push_back(mk(0, 4, 2, 5, 0, 8));
    wait (rq.size() == 9);
    r = rq.pop_front();
    chk(r.is_b && r.id == 8'd9, "B for the partial write");
    for (int i = 0; i < 8; i++) begin
      r = rq.pop_front();
      chk(!r.is_b && r.id == 8'd4 && r.data == d[i] && r.last == (i == 7), $sformatf("burst beat %0d", i));
    end
    chk(n_ap >= 3, "closed page used auto-precharge");
    t_push.delete();
    // ---- 4. open page: two reads of one row need one ACT ----
    open_page = 1;
    repeat (60) @(posedge clk);
    acts = n_act;
    @(negedge clk) begin cq.push_back(mk(0, 1, 6, 9, 0, 2)); cq.push_back(mk(0, 2, 6, 9, 2, 2)); end
    wait (rq.size() == 4);
    chk(n_act == acts + 1, "row hit needs no second ACT");
    // ---- 5. open page row miss: PRE then ACT ----
    @(negedge clk) cq.push_back(mk(0, 5, 6, 10, 0, 1));
    wait (rq.size() == 5);
    chk(n_act == acts + 2 && ev_miss == 0, "row miss reopened");
    repeat (40) @(posedge clk);
    chk(viol == 0, $sformatf("DRAM timing violations %0d", viol));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
