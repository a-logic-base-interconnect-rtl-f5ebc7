// tb_vc_axi_if: checks the vault controller's AXI front end: AW and AR
// requested together are taken in round-robin turns into the command queue
// with the right {wr, id, addr, len}; nothing is taken while the queue is
// full; W beats go to the write-data FIFO unless it is full; response-FIFO
// entries appear on R or B by their tag and are popped on the handshake.
module tb_vc_axi_if;
  import smc_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_req_t req; axi_rsp_t rsp;
  logic cmd_push, cmd_full, wd_push, wd_full, rs_pop, rs_empty;
  vc_cmd_t cmd; vc_wdata_t wd; vc_resp_t rs;
  int checks = 0, failures = 0;

  vc_axi_if dut (.clk, .rst_n, .req_i(req), .rsp_o(rsp), .cmd_push_o(cmd_push), .cmd_o(cmd),
    .cmd_full_i(cmd_full), .wd_push_o(wd_push), .wd_o(wd), .wd_full_i(wd_full),
    .rs_pop_o(rs_pop), .rs_i(rs), .rs_empty_i(rs_empty));

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

  initial begin
    int nw = 0, nr = 0, last = -1, alternations = 0;
    req = '0; cmd_full = 0; wd_full = 0; rs_empty = 1; rs = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    req.aw_valid = 1; req.aw.id = 8'h31; req.aw.addr = 32'h1000; req.aw.len = 8'd3;
    req.ar_valid = 1; req.ar.id = 8'h42; req.ar.addr = 32'h2000; req.ar.len = 8'd7;
    for (int i = 0; i < 20; i++) begin
      #1;
      chk(cmd_push && (rsp.aw_ready ^ rsp.ar_ready), "one of AW/AR taken");
      if (rsp.aw_ready) begin
        chk(cmd.wr && cmd.id == 8'h31 && cmd.addr == 32'h1000 && cmd.len == 3, "write command fields");
        nw++; if (last == 1) alternations++; last = 0;
      end else begin
        chk(!cmd.wr && cmd.id == 8'h42 && cmd.addr == 32'h2000 && cmd.len == 7, "read command fields");
        nr++; if (last == 0) alternations++; last = 1;
      end
      @(posedge clk); #1;
    end
    chk(nw == 10 && nr == 10 && alternations == 19, "AW and AR alternate");
    cmd_full = 1; #1;
    chk(!cmd_push && !rsp.aw_ready && !rsp.ar_ready, "held while CMDQ full");
    @(posedge clk); #1;
    cmd_full = 0; req.aw_valid = 0; #1;
    chk(rsp.ar_ready && cmd_push && !cmd.wr, "AR alone");
    req.ar_valid = 0;
    // W path
    req.w_valid = 1; req.w.data = {8{32'hdeadbeef}}; req.w.strb = 32'h0000ffff; #1;
    chk(wd_push && rsp.w_ready && wd.data == req.w.data && wd.strb == req.w.strb, "W to WData FIFO");
    wd_full = 1; #1;
    chk(!wd_push && !rsp.w_ready, "W held while FIFO full");
    req.w_valid = 0; wd_full = 0;
    // response path
    rs_empty = 0; rs.is_b = 0; rs.id = 8'h17; rs.data = {8{32'h12345678}}; rs.last = 1;
    req.r_ready = 0; req.b_ready = 1; #1;
    chk(rsp.r_valid && !rsp.b_valid && rsp.r.id == 8'h17 && rsp.r.last && rsp.r.data == rs.data, "R entry");
    chk(!rs_pop, "no pop without R ready");
    req.r_ready = 1; #1;
    chk(rs_pop, "pop on R handshake");
    rs.is_b = 1; rs.id = 8'h29; req.b_ready = 0; #1;
    chk(rsp.b_valid && !rsp.r_valid && rsp.b.id == 8'h29 && !rs_pop, "B entry");
    req.b_ready = 1; #1;
    chk(rs_pop, "pop on B handshake");
    rs_empty = 1; #1;
    chk(!rsp.b_valid && !rsp.r_valid && !rs_pop, "empty FIFO offers nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
