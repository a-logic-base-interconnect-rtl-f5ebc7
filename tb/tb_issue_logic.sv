// tb_issue_logic: checks the MoT admission limit of issue_logic.
// A random master offers AR and AW; a random responder accepts them and
// later retires reads (R with last) and writes (B). A reference counter
// kept in the testbench must match outstanding_o, the port must never
// exceed MOT, AR/AW must be blocked exactly when the limit is reached, and
// the limit must actually be hit.
module tb_issue_logic;
  import smc_pkg::*;
  localparam int MOT = 4;
  logic clk = 0, rst_n = 0;
  axi_req_t mreq, ireq;
  axi_rsp_t mrsp, irsp;
  logic [$clog2(MOT+1)-1:0] outst;
  logic stall;
  bit ar_hs, aw_hs;
  int checks = 0, failures = 0, ref_cnt = 0, stalls = 0, pend_r = 0, pend_b = 0;

  issue_logic #(.MOT(MOT)) dut (.clk, .rst_n, .mst_req_i(mreq), .mst_rsp_o(mrsp),
    .ic_req_o(ireq), .ic_rsp_i(irsp), .outstanding_o(outst), .stall_o(stall));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mreq = '0; irsp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      #2; // drive inputs away from the edge
      mreq = '0;
      irsp = '0;
      mreq.ar_valid = ($urandom % 3) != 0;
      mreq.aw_valid = ($urandom % 3) != 0;
      mreq.r_ready  = 1'b1;
      mreq.b_ready  = 1'b1;
      irsp.ar_ready = ($urandom % 4) != 0;
      irsp.aw_ready = ($urandom % 4) != 0;
      irsp.r_valid  = (pend_r > 0) && ($urandom % 5 == 0);
      irsp.r.last   = ($urandom % 2) == 0;
      irsp.b_valid  = (pend_b > 0) && ($urandom % 5 == 0);
      #1;
      chk(int'(outst) == ref_cnt, "outstanding count");
      chk(ref_cnt <= MOT, "never above MoT");
      chk(!(ireq.ar_valid) || ref_cnt < MOT, "AR passed at limit");
      chk(!(ireq.ar_valid && ireq.aw_valid) || ref_cnt + 2 <= MOT, "two admitted with one slot");
      chk(!mreq.ar_valid || (ireq.ar_valid == (ref_cnt < MOT)), "AR passes below limit");
      if (stall) stalls++;
      ar_hs = ireq.ar_valid && irsp.ar_ready;
      aw_hs = ireq.aw_valid && irsp.aw_ready;
      chk(ar_hs == (mreq.ar_valid && mrsp.ar_ready), "AR handshake seen alike on both sides");
      @(posedge clk);
      ref_cnt += int'(ar_hs) + int'(aw_hs) - int'(irsp.r_valid && irsp.r.last) - int'(irsp.b_valid);
      pend_r += int'(ar_hs) - int'(irsp.r_valid && irsp.r.last);
      pend_b += int'(aw_hs) - int'(irsp.b_valid);
    end
    chk(stalls > 0, "MoT limit reached at least once");
    $display("issue_logic: %0d stall cycles", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
