// axi_mem_slave: behavioural AXI4 memory (testbench only) standing in for a
// vault port. Stores 256-bit beats by beat address, serves reads in order
// after LAT cycles with random gaps, accepts writes with random back-pressure
// and answers each with a B. Counts requests whose vault field (address
// bits [8 +: VA_W]) does not name this port. Same race-free timing as
// axi_traffic_master.
module axi_mem_slave
  import smc_pkg::*;
#(
  parameter int SIDX   = 0,
  parameter int VA_W   = 4,
  parameter int LAT    = 6,
  parameter int PERIOD = 10
) (
  input  logic     clk,
  input  axi_req_t req,
  output axi_rsp_t rsp,
  output int       misrouted,
  output int       served
);
  typedef struct { axi_ax_t ax; longint t; } rq_t;
  logic [DATA_W-1:0] mem [int unsigned];
  rq_t     rq [$];
  axi_ax_t wcur;
  bit      wact = 0;
  int      wbeat = 0, rbeat = 0;
  logic [ID_W-1:0] bq [$];
  longint  cyc = 0;
  bit      ar_hs, aw_hs, w_hs, r_hs, b_hs;
  axi_ax_t ar_s, aw_s;
  axi_w_t  w_s;

  initial begin
    rsp = '0; misrouted = 0; served = 0;
    forever begin
      @(posedge clk);
      cyc++;
      if (ar_hs) begin
        rq.push_back('{ax: ar_s, t: cyc});
        if (int'(ar_s.addr[8 +: VA_W]) != SIDX) misrouted++;
      end
      if (aw_hs) begin
        wcur = aw_s; wact = 1; wbeat = 0;
        if (int'(aw_s.addr[8 +: VA_W]) != SIDX) misrouted++;
      end
      if (w_hs) begin
        mem[(wcur.addr >> 5) + wbeat] = w_s.data;
        wbeat++;
        if (w_s.last) begin wact = 0; bq.push_back(wcur.id); served++; end
      end
      if (r_hs) begin
        rbeat++;
        if (rbeat == int'(rq[0].ax.len) + 1) begin rbeat = 0; void'(rq.pop_front()); served++; end
      end
      if (b_hs) void'(bq.pop_front());
      #1;
      rsp = '0;
      rsp.ar_ready = ($urandom % 3) != 0 && rq.size() < 8;
      rsp.aw_ready = !wact && ($urandom % 3) != 0;
      rsp.w_ready  = wact && ($urandom % 4) != 0;
      if (rq.size() > 0 && cyc - rq[0].t >= LAT && ($urandom % 5) != 0) begin
        int unsigned k;
        k = (rq[0].ax.addr >> 5) + rbeat;
        rsp.r_valid = 1;
        rsp.r.id    = rq[0].ax.id;
        rsp.r.data  = mem.exists(k) ? mem[k] : '0;
        rsp.r.last  = (rbeat == int'(rq[0].ax.len));
      end
      if (bq.size() > 0) begin rsp.b_valid = 1; rsp.b.id = bq[0]; end
      #(PERIOD - 2);
      ar_hs = req.ar_valid && rsp.ar_ready; ar_s = req.ar;
      aw_hs = req.aw_valid && rsp.aw_ready; aw_s = req.aw;
      w_hs  = req.w_valid && rsp.w_ready;   w_s  = req.w;
      r_hs  = rsp.r_valid && req.r_ready;
      b_hs  = rsp.b_valid && req.b_ready;
    end
  end
endmodule
