// axi_traffic_master: self-checking AXI4 traffic source (testbench only).
//
// Phase 1 writes NWR bursts of random length (1..MAXLEN beats, never
// crossing a 256-byte row) with random data to random addresses of its own
// region (address bits [28:26] = MIDX), several writes outstanding. Phase 2
// reads NRD of those bursts back with up to 15 reads in flight (one ID each)
// and compares every beat with the data it wrote. With VAULT_ID set, a read
// takes the number of its vault under the default mapping (address bits
// [11:8]) as its ID, so reads sharing an ID go to one vault and return in
// order, and up to MAXRD reads may be in flight: enough to hit the MoT limit.
// With 32 vaults (VA_W = 5) the master keeps to the 16 vaults whose address
// bit 12 equals MIDX[0], so that the 16 IDs still name one vault each.
// MASKED clears the row bits, so in open page nearly every access hits an
// open row; each master keeps to two banks of its own so that masters
// never share data. Requests are spaced by a
// random 0..GAP idle cycles. Inputs are sampled PERIOD-2 time units after
// each rising edge and outputs change 1 unit after it, so there are no races
// with the design. Counts errors, beats, and the read latency in cycles.
module axi_traffic_master
  import smc_pkg::*;
#(
  parameter int MIDX   = 0,
  parameter int NWR    = 16,
  parameter int NRD    = 16,
  parameter int MAXLEN = 8,
  parameter int GAP    = 4,
  parameter int PERIOD = 10,
  parameter bit FIXED  = 0,    // 1: every burst is MAXLEN beats at the region base
  parameter bit FULL   = 0,    // 1: every burst is MAXLEN beats from a row start
  parameter bit VAULT_ID = 0,  // 1: read ID = vault (addr[11:8]), many reads per ID
  parameter int MAXRD  = 15,   // reads in flight when VAULT_ID = 1
  parameter int VA_W   = 4,    // vault field width; with 5, address bit 12 is MIDX[0]
  parameter bit MASKED = 0     // 1: row bits zero, banks {2*MIDX, 2*MIDX+1} only
) (
  input  logic     clk,
  input  logic     start,
  output axi_req_t req,
  input  axi_rsp_t rsp,
  output bit       done,
  output int       errors,
  output int       rd_beats,
  output int       wr_beats,
  output longint   lat_sum,
  output int       lat_max,
  output int       reads_done,
  output int       lat_min,
  output longint   t_first_ar,
  output longint   t_last_r
);
  typedef struct { logic [31:0] addr; int len; } burst_t;
  logic [DATA_W-1:0] gold [int unsigned];
  burst_t written [$];
  burst_t wq [$];
  int     w_beat = 0, w_pend_b = 0, w_issued = 0, b_got = 0;
  bit     w_data_phase = 0;
  burst_t cur_w;
  // reads
  typedef struct { logic [31:0] addr; int len; longint t0; } rd_t;
  rd_t    id_q [16][$];    // reads in flight per ID, oldest first
  int     id_beat [16];
  int     rd_inflight = 0;
  int     r_issued = 0;
  longint cyc = 0;
  int     gap_w = 0, gap_r = 0;
  bit     aw_hs, w_hs, b_hs, ar_hs, r_hs;
  axi_r_t r_s;

  function automatic burst_t new_burst();
    burst_t b;
    int beat;
    b.len = 1 + int'($urandom % MAXLEN);
    beat  = int'($urandom % (9 - b.len));
    b.addr = (32'(MIDX) << 26) | ({$urandom} & 32'h03ff_ff00) | 32'(beat << 5);
    if (FIXED) begin b.len = MAXLEN; b.addr = 32'(MIDX) << 26; end
    if (FULL) begin b.len = MAXLEN; b.addr[7:0] = '0; if (VA_W > 4) b.addr[12] = MIDX[0]; end
    if (MASKED) b.addr = {17'd0, 2'(MIDX), 1'($urandom), 4'($urandom), 8'd0};
    return b;
  endfunction

  initial begin
    req = '0; done = 0; errors = 0; rd_beats = 0; wr_beats = 0; lat_sum = 0; lat_max = 0; reads_done = 0; lat_min = 1 << 30; t_first_ar = -1; t_last_r = 0;
    for (int i = 0; i < NWR; i++) wq.push_back(new_burst());
    wait (start);
    forever begin
      @(posedge clk);
      cyc++;
      // ---- apply the handshakes sampled before this edge ----
      if (aw_hs) begin
        w_data_phase = 1; w_beat = 0; w_pend_b++;
        gap_w = int'($urandom % (GAP + 1));
      end
      if (w_hs) begin
        gold[(cur_w.addr >> 5) + w_beat] = req.w.data;
        wr_beats++;
        w_beat++;
        if (w_beat == cur_w.len) begin w_data_phase = 0; written.push_back(cur_w); void'(wq.pop_front()); end
      end
      if (b_hs) begin b_got++; w_pend_b--; end
      if (ar_hs) begin
        int id;
        id = int'(req.ar.id);
        if (id_q[id].size() == 0) id_beat[id] = 0;
        id_q[id].push_back('{addr: req.ar.addr, len: int'(req.ar.len) + 1, t0: cyc});
        if (t_first_ar < 0) t_first_ar = cyc;
        r_issued++; rd_inflight++;
        gap_r = int'($urandom % (GAP + 1));
      end
      if (r_hs) begin
        int id;
        logic [DATA_W-1:0] e;
        rd_t h;
        id = int'(r_s.id);
        if (id > 15 || id_q[id].size() == 0) begin
          errors++; $display("master %0d: R with unexpected id %0d", MIDX, id);
        end else begin
          h = id_q[id][0];
          e = gold[(h.addr >> 5) + id_beat[id]];
          if (r_s.data !== e) begin
            errors++;
            if (errors < 5) $display("master %0d: read data mismatch addr %h beat %0d", MIDX, h.addr, id_beat[id]);
          end
          if (r_s.last != (id_beat[id] == h.len - 1)) begin
            errors++; $display("master %0d: RLAST wrong", MIDX);
          end
          rd_beats++;
          id_beat[id]++;
          if (r_s.last) begin
            void'(id_q[id].pop_front()); id_beat[id] = 0; reads_done++; rd_inflight--;
            lat_sum += cyc - h.t0;
            if (int'(cyc - h.t0) > lat_max) lat_max = int'(cyc - h.t0);
            if (int'(cyc - h.t0) < lat_min) lat_min = int'(cyc - h.t0);
            t_last_r = cyc;
          end
        end
      end
      if (gap_w > 0) gap_w--;
      if (gap_r > 0) gap_r--;
      #1;
      // ---- drive ----
      req.b_ready = FULL || ($urandom % 4) != 0;
      req.r_ready = FULL || ($urandom % 8) != 0;
      req.aw_valid = !w_data_phase && wq.size() > 0 && gap_w == 0;
      if (req.aw_valid) begin
        cur_w = wq[0];
        req.aw.addr = cur_w.addr; req.aw.len = 8'(cur_w.len - 1); req.aw.id = 8'd15;
      end
      req.w_valid = w_data_phase && ($urandom % 6 != 0);
      req.w.data = {8{$urandom}};
      req.w.strb = '1;
      req.w.last = (w_beat == cur_w.len - 1);
      if (!(req.ar_valid && !ar_hs)) req.ar_valid = 0;   // an AR stays until accepted
      if (!req.ar_valid && wq.size() == 0 && w_pend_b == 0 && !w_data_phase && r_issued < NRD && gap_r == 0) begin
        if (VAULT_ID) begin
          if (rd_inflight + int'(ar_hs) < MAXRD) begin
            burst_t b;
            b = written[$urandom % written.size()];
            req.ar_valid = 1; req.ar.id = 8'(b.addr[11:8]); req.ar.addr = b.addr; req.ar.len = 8'(b.len - 1);
          end
        end else
          for (int i = 0; i < 15; i++) if (id_q[i].size() == 0 && !req.ar_valid && !(ar_hs && int'(req.ar.id) == i)) begin
            burst_t b;
            b = written[$urandom % written.size()];
            req.ar_valid = 1; req.ar.id = 8'(i); req.ar.addr = b.addr; req.ar.len = 8'(b.len - 1);
          end
      end
      done = (wq.size() == 0 && w_pend_b == 0 && r_issued == NRD && reads_done == NRD);
      // ---- sample just before the next edge ----
      #(PERIOD - 2);
      aw_hs = req.aw_valid && rsp.aw_ready;
      w_hs  = req.w_valid && rsp.w_ready;
      b_hs  = req.b_ready && rsp.b_valid;
      ar_hs = req.ar_valid && rsp.ar_ready;
      r_hs  = req.r_ready && rsp.r_valid;
      r_s   = rsp.r;
      if (b_hs && rsp.b.id != 8'd15) begin errors++; $display("master %0d: B id wrong", MIDX); end
    end
  end
endmodule
