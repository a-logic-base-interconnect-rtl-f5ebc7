// dram_model: behavioural model of the DDR DRAM dies of one vault (not
// synthesizable; testbench use only).
//
// Commands are sampled from the pins at each rising clock edge. Storage is a
// sparse array of 32-bit columns per {bank, row, column}; a row has 64
// columns and bursts of BL columns wrap inside the row. Each DRAM clock
// carries two columns (both DDR edges), low half first. Read data appears
// T_CL clocks after the RD, write data is taken T_WL clocks after the WR,
// honouring the byte mask. The model checks the timing rules the
// controller must obey (tRCD, tRP, tRAS, tWR, tCCD, tRFC, commands to closed
// or open banks, CKE, write data present) and counts every violation and
// every command type. Unwritten columns read as zero.
module dram_model
  import smc_pkg::*;
#(
  parameter int T_RCD = 18,
  parameter int T_RP  = 18,
  parameter int T_RAS = 35,
  parameter int T_WR  = 19,
  parameter int T_CL  = 18,
  parameter int T_CCD = 7,
  parameter int T_WL  = 1,
  parameter int T_RFC = 138,
  parameter int BL    = 16
) (
  input  logic                clk,
  input  dram_cmd_t           cmd_i,
  input  logic [2*DQ_W-1:0]   dq_i,
  input  logic [2*DQ_W/8-1:0] dm_i,
  input  logic                dq_oe_i,
  output logic [2*DQ_W-1:0]   dq_o,
  output int                  violations,
  output int                  n_act,
  output int                  n_rd,
  output int                  n_wr,
  output int                  n_pre,
  output int                  n_ref,
  output int                  n_mrs,
  output int                  n_ap,
  output int                  n_pd_cycles
);
  localparam int NCLK = BL / 2;
  localparam int RING = 128;

  logic [31:0] mem [int unsigned];
  longint now = 0;
  bit     open_q [NBANK];
  int     row_q  [NBANK];
  longint t_act [NBANK], t_ready [NBANK], t_pre_ok [NBANK];
  longint t_last_col = -1000;
  bit     rd_v [RING];
  int unsigned rd_key [RING];
  bit     wr_v [RING];
  int unsigned wr_key [RING];

  function automatic int unsigned key(int b, int r, int c);
    return (32'(b) << 20) | (32'(r) << 6) | 32'(c & 63);
  endfunction

  function automatic longint lmax(longint a, longint b);
    return a > b ? a : b;
  endfunction

  initial begin
    violations = 0; n_act = 0; n_rd = 0; n_wr = 0; n_pre = 0; n_ref = 0; n_mrs = 0; n_ap = 0;
    n_pd_cycles = 0;
    dq_o = '0;
    for (int b = 0; b < int'(NBANK); b++) begin
      open_q[b] = 0; row_q[b] = 0; t_act[b] = -1000; t_ready[b] = 0; t_pre_ok[b] = 0;
    end
    for (int i = 0; i < RING; i++) begin rd_v[i] = 0; wr_v[i] = 0; rd_key[i] = 0; wr_key[i] = 0; end
  end

  task automatic viol(string what);
    violations++;
    if (violations <= 10) $display("dram_model %m: violation at clock %0d: %s", now, what);
  endtask

  always @(posedge clk) begin
    int slot, b, c, r;
    dram_op_e op;
    now++;
    slot = int'(now % RING);
    // write data due now
    if (wr_v[slot]) begin
      wr_v[slot] = 0;
      if (!dq_oe_i) viol("write data not driven");
      for (int h = 0; h < 2; h++) begin
        logic [31:0] old, nw;
        int unsigned k;
        k = wr_key[slot] + 32'(h);
        old = mem.exists(k) ? mem[k] : 32'h0;
        nw  = dq_i[h*32 +: 32];
        for (int by = 0; by < 4; by++)
          if (dm_i[h*4 + by]) nw[by*8 +: 8] = old[by*8 +: 8];
        mem[k] = nw;
      end
    end
    // read data due now (visible during the next clock)
    if (rd_v[slot]) begin
      rd_v[slot] = 0;
      dq_o <= {(mem.exists(rd_key[slot] + 1) ? mem[rd_key[slot] + 1] : 32'h0),
               (mem.exists(rd_key[slot])     ? mem[rd_key[slot]]     : 32'h0)};
    end
    if (!cmd_i.cke) n_pd_cycles++;
    op = dram_decode(cmd_i);
    b  = int'(cmd_i.ba);
    unique case (op)
      DC_ACT: begin
        n_act++;
        if (open_q[b]) viol("ACT to an open bank");
        if (now < t_ready[b]) viol("ACT before tRP/tRFC");
        open_q[b] = 1; row_q[b] = int'(cmd_i.a); t_act[b] = now;
        t_pre_ok[b] = now + T_RAS;
      end
      DC_RD, DC_WR: begin
        c = int'(cmd_i.a[COL_W-1:0]);
        r = row_q[b];
        if (!open_q[b]) viol("column command to a closed bank");
        if (now < t_act[b] + T_RCD) viol("column command before tRCD");
        if (now < t_last_col + T_CCD || now < t_last_col + NCLK) viol($sformatf("column spacing (tCCD/burst): %0d after the previous", now - t_last_col));
        t_last_col = now;
        if (op == DC_RD) begin
          n_rd++;
          t_pre_ok[b] = lmax(t_pre_ok[b], now + NCLK);
          for (int i = 0; i < NCLK; i++) begin
            int s;
            s = int'((now + T_CL - 1 + i) % RING);
            rd_v[s] = 1;
            rd_key[s] = key(b, r, (c + 2 * i) & 63);
          end
        end else begin
          n_wr++;
          t_pre_ok[b] = lmax(t_pre_ok[b], now + T_WL + NCLK + T_WR);
          for (int i = 0; i < NCLK; i++) begin
            int s;
            s = int'((now + T_WL + i) % RING);
            wr_v[s] = 1;
            wr_key[s] = key(b, r, (c + 2 * i) & 63);
          end
        end
        if (cmd_i.a[10]) begin
          n_ap++;
          open_q[b] = 0;
          t_ready[b] = t_pre_ok[b] + T_RP;
        end
      end
      DC_PRE: begin
        n_pre++;
        for (int k = 0; k < int'(NBANK); k++) begin
          if ((cmd_i.a[10] || k == b) && open_q[k]) begin
            if (now < t_pre_ok[k]) viol("PRE before tRAS/tWR/read end");
            open_q[k] = 0;
            t_ready[k] = now + T_RP;
          end
        end
      end
      DC_REF: begin
        n_ref++;
        for (int k = 0; k < int'(NBANK); k++) begin
          if (open_q[k] || now < t_ready[k]) viol("REF with a bank not precharged");
          t_ready[k] = now + T_RFC;
        end
      end
      DC_MRS: n_mrs++;
      default: ;
    endcase
  end
endmodule
