// smc_pkg: types and constants shared by the Smart Memory Cube logic base.
//
// The cube exposes AXI4 ports on its interconnect. Each AXI channel is a
// packed struct; a port is a request bundle (axi_req_t, master to slave) and a
// response bundle (axi_rsp_t, slave to master). Data beats are 256-bit flits,
// the width chosen for the interconnect to reach 256 GB/s at 1 GHz. IDs are
// 8 bits: masters use bits [3:0], the interconnect stores the master index in
// bits [7:4] so that responses find their way back. Only INCR bursts of full
// width beats are carried (no AxSIZE/AxBURST/RESP fields) -- a simplification
// of this implementation.
//
// The vault controller types describe its internal queues (command queue,
// write-data FIFO, response FIFO) and the DDR SDRAM command bus, whose
// CS#/RAS#/CAS#/WE# encoding follows the JEDEC DDR SDRAM standard.
package smc_pkg;

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 256;
  localparam int unsigned STRB_W   = DATA_W / 8;
  localparam int unsigned ID_W     = 8;
  localparam int unsigned MID_W    = 4;   // ID bits owned by a master
  localparam int unsigned LEN_W    = 8;

  // DRAM geometry of the 2011 HMC prototype: 8 banks per vault, 256-byte
  // rows, 16384 rows per 4 MB bank, 32-bit DDR data path per vault.
  localparam int unsigned NBANK    = 8;
  localparam int unsigned BA_W     = 3;
  localparam int unsigned RC_W     = 14;
  localparam int unsigned OF_W     = 8;
  localparam int unsigned DQ_W     = 32;
  localparam int unsigned COL_W    = 6;   // 64 columns of 4 bytes per row
  localparam int unsigned DRAM_A_W = 14;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;    // beats - 1
  } axi_ax_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } axi_w_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
    logic              last;
  } axi_r_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
  } axi_b_t;

  typedef struct packed {
    axi_ax_t aw;
    logic    aw_valid;
    axi_w_t  w;
    logic    w_valid;
    logic    b_ready;
    axi_ax_t ar;
    logic    ar_valid;
    logic    r_ready;
  } axi_req_t;

  typedef struct packed {
    logic    aw_ready;
    logic    w_ready;
    axi_b_t  b;
    logic    b_valid;
    logic    ar_ready;
    axi_r_t  r;
    logic    r_valid;
  } axi_rsp_t;

  // ---------------- vault controller internals ----------------
  typedef struct packed {
    logic              wr;
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } vc_cmd_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
  } vc_wdata_t;

  typedef struct packed {
    logic              is_b;   // 1: write response, 0: read data beat
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
    logic              last;
  } vc_resp_t;

  typedef enum logic [2:0] {
    DC_NOP, DC_ACT, DC_RD, DC_WR, DC_PRE, DC_REF, DC_MRS
  } dram_op_e;

  // DRAM command pins as driven each DRAM clock.
  typedef struct packed {
    logic                cke;
    logic                cs_n;
    logic                ras_n;
    logic                cas_n;
    logic                we_n;
    logic [BA_W-1:0]     ba;
    logic [DRAM_A_W-1:0] a;    // a[10] = auto-precharge / precharge-all
  } dram_cmd_t;

  function automatic dram_cmd_t dram_encode(dram_op_e op, logic [BA_W-1:0] ba,
                                            logic [DRAM_A_W-1:0] a, logic cke);
    dram_cmd_t c;
    c.cke = cke;
    c.ba  = ba;
    c.a   = a;
    c.cs_n = 1'b0;
    unique case (op)
      DC_ACT:  {c.ras_n, c.cas_n, c.we_n} = 3'b011;
      DC_RD:   {c.ras_n, c.cas_n, c.we_n} = 3'b101;
      DC_WR:   {c.ras_n, c.cas_n, c.we_n} = 3'b100;
      DC_PRE:  {c.ras_n, c.cas_n, c.we_n} = 3'b010;
      DC_REF:  {c.ras_n, c.cas_n, c.we_n} = 3'b001;
      DC_MRS:  {c.ras_n, c.cas_n, c.we_n} = 3'b000;
      default: {c.cs_n, c.ras_n, c.cas_n, c.we_n} = 4'b1111;
    endcase
    return c;
  endfunction

  function automatic dram_op_e dram_decode(dram_cmd_t c);
    if (!c.cke || c.cs_n) return DC_NOP;
    unique case ({c.ras_n, c.cas_n, c.we_n})
      3'b011:  return DC_ACT;
      3'b101:  return DC_RD;
      3'b100:  return DC_WR;
      3'b010:  return DC_PRE;
      3'b001:  return DC_REF;
      3'b000:  return DC_MRS;
      default: return DC_NOP;
    endcase
  endfunction

endpackage
