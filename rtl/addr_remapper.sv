// addr_remapper: configurable address interleaving of the logic base.
//
// A master address is read as four fields, from most to least significant:
// three of {RC (row), BA (bank), VA (vault)} in the order that mode_i selects,
// then OF (offset within a 256-byte row, always lowest because a transaction
// is never split across banks). The output puts the same fields in the
// cube's canonical order [RC-BA-VA-OF], which the master blocks and vault
// controllers decode. Modes: 0 RC-BA-VA (default, low-interleaved),
// 1 RC-VA-BA, 2 BA-RC-VA, 3 BA-VA-RC, 4 VA-RC-BA, 5 VA-BA-RC; 6 and 7 act as
// 0 (the encoding is this design's). Bits above the four fields pass
// through. Purely combinational.
// The six field orders and the canonical order come from the original
// design; the mode numbering and field widths (OF 8, VA 4, BA 3, RC 14, for
// 256-byte rows, 16 vaults, 8 banks, 16384 rows) are derived from its sizes.
module addr_remapper
  import smc_pkg::*;
#(
  parameter int unsigned OF_W_P = OF_W,
  parameter int unsigned VA_W   = 4,
  parameter int unsigned BA_W_P = BA_W,
  parameter int unsigned RC_W_P = RC_W
) (
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [2:0]        mode_i,
  output logic [ADDR_W-1:0] addr_o
);
  localparam int unsigned FW = VA_W + BA_W_P + RC_W_P;

  function automatic logic [ADDR_W-1:0] field(logic [ADDR_W-1:0] a, int unsigned pos, int unsigned w);
    return (a >> pos) & ((ADDR_W'(1) << w) - 1);
  endfunction

  int unsigned p_va, p_ba, p_rc;
  logic [ADDR_W-1:0] va, ba, rc;

  always_comb begin
    // bit position of each field in the incoming address
    unique case (mode_i)
      3'd1: begin p_ba = OF_W_P;          p_va = p_ba + BA_W_P;  p_rc = p_va + VA_W;   end // RC-VA-BA
      3'd2: begin p_va = OF_W_P;          p_rc = p_va + VA_W;    p_ba = p_rc + RC_W_P; end // BA-RC-VA
      3'd3: begin p_rc = OF_W_P;          p_va = p_rc + RC_W_P;  p_ba = p_va + VA_W;   end // BA-VA-RC
      3'd4: begin p_ba = OF_W_P;          p_rc = p_ba + BA_W_P;  p_va = p_rc + RC_W_P; end // VA-RC-BA
      3'd5: begin p_rc = OF_W_P;          p_ba = p_rc + RC_W_P;  p_va = p_ba + BA_W_P; end // VA-BA-RC
      default: begin p_va = OF_W_P;       p_ba = p_va + VA_W;    p_rc = p_ba + BA_W_P; end // RC-BA-VA
    endcase
    va = field(addr_i, p_va, VA_W);
    ba = field(addr_i, p_ba, BA_W_P);
    rc = field(addr_i, p_rc, RC_W_P);
    addr_o = (addr_i & ~((ADDR_W'(1) << (OF_W_P + FW)) - 1))        // untouched high bits
           | (rc << (OF_W_P + VA_W + BA_W_P))
           | (ba << (OF_W_P + VA_W))
           | (va << OF_W_P)
           | field(addr_i, 0, OF_W_P);
  end
endmodule
