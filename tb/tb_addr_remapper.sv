// tb_addr_remapper: checks all six address mappings against field
// extraction written out independently with fixed part-selects for the
// default geometry (OF 8, VA 4, BA 3, RC 14 bits), and that every mapping is
// a bijection on the sampled addresses (distinct inputs stay distinct).
module tb_addr_remapper;
  import smc_pkg::*;
  logic [ADDR_W-1:0] a, y;
  logic [2:0] mode;
  int checks = 0, failures = 0;

  addr_remapper dut (.addr_i(a), .mode_i(mode), .addr_o(y));

  function automatic logic [ADDR_W-1:0] expect_map(logic [ADDR_W-1:0] x, int m);
    logic [3:0] va; logic [2:0] ba; logic [13:0] rc;
    case (m)
      1: begin ba = x[10:8];  va = x[14:11]; rc = x[28:15]; end  // RC-VA-BA-OF
      2: begin va = x[11:8];  rc = x[25:12]; ba = x[28:26]; end  // BA-RC-VA-OF
      3: begin rc = x[21:8];  va = x[25:22]; ba = x[28:26]; end  // BA-VA-RC-OF
      4: begin ba = x[10:8];  rc = x[24:11]; va = x[28:25]; end  // VA-RC-BA-OF
      5: begin rc = x[21:8];  ba = x[24:22]; va = x[28:25]; end  // VA-BA-RC-OF
      default: begin va = x[11:8]; ba = x[14:12]; rc = x[28:15]; end
    endcase
    return {x[31:29], rc, ba, va, x[7:0]};
  endfunction

  initial begin
    for (int m = 0; m < 8; m++) begin
      logic [ADDR_W-1:0] seen [logic [ADDR_W-1:0]];
      mode = 3'(m);
      seen.delete();
      for (int i = 0; i < 500; i++) begin
        a = {$urandom, $urandom};
        if (i < 29) a = ADDR_W'(1) << i;   // walk each bit once
        #1;
        checks++;
        if (y !== expect_map(a, m)) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d addr %h got %h exp %h", m, a, y, expect_map(a, m));
        end
        checks++;
        if (seen.exists(y) && seen[y] != a) failures++;
        seen[y] = a;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
