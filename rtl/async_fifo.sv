// async_fifo: dual-clock first-word-fall-through FIFO.
//
// Used for the clock-domain crossings of a vault controller (command queue,
// write-data FIFO, response/read-data FIFO) between the interconnect clock and
// the DRAM clock. Binary pointers with one extra wrap bit are kept in each
// domain; their Gray-coded copies cross through two-flop synchronisers. The
// head entry is visible on rdata whenever rempty is low; ren pops it.
// wlevel is the write side's view of the occupancy, which may over-count by
// the synchroniser delay (never under-count), so it is safe for credit
// checks. A push while full and a pop while empty are ignored. DEPTH must be
// a power of two.
// The original only calls for dual-clock FIFOs; the Gray-pointer scheme,
// fall-through head and wlevel output are this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic [AW:0]      wlevel,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] rbin_w;
  assign rbin_w = gray2bin(rgray_w2);
  assign wlevel = wbin_q - rbin_w;
  assign wfull  = (wlevel == (AW+1)'(DEPTH));

  always_ff @(posedge wclk) begin
    if (wen && !wfull) mem[wbin_q[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
      if (wen && !wfull) begin
        wbin_q  <= wbin_q + 1'b1;
        wgray_q <= bin2gray(wbin_q + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  assign rempty = (rgray_q == wgray_r2);
  assign rdata  = mem[rbin_q[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
      if (ren && !rempty) begin
        rbin_q  <= rbin_q + 1'b1;
        rgray_q <= bin2gray(rbin_q + 1'b1);
      end
    end
  end
endmodule
