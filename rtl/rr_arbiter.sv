// rr_arbiter: single-cycle fair round-robin arbiter.
//
// Grants the first requester at or after the round-robin pointer. The grant
// is combinational from req_i; the pointer moves to one past the granted
// requester only when adv_i says the grant was used (a handshake), so an
// unserved winner keeps its turn. Reset pointer: requester 0.
// The original asks for fair round-robin arbitration; this pointer-based
// form is this design's.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0]               req_i,
  input  logic                       adv_i,
  output logic [N-1:0]               gnt_o,
  output logic [$clog2(N > 1 ? N : 2)-1:0] idx_o,
  output logic                       any_o
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] ptr_q;

  always_comb begin
    gnt_o = '0;
    idx_o = '0;
    any_o = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      if (!any_o && req_i[(int'(ptr_q) + k) % N]) begin
        any_o    = 1'b1;
        gnt_o[(int'(ptr_q) + k) % N] = 1'b1;
        idx_o    = IW'((int'(ptr_q) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               ptr_q <= '0;
    else if (adv_i && any_o)  ptr_q <= (int'(idx_o) == N - 1) ? '0 : idx_o + 1'b1;
  end
endmodule
