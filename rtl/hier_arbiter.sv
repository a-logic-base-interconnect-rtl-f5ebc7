// hier_arbiter: two-level arbitration of a slave block.
//
// Requesters 0..NMAIN-1 are the main (link) ports, NMAIN..NMAIN+NPIM-1 the
// PIM ports. Each group has its own fair round-robin arbiter; a fixed-priority
// last stage gives the main group precedence (high-priority port, HPP) over
// the PIM group (low-priority port, LPP), so the PIM only receives bandwidth
// the main ports leave unused. Combinational grant; the arbiter of the
// winning group advances when adv_i confirms the grant was taken.
// pim_lost_o: a PIM port requested but a main port won.
module hier_arbiter #(
  parameter int unsigned NMAIN = 4,
  parameter int unsigned NPIM  = 1,
  localparam int unsigned NM   = NMAIN + NPIM,
  localparam int unsigned MW   = $clog2(NM > 1 ? NM : 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NM-1:0] req_i,
  input  logic          adv_i,
  output logic [MW-1:0] idx_o,
  output logic          any_o,
  output logic          pim_lost_o
);
  localparam int unsigned AW = $clog2(NMAIN > 1 ? NMAIN : 2);
  localparam int unsigned PW = $clog2(NPIM > 1 ? NPIM : 2);

  logic [AW-1:0]    m_idx;
  logic             m_any;
  logic [PW-1:0]    p_idx;
  logic             p_any;

  rr_arbiter #(.N(NMAIN)) u_main (
    .clk, .rst_n, .req_i(req_i[NMAIN-1:0]), .adv_i(adv_i && m_any),
    .gnt_o(), .idx_o(m_idx), .any_o(m_any));
  rr_arbiter #(.N(NPIM)) u_pim (
    .clk, .rst_n, .req_i(req_i[NM-1:NMAIN]), .adv_i(adv_i && !m_any),
    .gnt_o(), .idx_o(p_idx), .any_o(p_any));

  always_comb begin
    any_o      = m_any || p_any;
    idx_o      = m_any ? MW'(m_idx) : MW'(NMAIN + int'(p_idx));
    pim_lost_o = m_any && p_any;
  end
endmodule
