// nic400: 4x4 AXI4 interconnect in the configuration used by the
// multi-write distributor bus.
//
// Structure: each of the four slave interfaces slave_if0..3 (SI) has an
// input buffer (nic_ib, two entries per channel); the buffers feed the switch
// (nic_bm), which decodes addresses, arbitrates per master interface and
// routes responses back. The master interfaces master_if0..3 (MI) are not
// buffered. All interfaces are AXI4 with 32-bit address and data.
//
// Configuration (as listed for the interconnect): write and read issuing 4
// per SI, total acceptance 4 per MI, single subordinate per ID, SI ID width 0.
// Visibility: slave_if0 sees all four master interfaces, slave_ifk sees
// master_ifk only. Address map: see nic_bm.
//
// Interface: si_* (arrays indexed by SI) and mi_* (arrays indexed by MI),
// one VALID/READY pair per channel and port; mi_*_id is the 1-bit ID that
// tells SI0 (0) from SIk (1) on master_ifk. Active-low synchronous reset.
// Latency through the interconnect: one cycle in each input buffer, none in
// the switch.
//
// This is a functional equivalent written from the configuration tables,
// not the generated vendor interconnect; timing-closure slices, QoS,
// TrustZone and locked transfers are absent, as in that configuration.
module nic400
  import mwd_pkg::*;
#(
  parameter int unsigned SI_BUF        = 2,
  parameter int unsigned WRITE_ISSUING = 4,
  parameter int unsigned READ_ISSUING  = 4,
  parameter int unsigned ACCEPTANCE    = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPORT-1:0] si_aw_valid,
  output logic [NPORT-1:0] si_aw_ready,
  input  ax_t              si_aw       [NPORT],
  input  logic [NPORT-1:0] si_w_valid,
  output logic [NPORT-1:0] si_w_ready,
  input  w_t               si_w        [NPORT],
  output logic [NPORT-1:0] si_b_valid,
  input  logic [NPORT-1:0] si_b_ready,
  output b_t               si_b        [NPORT],
  input  logic [NPORT-1:0] si_ar_valid,
  output logic [NPORT-1:0] si_ar_ready,
  input  ax_t              si_ar       [NPORT],
  output logic [NPORT-1:0] si_r_valid,
  input  logic [NPORT-1:0] si_r_ready,
  output r_t               si_r        [NPORT],
  output logic [NPORT-1:0] mi_aw_valid,
  input  logic [NPORT-1:0] mi_aw_ready,
  output logic [NPORT-1:0] mi_aw_id,
  output ax_t              mi_aw       [NPORT],
  output logic [NPORT-1:0] mi_w_valid,
  input  logic [NPORT-1:0] mi_w_ready,
  output w_t               mi_w        [NPORT],
  input  logic [NPORT-1:0] mi_b_valid,
  output logic [NPORT-1:0] mi_b_ready,
  input  logic [NPORT-1:0] mi_b_id,
  input  b_t               mi_b        [NPORT],
  output logic [NPORT-1:0] mi_ar_valid,
  input  logic [NPORT-1:0] mi_ar_ready,
  output logic [NPORT-1:0] mi_ar_id,
  output ax_t              mi_ar       [NPORT],
  input  logic [NPORT-1:0] mi_r_valid,
  output logic [NPORT-1:0] mi_r_ready,
  input  logic [NPORT-1:0] mi_r_id,
  input  r_t               mi_r        [NPORT]
);

  logic [NPORT-1:0] bm_aw_valid, bm_aw_ready, bm_w_valid, bm_w_ready;
  logic [NPORT-1:0] bm_b_valid, bm_b_ready, bm_ar_valid, bm_ar_ready;
  logic [NPORT-1:0] bm_r_valid, bm_r_ready;
  ax_t bm_aw [NPORT];
  w_t  bm_w  [NPORT];
  b_t  bm_b  [NPORT];
  ax_t bm_ar [NPORT];
  r_t  bm_r  [NPORT];

  for (genvar s = 0; s < NPORT; s++) begin : g_ib
    nic_ib #(.AW_DEPTH(SI_BUF), .W_DEPTH(SI_BUF), .B_DEPTH(SI_BUF),
             .AR_DEPTH(SI_BUF), .R_DEPTH(SI_BUF)) u_ib (
      .clk, .rst_n,
      .s_aw_valid(si_aw_valid[s]), .s_aw_ready(si_aw_ready[s]), .s_aw(si_aw[s]),
      .s_w_valid (si_w_valid[s]),  .s_w_ready (si_w_ready[s]),  .s_w (si_w[s]),
      .s_b_valid (si_b_valid[s]),  .s_b_ready (si_b_ready[s]),  .s_b (si_b[s]),
      .s_ar_valid(si_ar_valid[s]), .s_ar_ready(si_ar_ready[s]), .s_ar(si_ar[s]),
      .s_r_valid (si_r_valid[s]),  .s_r_ready (si_r_ready[s]),  .s_r (si_r[s]),
      .m_aw_valid(bm_aw_valid[s]), .m_aw_ready(bm_aw_ready[s]), .m_aw(bm_aw[s]),
      .m_w_valid (bm_w_valid[s]),  .m_w_ready (bm_w_ready[s]),  .m_w (bm_w[s]),
      .m_b_valid (bm_b_valid[s]),  .m_b_ready (bm_b_ready[s]),  .m_b (bm_b[s]),
      .m_ar_valid(bm_ar_valid[s]), .m_ar_ready(bm_ar_ready[s]), .m_ar(bm_ar[s]),
      .m_r_valid (bm_r_valid[s]),  .m_r_ready (bm_r_ready[s]),  .m_r (bm_r[s])
    );
  end

  nic_bm #(.WRITE_ISSUING(WRITE_ISSUING), .READ_ISSUING(READ_ISSUING),
           .ACCEPTANCE(ACCEPTANCE)) u_bm (
    .clk, .rst_n,
    .si_aw_valid(bm_aw_valid), .si_aw_ready(bm_aw_ready), .si_aw(bm_aw),
    .si_w_valid (bm_w_valid),  .si_w_ready (bm_w_ready),  .si_w (bm_w),
    .si_b_valid (bm_b_valid),  .si_b_ready (bm_b_ready),  .si_b (bm_b),
    .si_ar_valid(bm_ar_valid), .si_ar_ready(bm_ar_ready), .si_ar(bm_ar),
    .si_r_valid (bm_r_valid),  .si_r_ready (bm_r_ready),  .si_r (bm_r),
    .mi_aw_valid, .mi_aw_ready, .mi_aw_id, .mi_aw,
    .mi_w_valid,  .mi_w_ready,  .mi_w,
    .mi_b_valid,  .mi_b_ready,  .mi_b_id,  .mi_b,
    .mi_ar_valid, .mi_ar_ready, .mi_ar_id, .mi_ar,
    .mi_r_valid,  .mi_r_ready,  .mi_r_id,  .mi_r
  );

endmodule
