// mwd_bus: multi-write distributor bus (top level).
//
// Software often has to program the same configuration into several
// identical hardware blocks (for example the parallel transmit/receive paths
// of a radio). This bus lets one write from the system bus land in all four
// subordinates at once: a write to the 4 KB window 0x4000-0x4FFF is
// duplicated to subordinates 0..3, while the private windows 0x0XXX, 0x1XXX,
// 0x2XXX and 0x3XXX reach one subordinate each. Reads always go through the
// first path, so they reach one subordinate at a time.
//
// Data path
//   system bus (AXI4) -> axi2axl (bursts split into single transfers)
//     -> mw_logic (AW/W fan-out onto slave_if0..3 by masked VALIDs and
//        combined READYs; B, AR and R only through slave_if0)
//     -> nic400 (slave_if0 decodes the whole map; slave_ifk only forwards
//        0x4XXX to master_ifk)
//     -> four axi2axl (AXI4 -> AXI4-Lite) -> subordinates 0..3.
//   The responses of slave_if1..3 are accepted and dropped (BREADY tied
//   high), their read channels are tied off; the write response seen by the
//   system bus is the one of subordinate 0.
//
// Interface: s_* is an AXI4 subordinate port with ID_W-bit IDs, 32-bit
// address and data; m_* are four AXI4-Lite manager ports (arrays indexed by
// subordinate). clk rising edge, rst_n active low, synchronous.
// Timing: a single write reaches the subordinates about five cycles after
// its address handshake (converter, fan-out, input buffer, switch,
// converter); the response returns through the same stages.
module mwd_bus
  import mwd_pkg::*;
#(
  parameter int unsigned ID_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // system bus, AXI4
  input  logic             s_aw_valid,
  output logic             s_aw_ready,
  input  logic [ID_W-1:0]  s_aw_id,
  input  ax_t              s_aw,
  input  logic             s_w_valid,
  output logic             s_w_ready,
  input  w_t               s_w,
  output logic             s_b_valid,
  input  logic             s_b_ready,
  output logic [ID_W-1:0]  s_b_id,
  output resp_e            s_b_resp,
  input  logic             s_ar_valid,
  output logic             s_ar_ready,
  input  logic [ID_W-1:0]  s_ar_id,
  input  ax_t              s_ar,
  output logic             s_r_valid,
  input  logic             s_r_ready,
  output logic [ID_W-1:0]  s_r_id,
  output r_t               s_r,
  // subordinates 0..3, AXI4-Lite
  output logic [NPORT-1:0] m_aw_valid,
  input  logic [NPORT-1:0] m_aw_ready,
  output lax_t             m_aw      [NPORT],
  output logic [NPORT-1:0] m_w_valid,
  input  logic [NPORT-1:0] m_w_ready,
  output data_t            m_w_data  [NPORT],
  output strb_t            m_w_strb  [NPORT],
  input  logic [NPORT-1:0] m_b_valid,
  output logic [NPORT-1:0] m_b_ready,
  input  resp_e            m_b_resp  [NPORT],
  output logic [NPORT-1:0] m_ar_valid,
  input  logic [NPORT-1:0] m_ar_ready,
  output lax_t             m_ar      [NPORT],
  input  logic [NPORT-1:0] m_r_valid,
  output logic [NPORT-1:0] m_r_ready,
  input  data_t            m_r_data  [NPORT],
  input  resp_e            m_r_resp  [NPORT]
);

  // ------------------------------------------- system bus converter
  logic  l_aw_valid, l_aw_ready, l_w_valid, l_w_ready, l_b_valid, l_b_ready;
  logic  l_ar_valid, l_ar_ready, l_r_valid, l_r_ready;
  lax_t  l_aw, l_ar;
  data_t l_w_data, l_r_data;
  strb_t l_w_strb;
  resp_e l_b_resp, l_r_resp;

  axi2axl #(.ID_W(ID_W)) u_sys_cvt (
    .clk, .rst_n,
    .s_aw_valid, .s_aw_ready, .s_aw_id, .s_aw,
    .s_w_valid,  .s_w_ready,  .s_w,
    .s_b_valid,  .s_b_ready,  .s_b_id,  .s_b_resp,
    .s_ar_valid, .s_ar_ready, .s_ar_id, .s_ar,
    .s_r_valid,  .s_r_ready,  .s_r_id,  .s_r,
    .m_aw_valid(l_aw_valid), .m_aw_ready(l_aw_ready), .m_aw(l_aw),
    .m_w_valid (l_w_valid),  .m_w_ready (l_w_ready),  .m_w_data(l_w_data), .m_w_strb(l_w_strb),
    .m_b_valid (l_b_valid),  .m_b_ready (l_b_ready),  .m_b_resp(l_b_resp),
    .m_ar_valid(l_ar_valid), .m_ar_ready(l_ar_ready), .m_ar(l_ar),
    .m_r_valid (l_r_valid),  .m_r_ready (l_r_ready),  .m_r_data(l_r_data), .m_r_resp(l_r_resp)
  );

  // --------------------------------------------- multi-write logic
  logic [NPORT-1:0] si_aw_valid, si_aw_ready, si_w_valid, si_w_ready;
  logic [NPORT-1:0] si_b_valid, si_b_ready, si_ar_valid, si_ar_ready;
  logic [NPORT-1:0] si_r_valid, si_r_ready;
  ax_t  si_aw [NPORT];
  w_t   si_w  [NPORT];
  b_t   si_b  [NPORT];
  ax_t  si_ar [NPORT];
  r_t   si_r  [NPORT];
  ax_t  mw_aw, mw_ar0;
  w_t   mw_w;

  mw_logic u_mw (
    .clk, .rst_n,
    .s_aw_valid(l_aw_valid), .s_aw_ready(l_aw_ready), .s_aw(l_aw),
    .s_w_valid (l_w_valid),  .s_w_ready (l_w_ready),  .s_w_data(l_w_data), .s_w_strb(l_w_strb),
    .s_b_valid (l_b_valid),  .s_b_ready (l_b_ready),  .s_b_resp(l_b_resp),
    .s_ar_valid(l_ar_valid), .s_ar_ready(l_ar_ready), .s_ar(l_ar),
    .s_r_valid (l_r_valid),  .s_r_ready (l_r_ready),  .s_r_data(l_r_data), .s_r_resp(l_r_resp),
    .sif_aw_valid(si_aw_valid), .sif_aw_ready(si_aw_ready), .sif_aw(mw_aw),
    .sif_w_valid (si_w_valid),  .sif_w_ready (si_w_ready),  .sif_w (mw_w),
    .sif0_b_valid(si_b_valid[0]),   .sif0_b_ready(si_b_ready[0]),   .sif0_b(si_b[0]),
    .sif0_ar_valid(si_ar_valid[0]), .sif0_ar_ready(si_ar_ready[0]), .sif0_ar(mw_ar0),
    .sif0_r_valid(si_r_valid[0]),   .sif0_r_ready(si_r_ready[0]),   .sif0_r(si_r[0])
  );

  // Same AW/W payload on every slave interface; responses of 1..3 are
  // dropped and their read channels are idle.
  always_comb begin
    for (int k = 0; k < NPORT; k++) begin
      si_aw[k] = mw_aw;
      si_w[k]  = mw_w;
      si_ar[k] = (k == 0) ? mw_ar0 : '0;
    end
    si_ar_valid[NPORT-1:1] = '0;
    si_b_ready[NPORT-1:1]  = '1;
    si_r_ready[NPORT-1:1]  = '0;
  end

  // -------------------------------------------------- interconnect
  logic [NPORT-1:0] mi_aw_valid, mi_aw_ready, mi_aw_id, mi_w_valid, mi_w_ready;
  logic [NPORT-1:0] mi_b_valid, mi_b_ready, mi_b_id, mi_ar_valid, mi_ar_ready, mi_ar_id;
  logic [NPORT-1:0] mi_r_valid, mi_r_ready, mi_r_id;
  ax_t mi_aw [NPORT];
  w_t  mi_w  [NPORT];
  b_t  mi_b  [NPORT];
  ax_t mi_ar [NPORT];
  r_t  mi_r  [NPORT];

  nic400 u_nic (
    .clk, .rst_n,
    .si_aw_valid, .si_aw_ready, .si_aw,
    .si_w_valid,  .si_w_ready,  .si_w,
    .si_b_valid,  .si_b_ready,  .si_b,
    .si_ar_valid, .si_ar_ready, .si_ar,
    .si_r_valid,  .si_r_ready,  .si_r,
    .mi_aw_valid, .mi_aw_ready, .mi_aw_id, .mi_aw,
    .mi_w_valid,  .mi_w_ready,  .mi_w,
    .mi_b_valid,  .mi_b_ready,  .mi_b_id,  .mi_b,
    .mi_ar_valid, .mi_ar_ready, .mi_ar_id, .mi_ar,
    .mi_r_valid,  .mi_r_ready,  .mi_r_id,  .mi_r
  );

  // ------------------------------------ subordinate-side converters
  for (genvar k = 0; k < NPORT; k++) begin : g_mcvt
    resp_e b_resp;
    axi2axl #(.ID_W(1)) u_cvt (
      .clk, .rst_n,
      .s_aw_valid(mi_aw_valid[k]), .s_aw_ready(mi_aw_ready[k]), .s_aw_id(mi_aw_id[k]), .s_aw(mi_aw[k]),
      .s_w_valid (mi_w_valid[k]),  .s_w_ready (mi_w_ready[k]),  .s_w(mi_w[k]),
      .s_b_valid (mi_b_valid[k]),  .s_b_ready (mi_b_ready[k]),  .s_b_id(mi_b_id[k]), .s_b_resp(b_resp),
      .s_ar_valid(mi_ar_valid[k]), .s_ar_ready(mi_ar_ready[k]), .s_ar_id(mi_ar_id[k]), .s_ar(mi_ar[k]),
      .s_r_valid (mi_r_valid[k]),  .s_r_ready (mi_r_ready[k]),  .s_r_id(mi_r_id[k]), .s_r(mi_r[k]),
      .m_aw_valid(m_aw_valid[k]), .m_aw_ready(m_aw_ready[k]), .m_aw(m_aw[k]),
      .m_w_valid (m_w_valid[k]),  .m_w_ready (m_w_ready[k]),  .m_w_data(m_w_data[k]), .m_w_strb(m_w_strb[k]),
      .m_b_valid (m_b_valid[k]),  .m_b_ready (m_b_ready[k]),  .m_b_resp(m_b_resp[k]),
      .m_ar_valid(m_ar_valid[k]), .m_ar_ready(m_ar_ready[k]), .m_ar(m_ar[k]),
      .m_r_valid (m_r_valid[k]),  .m_r_ready (m_r_ready[k]),  .m_r_data(m_r_data[k]), .m_r_resp(m_r_resp[k])
    );
    assign mi_b[k] = '{resp: b_resp};
  end

endmodule
