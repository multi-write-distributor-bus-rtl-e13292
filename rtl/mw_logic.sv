// mw_logic: the AW/WVALID and AW/WREADY logic that turns one write into four.
//
// What it does
//   The AXI4-Lite stream from the system bus converter is fanned out onto the
//   four slave interfaces SIF0..SIF3 of the interconnect. Address, data and
//   strobes go to all four unchanged; only the VALIDs are masked and the
//   READYs combined. A write whose address lies in the multi-write window
//   0x4000-0x4FFF is offered to all four interfaces (and the interconnect
//   routes SIFn to subordinate n); any other write, and every read, goes to
//   SIF0 only. The write response and the read channels are those of SIF0.
//
// How the handshake is split
//   A write is forked as an address/data pair: every enabled interface is
//   offered its AW copy and its W copy together, once both have arrived from
//   upstream, and the next write is not offered until every enabled
//   interface has taken both. Each interface may take its copies in a
//   different cycle. A per-interface, per-channel "done" flag records a copy
//   that has been taken; its VALID is then dropped so that it is not taken
//   twice. Upstream AWREADY and WREADY are raised together, in the cycle in
//   which every enabled interface is done with, or now takes, both copies.
//
// Why address and data travel together
//   The copies of a multi-write and the private writes coming through SIF0
//   meet at the same master interface of the interconnect, in either order.
//   If an interface could hold a multi-write address while the matching data
//   waited for SIF0's full buffers, that master interface could wait forever
//   for the data. With the pair rule, an interface only ever holds an
//   address whose data has been offered to it, and any data ahead of that in
//   its own buffer belongs to addresses it issued earlier.
//
// Interface: s_* is the AXI4-Lite subordinate side; sif_* the four AXI4
// slave-interface request channels (single beat, full width, INCR), plus
// SIF0's B, AR and R channels. The responses of SIF1..SIF3 are not used
// (their BREADY is tied high at the top level), as in the document.
// Timing: all paths are combinational except the done flags; a write whose
// copies are all taken in one cycle passes in that cycle.
//
// From the document: the masked VALIDs, the combined READYs, the 0x4XXX
// window, SIF0-only reads and responses. The done flags and the pair rule
// are this implementation's way of keeping the split handshake legal AXI.
module mw_logic
  import mwd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite subordinate side (from the system bus converter)
  input  logic              s_aw_valid,
  output logic              s_aw_ready,
  input  lax_t              s_aw,
  input  logic              s_w_valid,
  output logic              s_w_ready,
  input  data_t             s_w_data,
  input  strb_t             s_w_strb,
  output logic              s_b_valid,
  input  logic              s_b_ready,
  output resp_e             s_b_resp,
  input  logic              s_ar_valid,
  output logic              s_ar_ready,
  input  lax_t              s_ar,
  output logic              s_r_valid,
  input  logic              s_r_ready,
  output data_t             s_r_data,
  output resp_e             s_r_resp,
  // Write requests to SIF0..SIF3 (shared payload, masked valids)
  output logic [NPORT-1:0]  sif_aw_valid,
  input  logic [NPORT-1:0]  sif_aw_ready,
  output ax_t               sif_aw,
  output logic [NPORT-1:0]  sif_w_valid,
  input  logic [NPORT-1:0]  sif_w_ready,
  output w_t                sif_w,
  // SIF0 response and read channels
  input  logic              sif0_b_valid,
  output logic              sif0_b_ready,
  input  b_t                sif0_b,
  output logic              sif0_ar_valid,
  input  logic              sif0_ar_ready,
  output ax_t               sif0_ar,
  input  logic              sif0_r_valid,
  output logic              sif0_r_ready,
  input  r_t                sif0_r
);

  typedef logic [NPORT-1:0] mask_t;

  // ---------------------------------------------------- write (AW + W)
  mask_t en, aw_done, aw_take, w_done, w_take;
  logic  both, all_taken;

  assign both         = s_aw_valid && s_w_valid;
  assign en           = is_multi(s_aw.addr) ? '1 : mask_t'(1);
  assign sif_aw       = lite_to_ax(s_aw);
  assign sif_w        = '{data: s_w_data, strb: s_w_strb, last: 1'b1};
  assign sif_aw_valid = both ? (en & ~aw_done) : '0;
  assign sif_w_valid  = both ? (en & ~w_done) : '0;
  assign aw_take      = sif_aw_valid & sif_aw_ready;
  assign w_take       = sif_w_valid & sif_w_ready;
  assign all_taken    = ((~en | aw_done | aw_take) == '1) && ((~en | w_done | w_take) == '1);
  assign s_aw_ready   = both && all_taken;
  assign s_w_ready    = both && all_taken;

  always_ff @(posedge clk) begin
    if (!rst_n || s_aw_ready) begin
      aw_done <= '0;
      w_done  <= '0;
    end else begin
      aw_done <= aw_done | aw_take;
      w_done  <= w_done | w_take;
    end
  end

  // ------------------------------------------ responses and reads: SIF0
  assign s_b_valid     = sif0_b_valid;
  assign sif0_b_ready  = s_b_ready;
  assign s_b_resp      = sif0_b.resp;

  assign sif0_ar_valid = s_ar_valid;
  assign s_ar_ready    = sif0_ar_ready;
  assign sif0_ar       = lite_to_ax(s_ar);

  assign s_r_valid     = sif0_r_valid;
  assign sif0_r_ready  = s_r_ready;
  assign s_r_data      = sif0_r.data;
  assign s_r_resp      = sif0_r.resp;

  // A copy is never offered twice, and a started offer is kept until taken
  a_aw_once: assert property (@(posedge clk) disable iff (!rst_n) (sif_aw_valid & aw_done) == '0);
  a_w_once:  assert property (@(posedge clk) disable iff (!rst_n) (sif_w_valid & w_done) == '0);

endmodule
