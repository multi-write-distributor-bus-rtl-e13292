// nic_ib: input buffer ("ib") of one slave interface of the interconnect.
//
// One FIFO per AXI4 channel sits between the slave interface and the switch:
// AW, W and AR flow towards the switch, B and R flow back. The depths are
// those of the interconnect configuration (buffering aw/ar/r/w/b = 2/2/2/2/2).
// Every FIFO is registered on both sides, so the buffer also cuts the
// combinational VALID/READY paths between the multi-write logic and the
// switch, and each channel adds one cycle of latency.
//
// Interface: s_* faces the slave interface (upstream manager), m_* faces the
// switch. No IDs (the slave interfaces have ID width 0). Active-low reset.
module nic_ib
  import mwd_pkg::*;
#(
  parameter int unsigned AW_DEPTH = 2,
  parameter int unsigned W_DEPTH  = 2,
  parameter int unsigned B_DEPTH  = 2,
  parameter int unsigned AR_DEPTH = 2,
  parameter int unsigned R_DEPTH  = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s_aw_valid, output logic s_aw_ready, input  ax_t s_aw,
  input  logic s_w_valid,  output logic s_w_ready,  input  w_t  s_w,
  output logic s_b_valid,  input  logic s_b_ready,  output b_t  s_b,
  input  logic s_ar_valid, output logic s_ar_ready, input  ax_t s_ar,
  output logic s_r_valid,  input  logic s_r_ready,  output r_t  s_r,
  output logic m_aw_valid, input  logic m_aw_ready, output ax_t m_aw,
  output logic m_w_valid,  input  logic m_w_ready,  output w_t  m_w,
  input  logic m_b_valid,  output logic m_b_ready,  input  b_t  m_b,
  output logic m_ar_valid, input  logic m_ar_ready, output ax_t m_ar,
  input  logic m_r_valid,  output logic m_r_ready,  input  r_t  m_r
);
  sync_fifo #(.T(ax_t), .DEPTH(AW_DEPTH)) u_aw (.clk, .rst_n,
    .in_valid(s_aw_valid), .in_ready(s_aw_ready), .in_data(s_aw),
    .out_valid(m_aw_valid), .out_ready(m_aw_ready), .out_data(m_aw));
  sync_fifo #(.T(w_t), .DEPTH(W_DEPTH)) u_w (.clk, .rst_n,
    .in_valid(s_w_valid), .in_ready(s_w_ready), .in_data(s_w),
    .out_valid(m_w_valid), .out_ready(m_w_ready), .out_data(m_w));
  sync_fifo #(.T(b_t), .DEPTH(B_DEPTH)) u_b (.clk, .rst_n,
    .in_valid(m_b_valid), .in_ready(m_b_ready), .in_data(m_b),
    .out_valid(s_b_valid), .out_ready(s_b_ready), .out_data(s_b));
  sync_fifo #(.T(ax_t), .DEPTH(AR_DEPTH)) u_ar (.clk, .rst_n,
    .in_valid(s_ar_valid), .in_ready(s_ar_ready), .in_data(s_ar),
    .out_valid(m_ar_valid), .out_ready(m_ar_ready), .out_data(m_ar));
  sync_fifo #(.T(r_t), .DEPTH(R_DEPTH)) u_r (.clk, .rst_n,
    .in_valid(m_r_valid), .in_ready(m_r_ready), .in_data(m_r),
    .out_valid(s_r_valid), .out_ready(s_r_ready), .out_data(s_r));
endmodule
