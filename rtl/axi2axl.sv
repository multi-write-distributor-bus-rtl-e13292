// axi2axl: AXI4 to AXI4-Lite protocol converter ("AXI2AXL").
//
// An AXI4-Lite subordinate cannot take bursts or IDs, so this block sits
// between an AXI4 manager and an AXI4-Lite side. It appears once after the
// system bus and once in front of each of the four subordinates.
//
// How it works
//   * Write address: an accepted AXI4 burst of AWLEN+1 beats is replayed as
//     AWLEN+1 single AXI4-Lite write addresses, one per cycle at best. The
//     beat address follows the burst type: FIXED repeats it, INCR steps by
//     2**AWSIZE (aligned after the first beat), WRAP steps and wraps inside the
//     (AWLEN+1)*2**AWSIZE window. Narrow beats keep their byte lanes through
//     WSTRB, which is passed on unchanged.
//   * Write data passes straight through (WLAST is dropped). AxLOCK and
//     AxCACHE have no AXI4-Lite counterpart and are dropped too; AxPROT is
//     kept.
//   * Write response: for every burst a {ID, AWLEN} entry is queued. The
//     AWLEN+1 AXI4-Lite responses of that burst are merged into a single AXI4
//     response carrying the burst's ID and the worst of the responses.
//   * Reads work the same way: AR bursts are split, R beats pass through and
//     get RID and RLAST from a {ID, ARLEN} queue.
//   * Up to OUTSTANDING bursts per direction may wait for their responses,
//     so posted (outstanding) writes keep flowing.
//
// Interface: s_* is the AXI4 subordinate side (ID_W-bit IDs), m_* the
// AXI4-Lite manager side. Active-low synchronous reset.
// Timing: the first AXI4-Lite address leaves one cycle after the AXI4
// address handshake; B is registered (one cycle after the last Lite B);
// R and W are combinational pass-throughs.
//
// The document names the converter and says what it is for (AXI4 to
// AXI4-Lite); the splitting/merging scheme, the queue depth (set equal to
// the interconnect's issuing capability of 4) and the ID width are choices of
// this implementation.
module axi2axl
  import mwd_pkg::*;
#(
  parameter int unsigned ID_W        = 4,
  parameter int unsigned OUTSTANDING = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // AXI4 subordinate side
  input  logic            s_aw_valid,
  output logic            s_aw_ready,
  input  logic [ID_W-1:0] s_aw_id,
  input  ax_t             s_aw,
  input  logic            s_w_valid,
  output logic            s_w_ready,
  input  w_t              s_w,
  output logic            s_b_valid,
  input  logic            s_b_ready,
  output logic [ID_W-1:0] s_b_id,
  output resp_e           s_b_resp,
  input  logic            s_ar_valid,
  output logic            s_ar_ready,
  input  logic [ID_W-1:0] s_ar_id,
  input  ax_t             s_ar,
  output logic            s_r_valid,
  input  logic            s_r_ready,
  output logic [ID_W-1:0] s_r_id,
  output r_t              s_r,
  // AXI4-Lite manager side
  output logic            m_aw_valid,
  input  logic            m_aw_ready,
  output lax_t            m_aw,
  output logic            m_w_valid,
  input  logic            m_w_ready,
  output data_t           m_w_data,
  output strb_t           m_w_strb,
  input  logic            m_b_valid,
  output logic            m_b_ready,
  input  resp_e           m_b_resp,
  output logic            m_ar_valid,
  input  logic            m_ar_ready,
  output lax_t            m_ar,
  input  logic            m_r_valid,
  output logic            m_r_ready,
  input  data_t           m_r_data,
  input  resp_e           m_r_resp
);

  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [7:0]      len;
  } pend_t;

  // Address of the beat after 'a' in a burst
  function automatic addr_t next_addr(addr_t a, logic [2:0] size, burst_e burst, logic [7:0] len);
    addr_t step, mask;
    step = addr_t'(1) << size;
    mask = ((addr_t'(len) + addr_t'(1)) << size) - addr_t'(1);
    case (burst)
      BURST_FIXED: return a;
      BURST_WRAP:  return (a & ~mask) | ((a + step) & mask);
      default:     return (a & ~(step - addr_t'(1))) + step;
    endcase
  endfunction

  // ---------------------------------------------------------------- writes
  logic       wbusy;
  addr_t      waddr;
  logic [7:0] wleft, wlen;
  logic [2:0] wsize;
  burst_e     wburst;
  logic [2:0] wprot;

  logic  bq_in_ready, bq_valid, bq_pop;
  pend_t bq_head;

  assign s_aw_ready = !wbusy && bq_in_ready;
  assign m_aw_valid = wbusy;
  assign m_aw       = '{addr: waddr, prot: wprot};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbusy <= 1'b0;
    end else if (s_aw_valid && s_aw_ready) begin
      wbusy  <= 1'b1;
      waddr  <= s_aw.addr;
      wleft  <= s_aw.len;
      wlen   <= s_aw.len;
      wsize  <= s_aw.size;
      wburst <= s_aw.burst;
      wprot  <= s_aw.prot;
    end else if (m_aw_valid && m_aw_ready) begin
      if (wleft == 8'd0) wbusy <= 1'b0;
      wleft <= wleft - 8'd1;
      waddr <= next_addr(waddr, wsize, wburst, wlen);
    end
  end

  sync_fifo #(.T(pend_t), .DEPTH(OUTSTANDING)) u_bq (
    .clk, .rst_n,
    .in_valid (s_aw_valid && s_aw_ready),
    .in_ready (bq_in_ready),
    .in_data  ('{id: s_aw_id, len: s_aw.len}),
    .out_valid(bq_valid),
    .out_ready(bq_pop),
    .out_data (bq_head)
  );

  assign m_w_valid = s_w_valid;
  assign s_w_ready = m_w_ready;
  assign m_w_data  = s_w.data;
  assign m_w_strb  = s_w.strb;

  // Response merge
  logic [7:0] bcnt;
  resp_e      bacc;
  logic       bout_valid;

  assign m_b_ready = !bout_valid || s_b_ready;
  wire   b_hs      = m_b_valid && m_b_ready;
  wire   b_last    = (bcnt == bq_head.len);
  assign bq_pop    = b_hs && b_last;
  assign s_b_valid = bout_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bcnt       <= '0;
      bacc       <= RESP_OKAY;
      bout_valid <= 1'b0;
    end else begin
      if (s_b_valid && s_b_ready) bout_valid <= 1'b0;
      if (b_hs) begin
        if (b_last) begin
          bout_valid <= 1'b1;
          s_b_id     <= bq_head.id;
          s_b_resp   <= worse(bacc, m_b_resp);
          bcnt       <= '0;
          bacc       <= RESP_OKAY;
        end else begin
          bcnt <= bcnt + 8'd1;
          bacc <= worse(bacc, m_b_resp);
        end
      end
    end
  end

  // ----------------------------------------------------------------- reads
  logic       rbusy;
  addr_t      raddr;
  logic [7:0] rleft, rlen;
  logic [2:0] rsize;
  burst_e     rburst;
  logic [2:0] rprot;

  logic  rq_in_ready, rq_valid;
  pend_t rq_head;
  logic [7:0] rcnt;

  assign s_ar_ready = !rbusy && rq_in_ready;
  assign m_ar_valid = rbusy;
  assign m_ar       = '{addr: raddr, prot: rprot};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rbusy <= 1'b0;
    end else if (s_ar_valid && s_ar_ready) begin
      rbusy  <= 1'b1;
      raddr  <= s_ar.addr;
      rleft  <= s_ar.len;
      rlen   <= s_ar.len;
      rsize  <= s_ar.size;
      rburst <= s_ar.burst;
      rprot  <= s_ar.prot;
    end else if (m_ar_valid && m_ar_ready) begin
      if (rleft == 8'd0) rbusy <= 1'b0;
      rleft <= rleft - 8'd1;
      raddr <= next_addr(raddr, rsize, rburst, rlen);
    end
  end

  sync_fifo #(.T(pend_t), .DEPTH(OUTSTANDING)) u_rq (
    .clk, .rst_n,
    .in_valid (s_ar_valid && s_ar_ready),
    .in_ready (rq_in_ready),
    .in_data  ('{id: s_ar_id, len: s_ar.len}),
    .out_valid(rq_valid),
    .out_ready(s_r_valid && s_r_ready && s_r.last),
    .out_data (rq_head)
  );

  assign s_r_valid = m_r_valid;
  assign m_r_ready = s_r_ready;
  assign s_r_id    = rq_head.id;
  assign s_r       = '{data: m_r_data, resp: m_r_resp, last: (rcnt == rq_head.len)};

  always_ff @(posedge clk) begin
    if (!rst_n) rcnt <= '0;
    else if (s_r_valid && s_r_ready) rcnt <= s_r.last ? 8'd0 : rcnt + 8'd1;
  end

  // A response can only come back for an address that was sent
  a_b_has_owner: assert property (@(posedge clk) disable iff (!rst_n) m_b_valid |-> bq_valid);
  a_r_has_owner: assert property (@(posedge clk) disable iff (!rst_n) m_r_valid |-> rq_valid);

endmodule
