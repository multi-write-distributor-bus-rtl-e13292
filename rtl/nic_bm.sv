// nic_bm: the switch ("bm") of the 4x4 AXI4 interconnect.
//
// What it does
//   Connects the four slave interfaces (after their input buffers) to the
//   four master interfaces according to two tables:
//     visibility  SI0 reaches MI0..MI3; SIk (k = 1..3) reaches MIk only.
//     address     SI0: 0x0XXX and 0x4XXX -> MI0, 0x1XXX -> MI1,
//                      0x2XXX -> MI2, 0x3XXX -> MI3
//                 SIk: 0x4XXX -> MIk
//   An address that matches no window goes to a built-in default
//   subordinate that takes the write data and answers DECERR.
//
// How it works
//   * Slave side, per SI and per direction: a count of outstanding
//     transactions (at most WRITE_ISSUING / READ_ISSUING) and the master
//     interface they all went to. With ID width 0 every transaction of an
//     SI has the same ID, so a new address to a *different* destination is
//     held back until the count is zero ("single subordinate per ID"). This
//     keeps responses in order without reorder buffers.
//   * Master side, per MI and per direction: a round-robin arbiter over the
//     SIs that request it. A grant that is offered but not yet taken is held,
//     so AWVALID/ARVALID stay stable. The MI ID is one bit: 0 for SI0, 1 for
//     SIk; it steers B and R back.
//   * Write data follows write addresses in the order granted: each MI keeps
//     a queue of granted SIs and takes W beats from the SI at its head until
//     WLAST.
//   * Each MI carries at most ACCEPTANCE transactions at once (reads and
//     writes together). A new AW counts an AR already on offer and a new AR
//     counts an AW on offer, so the limit holds even when both win at once.
//   * The default subordinate (one per SI) accepts any number of outstanding
//     writes and one read burst at a time.
//
// Timing: the MI side is combinational from the input-buffer outputs (the
// master interfaces have no buffering); grants, counters and queues are
// registered. Active-low synchronous reset.
//
// From the document: visibility, address map, issuing and acceptance limits
// (4), single-subordinate-per-ID, ID-less slave interfaces and ID'd master
// interfaces 1..3. The round-robin policy, the 1-bit MI ID encoding and the
// default subordinate's behaviour are choices of this implementation.
module nic_bm
  import mwd_pkg::*;
#(
  parameter int unsigned WRITE_ISSUING = 4,
  parameter int unsigned READ_ISSUING  = 4,
  parameter int unsigned ACCEPTANCE    = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // slave side (from the input buffers)
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
  // master side
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

  localparam int unsigned N   = NPORT;
  localparam int unsigned CW  = 4;          // counter width (limits up to 15)
  typedef logic [2:0] tgt_t;                // 0..3 = MI, 4 = default subordinate
  localparam tgt_t DEF = 3'd4;
  typedef logic [1:0] si_idx_t;

  // Address decode of slave interface 'si'
  function automatic tgt_t decode(int unsigned si, addr_t a);
    if (si == 0) begin
      if (a[ADDR_W-1:12] == MULTI_PAGE) return tgt_t'(0);
      for (int m = 0; m < N; m++)
        if (a[ADDR_W-1:12] == PRIV_PAGE[m]) return tgt_t'(m);
      return DEF;
    end
    return (a[ADDR_W-1:12] == MULTI_PAGE) ? tgt_t'(si) : DEF;
  endfunction

  // Slave interface behind an MI ID
  function automatic si_idx_t id_to_si(int unsigned mi, logic id);
    return id ? si_idx_t'(mi) : si_idx_t'(0);
  endfunction

  // ================================================================ state
  logic [CW-1:0] wcnt [N];   // outstanding writes per SI
  tgt_t          wtgt [N];
  logic [CW-1:0] rcnt [N];   // outstanding reads per SI
  tgt_t          rtgt [N];
  logic [CW-1:0] dw_pend [N], db_cnt [N];  // default subordinate, writes
  logic          dr_busy [N];              // default subordinate, read burst
  logic [7:0]    dr_left [N];

  logic [CW-1:0] mout [N];                  // outstanding per MI
  logic          aw_hold [N], ar_hold [N];
  si_idx_t       aw_hsrc [N], ar_hsrc [N];
  si_idx_t       aw_rr   [N], ar_rr   [N];

  // W order queue per MI
  logic    wq_in_ready [N], wq_valid [N];
  si_idx_t wq_head [N];

  // ========================================================= slave side
  tgt_t       aw_tgt [N], ar_tgt [N];
  logic [N-1:0] aw_ok, ar_ok;               // may be issued (issuing, CDAS)
  logic [N-1:0] cdas_wstall, cdas_rstall;   // held back by single-sub-per-ID

  always_comb begin
    for (int s = 0; s < N; s++) begin
      aw_tgt[s] = decode(s, si_aw[s].addr);
      ar_tgt[s] = decode(s, si_ar[s].addr);
      cdas_wstall[s] = si_aw_valid[s] && wcnt[s] != '0 && wtgt[s] != aw_tgt[s];
      cdas_rstall[s] = si_ar_valid[s] && rcnt[s] != '0 && rtgt[s] != ar_tgt[s];
      aw_ok[s] = si_aw_valid[s] && !cdas_wstall[s] && wcnt[s] < CW'(WRITE_ISSUING);
      ar_ok[s] = si_ar_valid[s] && !cdas_rstall[s] && rcnt[s] < CW'(READ_ISSUING)
                 && !(ar_tgt[s] == DEF && dr_busy[s]);
    end
  end

  // ======================================================== master side
  logic [N-1:0] aw_req [N], ar_req [N];     // [mi][si]
  si_idx_t      aw_gnt [N], ar_gnt [N];
  logic [N-1:0] aw_hs, ar_hs;               // per MI
  logic [N-1:0] aw_conflict, ar_conflict;   // more than one SI requested

  function automatic si_idx_t rr_pick(logic [N-1:0] req, si_idx_t last);
    si_idx_t k;
    for (int i = 1; i <= N; i++) begin
      k = si_idx_t'(int'(last) + i);
      if (req[k]) return k;
    end
    return last;
  endfunction

  always_comb begin
    for (int m = 0; m < N; m++) begin
      for (int s = 0; s < N; s++) begin
        aw_req[m][s] = aw_ok[s] && aw_tgt[s] == tgt_t'(m);
        ar_req[m][s] = ar_ok[s] && ar_tgt[s] == tgt_t'(m);
      end
      aw_conflict[m] = (aw_req[m] & (aw_req[m] - 1'b1)) != '0;
      ar_conflict[m] = (ar_req[m] & (ar_req[m] - 1'b1)) != '0;

      aw_gnt[m]      = aw_hold[m] ? aw_hsrc[m] : rr_pick(aw_req[m], aw_rr[m]);
      mi_aw_valid[m] = aw_hold[m] ||
                       (aw_req[m] != '0 && wq_in_ready[m] &&
                        (mout[m] + CW'(ar_hold[m])) < CW'(ACCEPTANCE));
      mi_aw[m]       = si_aw[aw_gnt[m]];
      mi_aw_id[m]    = (aw_gnt[m] != '0);
      aw_hs[m]       = mi_aw_valid[m] && mi_aw_ready[m];

      ar_gnt[m]      = ar_hold[m] ? ar_hsrc[m] : rr_pick(ar_req[m], ar_rr[m]);
      mi_ar_valid[m] = ar_hold[m] ||
                       (ar_req[m] != '0 &&
                        (mout[m] + CW'(mi_aw_valid[m])) < CW'(ACCEPTANCE));
      mi_ar[m]       = si_ar[ar_gnt[m]];
      mi_ar_id[m]    = (ar_gnt[m] != '0);
      ar_hs[m]       = mi_ar_valid[m] && mi_ar_ready[m];

      // write data from the SI at the head of the order queue
      mi_w_valid[m]  = wq_valid[m] && si_w_valid[wq_head[m]];
      mi_w[m]        = si_w[wq_head[m]];
    end
  end

  // ============================================= ready / response muxes
  logic [N-1:0] def_aw_acc, def_w_acc, def_ar_acc;

  always_comb begin
    for (int s = 0; s < N; s++) begin
      def_aw_acc[s] = aw_ok[s] && aw_tgt[s] == DEF;
      def_ar_acc[s] = ar_ok[s] && ar_tgt[s] == DEF;
      def_w_acc[s]  = si_w_valid[s] && wtgt[s] == DEF && dw_pend[s] != '0;
      si_aw_ready[s] = def_aw_acc[s];
      si_ar_ready[s] = def_ar_acc[s];
      si_w_ready[s]  = def_w_acc[s];
    end
    for (int m = 0; m < N; m++) begin
      if (aw_hs[m]) si_aw_ready[aw_gnt[m]] = 1'b1;
      if (ar_hs[m]) si_ar_ready[ar_gnt[m]] = 1'b1;
      if (wq_valid[m] && mi_w_ready[m]) si_w_ready[wq_head[m]] = 1'b1;
    end

    for (int s = 0; s < N; s++) begin
      // write response
      if (wtgt[s] == DEF) begin
        si_b_valid[s] = db_cnt[s] != '0;
        si_b[s]       = '{resp: RESP_DECERR};
      end else begin
        si_b_valid[s] = mi_b_valid[wtgt[s][1:0]] &&
                        id_to_si(int'(wtgt[s][1:0]), mi_b_id[wtgt[s][1:0]]) == si_idx_t'(s);
        si_b[s]       = mi_b[wtgt[s][1:0]];
      end
      // read data
      if (rtgt[s] == DEF) begin
        si_r_valid[s] = dr_busy[s];
        si_r[s]       = '{data: '0, resp: RESP_DECERR, last: dr_left[s] == 8'd0};
      end else begin
        si_r_valid[s] = mi_r_valid[rtgt[s][1:0]] &&
                        id_to_si(int'(rtgt[s][1:0]), mi_r_id[rtgt[s][1:0]]) == si_idx_t'(s);
        si_r[s]       = mi_r[rtgt[s][1:0]];
      end
    end
    for (int m = 0; m < N; m++) begin
      mi_b_ready[m] = si_b_ready[id_to_si(m, mi_b_id[m])];
      mi_r_ready[m] = si_r_ready[id_to_si(m, mi_r_id[m])];
    end
  end

  // ============================================================ queues
  for (genvar m = 0; m < N; m++) begin : g_wq
    sync_fifo #(.T(si_idx_t), .DEPTH(ACCEPTANCE)) u_wq (
      .clk, .rst_n,
      .in_valid (aw_hs[m]),
      .in_ready (wq_in_ready[m]),
      .in_data  (aw_gnt[m]),
      .out_valid(wq_valid[m]),
      .out_ready(mi_w_valid[m] && mi_w_ready[m] && mi_w[m].last),
      .out_data (wq_head[m])
    );
  end

  // ========================================================= registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        wcnt[i] <= '0; wtgt[i] <= DEF; rcnt[i] <= '0; rtgt[i] <= DEF;
        dw_pend[i] <= '0; db_cnt[i] <= '0; dr_busy[i] <= 1'b0; dr_left[i] <= '0;
        mout[i] <= '0; aw_hold[i] <= 1'b0; ar_hold[i] <= 1'b0;
        aw_hsrc[i] <= '0; ar_hsrc[i] <= '0;
        aw_rr[i] <= si_idx_t'(N-1); ar_rr[i] <= si_idx_t'(N-1);
      end
    end else begin
      // slave side bookkeeping
      for (int s = 0; s < N; s++) begin
        automatic logic aw_acc = si_aw_valid[s] && si_aw_ready[s];
        automatic logic b_done = si_b_valid[s] && si_b_ready[s];
        automatic logic ar_acc = si_ar_valid[s] && si_ar_ready[s];
        automatic logic r_done = si_r_valid[s] && si_r_ready[s] && si_r[s].last;
        automatic logic dw_last = def_w_acc[s] && si_w[s].last;
        automatic logic db_done = b_done && wtgt[s] == DEF;
        wcnt[s] <= wcnt[s] + CW'(aw_acc) - CW'(b_done);
        rcnt[s] <= rcnt[s] + CW'(ar_acc) - CW'(r_done);
        if (aw_acc) wtgt[s] <= aw_tgt[s];
        if (ar_acc) rtgt[s] <= ar_tgt[s];
        dw_pend[s] <= dw_pend[s] + CW'(def_aw_acc[s]) - CW'(dw_last);
        db_cnt[s]  <= db_cnt[s] + CW'(dw_last) - CW'(db_done);
        if (def_ar_acc[s]) begin
          dr_busy[s] <= 1'b1;
          dr_left[s] <= si_ar[s].len;
        end else if (dr_busy[s] && rtgt[s] == DEF && si_r_valid[s] && si_r_ready[s]) begin
          if (dr_left[s] == 8'd0) dr_busy[s] <= 1'b0;
          dr_left[s] <= dr_left[s] - 8'd1;
        end
      end
      // master side bookkeeping
      for (int m = 0; m < N; m++) begin
        automatic logic b_ret = mi_b_valid[m] && mi_b_ready[m];
        automatic logic r_ret = mi_r_valid[m] && mi_r_ready[m] && mi_r[m].last;
        mout[m] <= mout[m] + CW'(aw_hs[m]) + CW'(ar_hs[m]) - CW'(b_ret) - CW'(r_ret);
        aw_hold[m] <= mi_aw_valid[m] && !mi_aw_ready[m];
        ar_hold[m] <= mi_ar_valid[m] && !mi_ar_ready[m];
        aw_hsrc[m] <= aw_gnt[m];
        ar_hsrc[m] <= ar_gnt[m];
        if (aw_hs[m]) aw_rr[m] <= aw_gnt[m];
        if (ar_hs[m]) ar_rr[m] <= ar_gnt[m];
      end
    end
  end

  // =========================================================== checks
  for (genvar m = 0; m < N; m++) begin : g_chk
    a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
      mi_aw_valid[m] && !mi_aw_ready[m] |=> mi_aw_valid[m] && $stable(mi_aw[m]));
    a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
      mi_ar_valid[m] && !mi_ar_ready[m] |=> mi_ar_valid[m] && $stable(mi_ar[m]));
    a_accept: assert property (@(posedge clk) disable iff (!rst_n)
      mout[m] <= CW'(ACCEPTANCE));
  end

endmodule
