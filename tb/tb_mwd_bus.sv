// tb_mwd_bus: end-to-end testbench of the multi-write distributor bus.
//
// The top level runs with its default parameters. Four stalling AXI4-Lite
// memory models stand for the subordinates. The system-bus side runs the
// five kinds of operation the bus is meant for: single writes, single reads,
// FIXED and INCR burst writes, burst reads and posted (outstanding) writes,
// first as directed cases, then as rounds of private and multi-writes posted
// while one subordinate is stopped, then as a random mix. A reference model here
// keeps the memory image every subordinate should hold: a write to
// 0x4000-0x4FFF updates all four, a write to 0xN000-0xNFFF (N = 0..3) updates
// subordinate N only, anything else changes nothing and must answer DECERR.
// Reads return subordinate N's word for 0xNXXX and subordinate 0's word for
// 0x4XXX. At the end every word of every memory is compared.
//
// Mechanisms that must each happen at least once (counted, zero = failure):
// a write duplicated to four subordinates, a single-destination write, a
// burst split into single transfers, a copy accepted by some slave
// interfaces before others, an address held back by the
// single-subordinate-per-ID rule, two slave interfaces competing for one
// master interface, more than one write outstanding, a DECERR response, and
// subordinate back-pressure.
module tb_mwd_bus;
  import mwd_pkg::*;

  localparam int ID_W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  logic [ID_W-1:0] s_aw_id, s_b_id, s_ar_id, s_r_id;
  ax_t s_aw, s_ar; w_t s_w; resp_e s_b_resp; r_t s_r;
  logic [NPORT-1:0] m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic [NPORT-1:0] m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  lax_t m_aw [NPORT], m_ar [NPORT];
  data_t m_w_data [NPORT], m_r_data [NPORT];
  strb_t m_w_strb [NPORT];
  resp_e m_b_resp [NPORT], m_r_resp [NPORT];

  mwd_bus dut (.*);

  for (genvar k = 0; k < NPORT; k++) begin : g_sub
    axil_mem_model #(.STALL(1'b1), .SEED(101 + 17 * k)) u_mem (.clk, .rst_n,
      .aw_valid(m_aw_valid[k]), .aw_ready(m_aw_ready[k]), .aw(m_aw[k]),
      .w_valid(m_w_valid[k]), .w_ready(m_w_ready[k]), .w_data(m_w_data[k]), .w_strb(m_w_strb[k]),
      .b_valid(m_b_valid[k]), .b_ready(m_b_ready[k]), .b_resp(m_b_resp[k]),
      .ar_valid(m_ar_valid[k]), .ar_ready(m_ar_ready[k]), .ar(m_ar[k]),
      .r_valid(m_r_valid[k]), .r_ready(m_r_ready[k]), .r_data(m_r_data[k]), .r_resp(m_r_resp[k]));
  end

  function automatic data_t memrd(int k, int idx);
    case (k)
      0: return g_sub[0].u_mem.mem[idx];
      1: return g_sub[1].u_mem.mem[idx];
      2: return g_sub[2].u_mem.mem[idx];
      default: return g_sub[3].u_mem.mem[idx];
    endcase
  endfunction

  // --------------------------------------------------- reference model
  data_t ref_mem [NPORT][1024];
  function automatic bit mapped(addr_t a);
    return a[31:12] <= 20'h4;
  endfunction
  function automatic void ref_write(addr_t a, data_t d);
    if (a[31:12] == 20'h4) for (int k = 0; k < NPORT; k++) ref_mem[k][a[11:2]] = d;
    else if (a[31:12] < 20'h4) ref_mem[a[13:12]][a[11:2]] = d;
  endfunction
  function automatic data_t ref_read(addr_t a);
    return (a[31:12] == 20'h4) ? ref_mem[0][a[11:2]] : ref_mem[a[13:12]][a[11:2]];
  endfunction
  function automatic addr_t beat_addr(addr_t a, int i, burst_e b);
    return (b == BURST_FIXED) ? a : a + 4 * i;
  endfunction

  // ------------------------------------------------------- monitors
  logic aw_hs_q, w_hs_q, ar_hs_q;
  logic [ID_W-1:0] b_id_q[$]; resp_e b_resp_q[$];
  r_t r_q[$]; logic [ID_W-1:0] r_id_q[$];
  int n_multi = 0, n_single = 0, n_split = 0, n_partial = 0, n_cdas = 0;
  int n_conflict = 0, n_outstanding = 0, n_decerr = 0, n_backpressure = 0;
  int b_pending = 0;
  always @(posedge clk) begin
    aw_hs_q <= s_aw_valid && s_aw_ready;
    w_hs_q  <= s_w_valid && s_w_ready;
    ar_hs_q <= s_ar_valid && s_ar_ready;
    if (rst_n) begin
      if (s_b_valid && s_b_ready) begin
        b_id_q.push_back(s_b_id); b_resp_q.push_back(s_b_resp);
        if (s_b_resp == RESP_DECERR) n_decerr++;
      end
      if (s_r_valid && s_r_ready) begin r_q.push_back(s_r); r_id_q.push_back(s_r_id); end
      b_pending <= b_pending + int'(s_aw_valid && s_aw_ready) - int'(s_b_valid && s_b_ready);
      if (b_pending > 1) n_outstanding++;
      if (dut.u_mw.s_aw_valid && dut.u_mw.s_aw_ready) begin
        if (is_multi(dut.u_mw.s_aw.addr)) n_multi++; else n_single++;
      end
      if (s_aw_valid && s_aw_ready && s_aw.len != 0) n_split++;
      if (dut.u_mw.aw_done != '0 || dut.u_mw.w_done != '0) n_partial++;
      if (dut.u_nic.u_bm.cdas_wstall != '0) n_cdas++;
      if (dut.u_nic.u_bm.aw_conflict != '0) n_conflict++;
      if ((m_aw_valid & ~m_aw_ready) != '0) n_backpressure++;
    end
  end

  // --------------------------------------------------------- drivers
  typedef struct {
    logic [ID_W-1:0] id;
    addr_t           addr;
    int              len;
    burst_e          burst;
    data_t           data [$];
  } wr_t;

  task automatic send_aw(wr_t t);
    s_aw_id = t.id;
    s_aw = '{addr: t.addr, len: 8'(t.len), size: 3'd2, burst: t.burst, lock: 1'b0, cache: 4'd0, prot: 3'd0};
    s_aw_valid = 1'b1;
    do begin @(posedge clk); #1; end while (!aw_hs_q);
    s_aw_valid = 1'b0;
  endtask
  task automatic send_w(data_t d, bit last);
    s_w = '{data: d, strb: 4'hF, last: last};
    s_w_valid = 1'b1;
    do begin @(posedge clk); #1; end while (!w_hs_q);
    s_w_valid = 1'b0;
  endtask

  // Issue a list of writes: addresses run ahead of data and responses
  // (posted), then every response is checked in order.
  task automatic do_writes(wr_t ts [$]);
    fork
      foreach (ts[i]) send_aw(ts[i]);
      foreach (ts[i]) foreach (ts[i].data[j]) send_w(ts[i].data[j], j == ts[i].len);
    join
    for (int t = 0; t < 4000 && b_id_q.size() < ts.size(); t++) begin @(posedge clk); #1; end
    check(b_id_q.size() == ts.size(), "one B per write");
    foreach (ts[i]) begin
      if (i < b_id_q.size()) begin
        check(b_id_q[i] == ts[i].id, "B id in order");
        check(b_resp_q[i] == (mapped(ts[i].addr) ? RESP_OKAY : RESP_DECERR), "B response");
      end
      foreach (ts[i].data[j]) ref_write(beat_addr(ts[i].addr, j, ts[i].burst), ts[i].data[j]);
    end
    b_id_q.delete(); b_resp_q.delete();
  endtask

  function automatic wr_t mk(logic [ID_W-1:0] id, addr_t a, int len, burst_e b);
    wr_t t;
    t.id = id; t.addr = a; t.len = len; t.burst = b;
    for (int j = 0; j <= len; j++) t.data.push_back($urandom);
    return t;
  endfunction

  task automatic do_read(logic [ID_W-1:0] id, addr_t a, int len);
    r_q.delete(); r_id_q.delete();
    s_ar_id = id;
    s_ar = '{addr: a, len: 8'(len), size: 3'd2, burst: BURST_INCR, lock: 1'b0, cache: 4'd0, prot: 3'd0};
    s_ar_valid = 1'b1;
    do begin @(posedge clk); #1; end while (!ar_hs_q);
    s_ar_valid = 1'b0;
    for (int t = 0; t < 2000 && r_q.size() < len + 1; t++) begin @(posedge clk); #1; end
    check(r_q.size() == len + 1, "R beat count");
    foreach (r_q[i]) begin
      check(r_q[i].data == ref_read(a + 4 * i), $sformatf("read %h beat %0d", a, i));
      check(r_id_q[i] == id && r_q[i].last == (i == len), "RID/RLAST");
    end
  endtask

  initial begin
    wr_t ts [$];
    int  cyc0;
    foreach (ref_mem[k, i]) ref_mem[k][i] = '0;
    s_aw_valid = 0; s_w_valid = 0; s_ar_valid = 0; s_b_ready = 1; s_r_ready = 1;
    s_aw = '0; s_w = '0; s_ar = '0; s_aw_id = '0; s_ar_id = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // single write into the multi-write window, then read it back
    ts = '{mk(4'd1, 32'h4010, 0, BURST_INCR)};
    cyc0 = $time;
    do_writes(ts);
    $display("single multi-write: %0d cycles from address to response", ($time - cyc0) / 10);
    for (int k = 0; k < NPORT; k++)
      check(memrd(k, 32'h4010 >> 2) == ts[0].data[0], $sformatf("multi-write reached subordinate %0d", k));
    do_read(4'd2, 32'h4010, 0);
    // single writes to each private window
    for (int k = 0; k < NPORT; k++) begin
      ts = '{mk(4'(k), {16'h0, 4'(k), 12'h020}, 0, BURST_INCR)};
      do_writes(ts);
      for (int j = 0; j < NPORT; j++)
        check((memrd(j, 32'h020 >> 2) == ts[0].data[0]) == (j == k), "private write reached one subordinate");
    end
    // INCR burst into the multi window, FIXED burst into a private one
    ts = '{mk(4'd5, 32'h4100, 3, BURST_INCR)}; do_writes(ts);
    ts = '{mk(4'd6, 32'h2200, 3, BURST_FIXED)}; do_writes(ts);
    do_read(4'd7, 32'h4100, 3);
    do_read(4'd8, 32'h2200, 0);
    // posted writes alternating private window 1 and the multi window
    ts.delete();
    for (int i = 0; i < 8; i++)
      ts.push_back(mk(4'(i), (i % 2) ? 32'h4300 + 4 * i : 32'h1300 + 4 * i, 0, BURST_INCR));
    do_writes(ts);
    // Posted private writes followed by multi-writes while subordinates are
    // stopped: a multi-write copy on slave interface k competes with private
    // writes for master interface k while their data still sits in slave
    // interface 0's buffer.
    for (int n = 0; n < 60; n++) begin
      int hold_k, n_priv, n_mw;
      ts.delete();
      hold_k = 1 + $urandom_range(2);
      n_priv = 2 + $urandom_range(4);
      n_mw   = 1 + $urandom_range(3);
      for (int i = 0; i < n_priv; i++)
        ts.push_back(mk(4'(i), (32'(hold_k) << 12) + 32'h500 + 4 * $urandom_range(100), 0, BURST_INCR));
      for (int i = 0; i < n_mw; i++) begin
        ts.push_back(mk(4'd8, 32'h4500 + 4 * $urandom_range(100), 0, BURST_INCR));
        if ($urandom_range(1)) ts.push_back(mk(4'd9, (32'(hold_k) << 12) + 32'h700 + 4 * i, 0, BURST_INCR));
      end
      case (hold_k)
        1: g_sub[1].u_mem.hold = 1'b1;
        2: g_sub[2].u_mem.hold = 1'b1;
        default: g_sub[3].u_mem.hold = 1'b1;
      endcase
      fork
        do_writes(ts);
        begin
          repeat (10 + $urandom_range(40)) @(posedge clk); #1;
          g_sub[1].u_mem.hold = 1'b0; g_sub[2].u_mem.hold = 1'b0; g_sub[3].u_mem.hold = 1'b0;
        end
      join
    end
    // unmapped write
    ts = '{mk(4'd9, 32'h9000, 0, BURST_INCR)}; do_writes(ts);

    // random mix
    for (int n = 0; n < 60; n++) begin
      automatic int n_wr = $urandom_range(1, 4);
      ts.delete();
      for (int i = 0; i < n_wr; i++) begin
        automatic int pg = $urandom_range(0, 9);
        automatic addr_t a = {16'h0, 4'(pg > 5 ? 4 : pg), 6'($urandom), 6'h0};
        ts.push_back(mk(4'($urandom), a, $urandom_range(0, 3),
                        ($urandom_range(0, 3) == 0) ? BURST_FIXED : BURST_INCR));
      end
      do_writes(ts);
      if (n % 4 == 0) do_read(4'($urandom), {16'h0, 4'($urandom_range(0, 4)), 6'($urandom), 6'h0}, $urandom_range(0, 3));
    end

    repeat (20) @(posedge clk);
    for (int k = 0; k < NPORT; k++) begin
      automatic int bad = 0;
      for (int i = 0; i < 1024; i++) if (memrd(k, i) != ref_mem[k][i]) bad++;
      check(bad == 0, $sformatf("subordinate %0d memory image (%0d words differ)", k, bad));
    end

    $display("multi %0d single %0d burst-split %0d partial-accept %0d cdas-hold %0d conflict %0d outstanding %0d decerr %0d backpressure %0d",
             n_multi, n_single, n_split, n_partial, n_cdas, n_conflict, n_outstanding, n_decerr, n_backpressure);
    check(n_multi > 0, "multi-write happened");
    check(n_single > 0, "single-destination write happened");
    check(n_split > 0, "burst split happened");
    check(n_partial > 0, "split acceptance happened");
    check(n_cdas > 0, "single-subordinate-per-ID hold happened");
    check(n_conflict > 0, "arbitration conflict happened");
    check(n_outstanding > 0, "outstanding writes happened");
    check(n_decerr > 0, "DECERR happened");
    check(n_backpressure > 0, "subordinate back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
