// tb_nic_limits: self-checking testbench of the interconnect's transaction
// limits.
//
// The master interfaces are driven directly by this testbench: they take
// every address and data beat at once but hold back B and R until told to
// answer, so transactions pile up inside the interconnect. Three cases:
//   1. total acceptance: slave_if0 posts three writes and three reads to
//      0x2XXX. master_if2 must take exactly four of them (reads and writes
//      count together) and the rest must wait until responses return.
//   2. acceptance shared between slave interfaces: slave_if0 (0x2XXX) and
//      slave_if2 (0x4XXX) post three writes each to master_if2; again four
//      are taken at first.
//   3. write issuing: slave_if0 posts twelve writes outside the address map
//      while its B channel is not taken. The switch must never count more than
//      four outstanding writes for slave_if0; with two answers parked in the
//      B buffer and two addresses in the AW buffer, later writes must wait.
// In every case all responses must arrive in the end, with the right ID
// routing and RLAST, and no count may go above four.
module tb_nic_limits;
  import mwd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [NPORT-1:0] si_aw_valid, si_aw_ready, si_w_valid, si_w_ready, si_b_valid, si_b_ready;
  logic [NPORT-1:0] si_ar_valid, si_ar_ready, si_r_valid, si_r_ready;
  ax_t si_aw [NPORT]; w_t si_w [NPORT]; b_t si_b [NPORT]; ax_t si_ar [NPORT]; r_t si_r [NPORT];
  logic [NPORT-1:0] mi_aw_valid, mi_aw_ready, mi_aw_id, mi_w_valid, mi_w_ready;
  logic [NPORT-1:0] mi_b_valid, mi_b_ready, mi_b_id, mi_ar_valid, mi_ar_ready, mi_ar_id;
  logic [NPORT-1:0] mi_r_valid, mi_r_ready, mi_r_id;
  ax_t mi_aw [NPORT]; w_t mi_w [NPORT]; b_t mi_b [NPORT]; ax_t mi_ar [NPORT]; r_t mi_r [NPORT];

  nic400 dut (.*);

  // ------------------------------------------------ master-side models
  // Take everything; answer only while `answer` is set. Each write's B is
  // owed once its address and its last data beat have both been taken.
  bit   answer = 1'b0;
  int   aw_taken [NPORT], ar_taken [NPORT];
  logic b_id_q [NPORT][$];
  int   w_last_seen [NPORT];
  logic r_id_q [NPORT][$]; int r_len_q [NPORT][$];
  int   r_beat [NPORT];

  assign mi_aw_ready = '1;
  assign mi_w_ready  = '1;
  assign mi_ar_ready = '1;

  always @(posedge clk) begin
    if (!rst_n) begin
      mi_b_valid <= '0; mi_r_valid <= '0;
      for (int m = 0; m < NPORT; m++) begin
        aw_taken[m] = 0; ar_taken[m] = 0; w_last_seen[m] = 0; r_beat[m] = 0;
      end
    end else begin
      for (int m = 0; m < NPORT; m++) begin
        if (mi_aw_valid[m]) begin aw_taken[m]++; b_id_q[m].push_back(mi_aw_id[m]); end
        if (mi_w_valid[m] && mi_w[m].last) w_last_seen[m]++;
        if (mi_ar_valid[m]) begin ar_taken[m]++; r_id_q[m].push_back(mi_ar_id[m]); r_len_q[m].push_back(int'(mi_ar[m].len)); end
        // B
        if (mi_b_valid[m] && mi_b_ready[m]) mi_b_valid[m] <= 1'b0;
        else if (!mi_b_valid[m] && answer && b_id_q[m].size() > 0 && w_last_seen[m] > 0) begin
          mi_b_valid[m] <= 1'b1;
          mi_b_id[m]    <= b_id_q[m].pop_front();
          w_last_seen[m]--;
        end
        // R, one beat per cycle while answering
        if (mi_r_valid[m] && mi_r_ready[m]) begin
          mi_r_valid[m] <= 1'b0;
          if (mi_r[m].last) begin void'(r_id_q[m].pop_front()); void'(r_len_q[m].pop_front()); r_beat[m] = 0; end
          else r_beat[m]++;
        end else if (!mi_r_valid[m] && answer && r_id_q[m].size() > 0) begin
          mi_r_valid[m] <= 1'b1;
          mi_r_id[m]    <= r_id_q[m][0];
          mi_r[m]       <= '{data: 32'(r_beat[m]), resp: RESP_OKAY, last: r_beat[m] == r_len_q[m][0]};
        end
      end
    end
  end
  for (genvar m = 0; m < NPORT; m++) begin : g_b
    assign mi_b[m] = '{resp: RESP_OKAY};
  end

  // ------------------------------------------------ limits, never exceeded
  int max_mout [NPORT], max_wcnt [NPORT];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPORT; i++) begin
      if (int'(dut.u_bm.mout[i]) > max_mout[i]) max_mout[i] = int'(dut.u_bm.mout[i]);
      if (int'(dut.u_bm.wcnt[i]) > max_wcnt[i]) max_wcnt[i] = int'(dut.u_bm.wcnt[i]);
    end
  end

  // ------------------------------------------------ slave-side drivers
  int n_b [NPORT], n_r_last [NPORT], n_b_decerr [NPORT];
  logic [NPORT-1:0] aw_hs_q, w_hs_q, ar_hs_q;
  always @(posedge clk) begin
    aw_hs_q <= si_aw_valid & si_aw_ready;
    w_hs_q  <= si_w_valid & si_w_ready;
    ar_hs_q <= si_ar_valid & si_ar_ready;
    if (rst_n) for (int s = 0; s < NPORT; s++) begin
      if (si_b_valid[s] && si_b_ready[s]) begin
        n_b[s]++;
        if (si_b[s].resp == RESP_DECERR) n_b_decerr[s]++;
      end
      if (si_r_valid[s] && si_r_ready[s] && si_r[s].last) n_r_last[s]++;
    end
  end

  task automatic send_aw(int s, addr_t a);
    si_aw[s] = '{addr: a, len: 8'd0, size: 3'd2, burst: BURST_INCR, lock: 1'b0, cache: 4'd0, prot: 3'd0};
    si_aw_valid[s] = 1'b1;
    do begin @(posedge clk); #1; end while (!aw_hs_q[s]);
    si_aw_valid[s] = 1'b0;
  endtask
  task automatic send_w(int s, data_t d);
    si_w[s] = '{data: d, strb: 4'hF, last: 1'b1};
    si_w_valid[s] = 1'b1;
    do begin @(posedge clk); #1; end while (!w_hs_q[s]);
    si_w_valid[s] = 1'b0;
  endtask
  task automatic send_ar(int s, addr_t a, int len);
    si_ar[s] = '{addr: a, len: 8'(len), size: 3'd2, burst: BURST_INCR, lock: 1'b0, cache: 4'd0, prot: 3'd0};
    si_ar_valid[s] = 1'b1;
    do begin @(posedge clk); #1; end while (!ar_hs_q[s]);
    si_ar_valid[s] = 1'b0;
  endtask
  task automatic post_writes(int s, addr_t a, int n);
    fork
      for (int i = 0; i < n; i++) send_aw(s, a + 4 * i);
      for (int i = 0; i < n; i++) send_w(s, 32'h100 * s + i);
    join_none
  endtask
  task automatic settle(int cycles);
    repeat (cycles) @(posedge clk);
    #1;
  endtask
  task automatic clear_counts;
    for (int i = 0; i < NPORT; i++) begin
      aw_taken[i] = 0; ar_taken[i] = 0; n_b[i] = 0; n_r_last[i] = 0; n_b_decerr[i] = 0;
    end
  endtask

  initial begin
    si_aw_valid = '0; si_w_valid = '0; si_ar_valid = '0; si_b_ready = '1; si_r_ready = '1;
    for (int s = 0; s < NPORT; s++) begin si_aw[s] = '0; si_w[s] = '0; si_ar[s] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    clear_counts();

    // 1. reads and writes share master_if2's acceptance of four
    post_writes(0, 32'h2000, 3);
    fork
      for (int i = 0; i < 3; i++) send_ar(0, 32'h2100 + 16 * i, 1);
    join_none
    settle(40);
    check(aw_taken[2] + ar_taken[2] == 4,
          $sformatf("master_if2 took %0d writes + %0d reads, limit 4", aw_taken[2], ar_taken[2]));
    check(aw_taken[2] > 0 && ar_taken[2] > 0, "both kinds counted against the same limit");
    answer = 1'b1;
    settle(80);
    check(aw_taken[2] == 3 && ar_taken[2] == 3, "all six reached master_if2 once answered");
    check(n_b[0] == 3 && n_r_last[0] == 3, "three B and three read bursts back on slave_if0");
    answer = 1'b0;
    wait fork;
    clear_counts();

    // 2. two slave interfaces share master_if2's acceptance
    post_writes(0, 32'h2200, 3);
    post_writes(2, 32'h4200, 3);
    settle(40);
    check(aw_taken[2] == 4, $sformatf("master_if2 took %0d writes from two slave interfaces, limit 4", aw_taken[2]));
    answer = 1'b1;
    settle(80);
    check(aw_taken[2] == 6, "all six writes reached master_if2 once answered");
    check(n_b[0] == 3 && n_b[2] == 3, "each slave interface got its own three B");
    answer = 1'b0;
    wait fork;
    clear_counts();

    // 3. write issuing of slave_if0: its B channel is not taken, so the
    //    default subordinate's answers back up and issuing must stop at four
    //    (4 outstanding + 2 answers in the B buffer + 2 addresses buffered)
    si_b_ready[0] = 1'b0;
    post_writes(0, 32'h9000, 12);
    settle(60);
    check(max_wcnt[0] == 4, $sformatf("slave_if0 outstanding writes peaked at %0d, limit 4", max_wcnt[0]));
    check(si_aw_valid[0], "later writes wait at slave_if0");
    si_b_ready[0] = 1'b1;
    wait fork;
    settle(40);
    check(n_b[0] == 12 && n_b_decerr[0] == 12, "twelve DECERR answers once B is taken");

    for (int m = 0; m < NPORT; m++)
      check(max_mout[m] <= 4, $sformatf("master_if%0d never above four in flight (%0d)", m, max_mout[m]));
    check(max_mout[2] == 4, "master_if2 reached its acceptance limit");
    $display("peak in flight per master interface %0d %0d %0d %0d, peak outstanding writes on slave_if0 %0d",
             max_mout[0], max_mout[1], max_mout[2], max_mout[3], max_wcnt[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
