// tb_mw_logic: self-checking testbench of the multi-write VALID/READY logic.
//
// Four randomly stalling slave-interface models accept AW and W copies. The
// test sends writes inside and outside the 0x4XXX window, with the data
// arriving before, with or after the address, and a run of back-to-back
// writes. It checks that each write reaches exactly the interfaces it should
// (all four for 0x4XXX, SIF0 otherwise), once each, with the right address
// and data, and that the AXI4-Lite side sees one handshake per write. Address
// and data are forked as a pair, so no copy may be offered before both have
// arrived, and the upstream AW and W handshakes must fall in the same cycle. It also checks that a copy
// taken early by one interface is not offered again (split acceptance
// happened) and that B, AR and R pass through SIF0.
module tb_mw_logic;
  import mwd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  lax_t s_aw, s_ar; data_t s_w_data, s_r_data; strb_t s_w_strb; resp_e s_b_resp, s_r_resp;
  logic [NPORT-1:0] sif_aw_valid, sif_aw_ready, sif_w_valid, sif_w_ready;
  ax_t sif_aw, sif0_ar; w_t sif_w;
  logic sif0_b_valid, sif0_b_ready, sif0_ar_valid, sif0_ar_ready, sif0_r_valid, sif0_r_ready;
  b_t sif0_b; r_t sif0_r;

  mw_logic dut (.*);

  // Slave-interface models: random READY, record what each takes
  addr_t aw_log [NPORT][$];
  data_t w_log  [NPORT][$];
  int    partial_aw = 0, partial_w = 0;
  int    b_owed = 0;
  int    pair_err = 0;
  always @(posedge clk) begin
    sif_aw_ready <= 4'($urandom);
    sif_w_ready  <= 4'($urandom);
    if (rst_n) begin
      for (int k = 0; k < NPORT; k++) begin
        if (sif_aw_valid[k] && sif_aw_ready[k]) aw_log[k].push_back(sif_aw.addr);
        if (sif_w_valid[k] && sif_w_ready[k]) begin
          w_log[k].push_back(sif_w.data);
          if (k == 0) b_owed++;
        end
      end
      if ((sif_aw_valid != '0 || sif_w_valid != '0) && !(s_aw_valid && s_w_valid)) pair_err++;
      if ((s_aw_valid && s_aw_ready) != (s_w_valid && s_w_ready)) pair_err++;
      if (dut.aw_done != '0 && !(s_aw_valid && s_aw_ready)) partial_aw++;
      if (dut.w_done  != '0 && !(s_w_valid && s_w_ready))  partial_w++;
      // SIF0 answers each write with OKAY and each read with a pattern
      if (sif0_b_valid && sif0_b_ready) sif0_b_valid <= 1'b0;
      else if (!sif0_b_valid && b_owed > 0) begin sif0_b_valid <= 1'b1; b_owed--; end
      if (sif0_r_valid && sif0_r_ready) sif0_r_valid <= 1'b0;
      if (sif0_ar_valid && sif0_ar_ready) begin
        sif0_r_valid <= 1'b1;
        sif0_r <= '{data: ~sif0_ar.addr, resp: RESP_OKAY, last: 1'b1};
      end
    end else begin
      sif0_b_valid <= 1'b0; sif0_r_valid <= 1'b0;
    end
  end
  assign sif0_b = '{resp: RESP_OKAY};
  assign sif0_ar_ready = !sif0_r_valid;

  logic aw_hs_q, w_hs_q, ar_hs_q;
  int   n_b = 0;
  data_t r_got; logic r_seen = 1'b0;
  always @(posedge clk) begin
    aw_hs_q <= s_aw_valid && s_aw_ready;
    w_hs_q  <= s_w_valid && s_w_ready;
    ar_hs_q <= s_ar_valid && s_ar_ready;
    if (s_b_valid && s_b_ready) n_b++;
    if (s_r_valid && s_r_ready) begin r_got <= s_r_data; r_seen <= 1'b1; end
  end

  task automatic send_aw(addr_t a);
    s_aw = '{addr: a, prot: 3'd0}; s_aw_valid = 1'b1;
    do begin @(posedge clk); #1; end while (!aw_hs_q);
    s_aw_valid = 1'b0;
  endtask
  task automatic send_w(data_t d);
    s_w_data = d; s_w_strb = 4'hF; s_w_valid = 1'b1;
    do begin @(posedge clk); #1; end while (!w_hs_q);
    s_w_valid = 1'b0;
  endtask

  // Expected per-interface logs
  addr_t exp_aw [NPORT][$];
  data_t exp_w  [NPORT][$];
  int    n_sent = 0;
  function automatic void expect_write(addr_t a, data_t d);
    for (int k = 0; k < NPORT; k++)
      if (k == 0 || a[31:12] == 20'h4) begin
        exp_aw[k].push_back(a); exp_w[k].push_back(d);
      end
    n_sent++;
  endfunction

  initial begin
    s_aw_valid = 0; s_w_valid = 0; s_ar_valid = 0; s_b_ready = 1; s_r_ready = 1;
    s_aw = '0; s_w_data = '0; s_w_strb = '0; s_ar = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int i = 0; i < 40; i++) begin
      automatic addr_t a = {16'h0, 4'($urandom_range(0, 5)), 10'($urandom), 2'b00};
      automatic data_t d = $urandom;
      expect_write(a, d);
      case (i % 3)
        0: fork send_aw(a); send_w(d); join
        1: fork begin repeat (2) @(posedge clk); #1; send_aw(a); end send_w(d); join
        default: fork send_aw(a); begin repeat (2) @(posedge clk); #1; send_w(d); end join
      endcase
    end
    // back to back: address and data streams run independently
    begin
      addr_t pa [4] = '{32'h4010, 32'h1020, 32'h4030, 32'h0040};
      for (int i = 0; i < 4; i++) expect_write(pa[i], 32'hD0 + i);
      fork
        for (int i = 0; i < 4; i++) send_aw(pa[i]);
        for (int i = 0; i < 4; i++) send_w(32'hD0 + i);
      join
    end
    repeat (30) @(posedge clk); #1;

    for (int k = 0; k < NPORT; k++) begin
      check(aw_log[k].size() == exp_aw[k].size(), $sformatf("SIF%0d AW count %0d/%0d", k, aw_log[k].size(), exp_aw[k].size()));
      check(w_log[k].size() == exp_w[k].size(), $sformatf("SIF%0d W count", k));
      foreach (exp_aw[k][i]) if (i < aw_log[k].size())
        check(aw_log[k][i] == exp_aw[k][i], $sformatf("SIF%0d AW %0d addr", k, i));
      foreach (exp_w[k][i]) if (i < w_log[k].size())
        check(w_log[k][i] == exp_w[k][i], $sformatf("SIF%0d W %0d data", k, i));
    end
    check(exp_aw[1].size() > 0 && exp_aw[1].size() < exp_aw[0].size(), "mix of multi and single writes");
    check(n_b == n_sent, "one B per write through SIF0");
    check(sif_aw.len == 8'd0 && sif_aw.size == 3'd2 && sif_aw.burst == BURST_INCR && sif_w.last,
          "SIF beats are single full-width INCR");
    check(partial_aw > 0, "split AW acceptance happened");
    check(partial_w > 0, "split W acceptance happened");
    check(pair_err == 0, $sformatf("address and data forked as a pair (%0d violations)", pair_err));

    // read through SIF0
    s_ar = '{addr: 32'h4044, prot: 3'd0}; s_ar_valid = 1'b1;
    do begin @(posedge clk); #1; end while (!ar_hs_q);
    s_ar_valid = 1'b0;
    repeat (5) @(posedge clk); #1;
    check(r_seen && r_got == ~32'h4044, "read passes through SIF0");

    $display("partial AW %0d, partial W %0d", partial_aw, partial_w);
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
