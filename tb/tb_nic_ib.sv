// tb_nic_ib: self-checking testbench of the interconnect input buffer.
//
// Streams random payloads through all five channel FIFOs at once (AW, W and
// AR downstream, B and R upstream) with random VALID and READY on both ends,
// and checks order and contents against reference queues. It also checks the
// configured depth of two (the third push is refused while nothing drains)
// and the one-cycle latency from push to output.
module tb_nic_ib;
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
  logic m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  ax_t s_aw, s_ar, m_aw, m_ar; w_t s_w, m_w; b_t s_b, m_b; r_t s_r, m_r;

  nic_ib dut (.*);

  ax_t q_aw[$], q_ar[$]; w_t q_w[$]; b_t q_b[$]; r_t q_r[$];
  int n_aw = 0, n_w = 0, n_b = 0, n_ar = 0, n_r = 0;
  bit random_phase = 1'b0;

  // Producers change payload only after a handshake; consumers compare.
  always @(posedge clk) begin
    if (rst_n && random_phase) begin
      if (s_aw_valid && s_aw_ready) begin q_aw.push_back(s_aw); s_aw <= ax_t'({$urandom, $urandom}); end
      if (s_w_valid && s_w_ready)   begin q_w.push_back(s_w);   s_w  <= w_t'({$urandom, $urandom}); end
      if (s_ar_valid && s_ar_ready) begin q_ar.push_back(s_ar); s_ar <= ax_t'({$urandom, $urandom}); end
      if (m_b_valid && m_b_ready)   begin q_b.push_back(m_b);   m_b  <= b_t'($urandom); end
      if (m_r_valid && m_r_ready)   begin q_r.push_back(m_r);   m_r  <= r_t'({$urandom, $urandom}); end
      if (m_aw_valid && m_aw_ready) begin check(q_aw.size() > 0 && m_aw == q_aw.pop_front(), "AW order"); n_aw++; end
      if (m_w_valid && m_w_ready)   begin check(q_w.size() > 0 && m_w == q_w.pop_front(), "W order");   n_w++;  end
      if (m_ar_valid && m_ar_ready) begin check(q_ar.size() > 0 && m_ar == q_ar.pop_front(), "AR order"); n_ar++; end
      if (s_b_valid && s_b_ready)   begin check(q_b.size() > 0 && s_b == q_b.pop_front(), "B order");   n_b++;  end
      if (s_r_valid && s_r_ready)   begin check(q_r.size() > 0 && s_r == q_r.pop_front(), "R order");   n_r++;  end
      // valid stays up until taken; ready is free
      if (!(s_aw_valid && !s_aw_ready)) s_aw_valid <= 1'($urandom);
      if (!(s_w_valid && !s_w_ready))   s_w_valid  <= 1'($urandom);
      if (!(s_ar_valid && !s_ar_ready)) s_ar_valid <= 1'($urandom);
      if (!(m_b_valid && !m_b_ready))   m_b_valid  <= 1'($urandom);
      if (!(m_r_valid && !m_r_ready))   m_r_valid  <= 1'($urandom);
      m_aw_ready <= 1'($urandom); m_w_ready <= 1'($urandom); m_ar_ready <= 1'($urandom);
      s_b_ready  <= 1'($urandom); s_r_ready <= 1'($urandom);
    end
  end

  initial begin
    {s_aw_valid, s_w_valid, s_ar_valid, m_b_valid, m_r_valid} = '0;
    {m_aw_ready, m_w_ready, m_ar_ready, s_b_ready, s_r_ready} = '0;
    s_aw = '0; s_w = '0; s_ar = '0; m_b = '0; m_r = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Depth and latency on the AW channel
    s_aw = ax_t'(64'h1111); s_aw_valid = 1'b1;
    @(posedge clk); #1;
    check(m_aw_valid && m_aw == ax_t'(64'h1111), "one cycle from push to output");
    s_aw = ax_t'(64'h2222);
    @(posedge clk); #1;
    check(!s_aw_ready, "full after two entries");
    s_aw_valid = 1'b0;
    m_aw_ready = 1'b1;
    @(posedge clk); #1;
    check(m_aw == ax_t'(64'h2222), "second entry next");
    @(posedge clk); #1;
    check(!m_aw_valid, "empty after two pops");
    m_aw_ready = 1'b0;

    // Random traffic on all channels
    random_phase = 1'b1;
    repeat (3000) @(posedge clk);
    random_phase = 1'b0;
    $display("transfers aw %0d w %0d ar %0d b %0d r %0d", n_aw, n_w, n_ar, n_b, n_r);
    check(n_aw > 100 && n_w > 100 && n_ar > 100 && n_b > 100 && n_r > 100, "traffic on every channel");
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
