// tb_nic400: self-checking testbench of the 4x4 interconnect.
//
// Behind each master interface sits an AXI4-to-Lite converter and a
// stalling memory model, so each master interface has its own memory. The
// test checks the address map and visibility (slave_if0 reaches all four
// windows, slave_ifk only reaches master_ifk through 0x4XXX, anything else
// answers DECERR), burst writes, reads with data and RLAST, and concurrent
// traffic from two slave interfaces to one master interface. It counts how
// often the arbiter saw two requesters, how often single-subordinate-per-ID
// held an address back, and how often the default subordinate answered; a
// count of zero is a failure.
module tb_nic400;
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

  for (genvar k = 0; k < NPORT; k++) begin : g_mem
    logic aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready, ar_valid, ar_ready, r_valid, r_ready;
    lax_t aw, ar; data_t w_data, r_data; strb_t w_strb; resp_e b_resp, r_resp, cb_resp;
    axi2axl #(.ID_W(1)) u_cvt (.clk, .rst_n,
      .s_aw_valid(mi_aw_valid[k]), .s_aw_ready(mi_aw_ready[k]), .s_aw_id(mi_aw_id[k]), .s_aw(mi_aw[k]),
      .s_w_valid(mi_w_valid[k]), .s_w_ready(mi_w_ready[k]), .s_w(mi_w[k]),
      .s_b_valid(mi_b_valid[k]), .s_b_ready(mi_b_ready[k]), .s_b_id(mi_b_id[k]), .s_b_resp(cb_resp),
      .s_ar_valid(mi_ar_valid[k]), .s_ar_ready(mi_ar_ready[k]), .s_ar_id(mi_ar_id[k]), .s_ar(mi_ar[k]),
      .s_r_valid(mi_r_valid[k]), .s_r_ready(mi_r_ready[k]), .s_r_id(mi_r_id[k]), .s_r(mi_r[k]),
      .m_aw_valid(aw_valid), .m_aw_ready(aw_ready), .m_aw(aw),
      .m_w_valid(w_valid), .m_w_ready(w_ready), .m_w_data(w_data), .m_w_strb(w_strb),
      .m_b_valid(b_valid), .m_b_ready(b_ready), .m_b_resp(b_resp),
      .m_ar_valid(ar_valid), .m_ar_ready(ar_ready), .m_ar(ar),
      .m_r_valid(r_valid), .m_r_ready(r_ready), .m_r_data(r_data), .m_r_resp(r_resp));
    assign mi_b[k] = '{resp: cb_resp};
    axil_mem_model #(.STALL(1'b1), .SEED(11 + k)) u_mem (.clk, .rst_n,
      .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w_data, .w_strb,
      .b_valid, .b_ready, .b_resp, .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r_data, .r_resp);
  end

  function automatic data_t memrd(int k, addr_t a);
    case (k)
      0: return g_mem[0].u_mem.mem[a[11:2]];
      1: return g_mem[1].u_mem.mem[a[11:2]];
      2: return g_mem[2].u_mem.mem[a[11:2]];
      default: return g_mem[3].u_mem.mem[a[11:2]];
    endcase
  endfunction

  // handshake monitors and response queues
  logic [NPORT-1:0] aw_hs_q, w_hs_q, ar_hs_q;
  resp_e b_q [NPORT][$];
  r_t    r_q [NPORT][$];
  int n_conflict = 0, n_cdas = 0, n_decerr = 0;
  always @(posedge clk) begin
    aw_hs_q <= si_aw_valid & si_aw_ready;
    w_hs_q  <= si_w_valid & si_w_ready;
    ar_hs_q <= si_ar_valid & si_ar_ready;
    if (rst_n) begin
      for (int s = 0; s < NPORT; s++) begin
        if (si_b_valid[s] && si_b_ready[s]) begin
          b_q[s].push_back(si_b[s].resp);
          if (si_b[s].resp == RESP_DECERR) n_decerr++;
        end
        if (si_r_valid[s] && si_r_ready[s]) r_q[s].push_back(si_r[s]);
      end
      if (dut.u_bm.aw_conflict != '0) n_conflict++;
      if (dut.u_bm.cdas_wstall != '0) n_cdas++;
    end
  end

  task automatic send_aw(int s, addr_t a, int len);
    si_aw[s] = '{addr: a, len: 8'(len), size: 3'd2, burst: BURST_INCR, lock: 1'b0, cache: 4'd0, prot: 3'd0};
    si_aw_valid[s] = 1'b1;
    do begin @(posedge clk); #1; end while (!aw_hs_q[s]);
    si_aw_valid[s] = 1'b0;
  endtask
  task automatic send_w(int s, data_t d, bit last);
    si_w[s] = '{data: d, strb: 4'hF, last: last};
    si_w_valid[s] = 1'b1;
    do begin @(posedge clk); #1; end while (!w_hs_q[s]);
    si_w_valid[s] = 1'b0;
  endtask
  task automatic write(int s, addr_t a, int len, data_t d);
    fork
      send_aw(s, a, len);
      for (int i = 0; i <= len; i++) send_w(s, d + data_t'(i), i == len);
    join
  endtask
  task automatic wait_b(int s, int n);
    for (int t = 0; t < 2000 && b_q[s].size() < n; t++) begin @(posedge clk); #1; end
  endtask
  task automatic read(int s, addr_t a, int len);
    si_ar[s] = '{addr: a, len: 8'(len), size: 3'd2, burst: BURST_INCR, lock: 1'b0, cache: 4'd0, prot: 3'd0};
    si_ar_valid[s] = 1'b1;
    do begin @(posedge clk); #1; end while (!ar_hs_q[s]);
    si_ar_valid[s] = 1'b0;
    for (int t = 0; t < 2000 && r_q[s].size() < len + 1; t++) begin @(posedge clk); #1; end
  endtask

  initial begin
    si_aw_valid = '0; si_w_valid = '0; si_ar_valid = '0; si_b_ready = '1; si_r_ready = '1;
    for (int s = 0; s < NPORT; s++) begin si_aw[s] = '0; si_w[s] = '0; si_ar[s] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // slave_if0: private windows, multi window (to master_if0), posted
    // back to back so that destination changes must wait
    write(0, 32'h0100, 0, 32'h0000_0100);
    write(0, 32'h1100, 0, 32'h0000_1100);
    write(0, 32'h2100, 0, 32'h0000_2100);
    write(0, 32'h3100, 0, 32'h0000_3100);
    write(0, 32'h4180, 0, 32'h0000_4180);
    write(0, 32'h8000, 0, 32'h0000_8000);          // outside the map
    wait_b(0, 6);
    check(b_q[0].size() == 6, "six B on slave_if0");
    for (int i = 0; i < 5 && i < b_q[0].size(); i++) check(b_q[0][i] == RESP_OKAY, "OKAY");
    if (b_q[0].size() == 6) check(b_q[0][5] == RESP_DECERR, "DECERR outside the map");
    b_q[0].delete();
    check(memrd(0, 32'h0100) == 32'h0100, "0x0100 -> master_if0");
    check(memrd(1, 32'h1100) == 32'h1100, "0x1100 -> master_if1");
    check(memrd(2, 32'h2100) == 32'h2100, "0x2100 -> master_if2");
    check(memrd(3, 32'h3100) == 32'h3100, "0x3100 -> master_if3");
    check(memrd(0, 32'h4180) == 32'h4180, "0x4180 from slave_if0 -> master_if0");
    check(memrd(1, 32'h4180) == 0, "no stray copy on master_if1");

    // slave_if1..3 reach only their own master interface, only via 0x4XXX
    for (int s = 1; s < NPORT; s++) write(s, 32'h4200, 0, 32'hE000_0000 + s);
    for (int s = 1; s < NPORT; s++) begin
      wait_b(s, 1);
      check(b_q[s].size() == 1 && b_q[s][0] == RESP_OKAY, "slave_ifk write OKAY");
      check(memrd(s, 32'h4200) == 32'hE000_0000 + s, "slave_ifk -> master_ifk");
      b_q[s].delete();
    end
    check(memrd(0, 32'h4200) == 0, "slave_ifk never reaches master_if0");
    write(1, 32'h2000, 0, 32'h1234);
    wait_b(1, 1);
    check(b_q[1].size() == 1 && b_q[1][0] == RESP_DECERR, "slave_if1 to 0x2000 is not visible");
    b_q[1].delete();

    // burst write through slave_if0
    write(0, 32'h3200, 3, 32'hB0);
    wait_b(0, 1); b_q[0].delete();
    for (int i = 0; i < 4; i++) check(memrd(3, 32'h3200 + 4 * i) == 32'hB0 + i, "burst beat");

    // slave_if0 and slave_if1 compete for master_if1
    fork
      for (int i = 0; i < 8; i++) write(0, 32'h1400 + 4 * i, 0, 32'hA0 + i);
      for (int i = 0; i < 8; i++) write(1, 32'h4600 + 4 * i, 0, 32'hC0 + i);
    join
    wait_b(0, 8); wait_b(1, 8);
    check(b_q[0].size() == 8 && b_q[1].size() == 8, "all competing writes answered");
    b_q[0].delete(); b_q[1].delete();
    for (int i = 0; i < 8; i++) begin
      check(memrd(1, 32'h1400 + 4 * i) == 32'hA0 + i, "competing write from slave_if0");
      check(memrd(1, 32'h4600 + 4 * i) == 32'hC0 + i, "competing write from slave_if1");
    end

    // reads through slave_if0
    read(0, 32'h2100, 0);
    check(r_q[0].size() == 1 && r_q[0][0].data == 32'h2100 && r_q[0][0].last, "read master_if2");
    r_q[0].delete();
    read(0, 32'h3200, 3);
    check(r_q[0].size() == 4, "burst read beats");
    foreach (r_q[0][i]) begin
      check(r_q[0][i].data == 32'hB0 + i, "burst read data");
      check(r_q[0][i].last == (i == 3), "burst read RLAST");
    end
    r_q[0].delete();
    read(0, 32'h9000, 1);
    check(r_q[0].size() == 2 && r_q[0][0].resp == RESP_DECERR && r_q[0][1].last, "read DECERR burst");
    r_q[0].delete();

    $display("arbitration conflicts %0d, held by single-subordinate-per-ID %0d, DECERR %0d",
             n_conflict, n_cdas, n_decerr);
    check(n_conflict > 0, "arbitration between two slave interfaces happened");
    check(n_cdas > 0, "single-subordinate-per-ID hold happened");
    check(n_decerr > 0, "default subordinate answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
