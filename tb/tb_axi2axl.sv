// tb_axi2axl: self-checking testbench of the AXI4 to AXI4-Lite converter.
//
// Drives INCR, FIXED, WRAP and narrow bursts, posted (outstanding) writes and
// burst reads into the converter, with a stalling AXI4-Lite memory model
// behind it. Checks: the sequence of AXI4-Lite addresses against addresses
// computed here from the burst rules, one merged B per burst with the right
// ID, memory contents, R data/ID, and RLAST on exactly the last beat.
module tb_axi2axl;
  import mwd_pkg::*;

  localparam int ID_W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DUT signals
  logic s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  logic [ID_W-1:0] s_aw_id, s_b_id, s_ar_id, s_r_id;
  ax_t s_aw, s_ar; w_t s_w; resp_e s_b_resp; r_t s_r;
  logic m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  lax_t m_aw, m_ar; data_t m_w_data, m_r_data; strb_t m_w_strb; resp_e m_b_resp, m_r_resp;

  axi2axl #(.ID_W(ID_W)) dut (.*);

  axil_mem_model #(.STALL(1'b1), .SEED(7)) u_mem (
    .clk, .rst_n,
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid(m_w_valid), .w_ready(m_w_ready), .w_data(m_w_data), .w_strb(m_w_strb),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b_resp(m_b_resp),
    .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar(m_ar),
    .r_valid(m_r_valid), .r_ready(m_r_ready), .r_data(m_r_data), .r_resp(m_r_resp));

  // Monitors (sample pre-edge values)
  addr_t lite_aw_q[$], lite_ar_q[$];
  logic [ID_W-1:0] b_id_q[$];
  resp_e b_resp_q[$];
  r_t r_q[$];
  logic [ID_W-1:0] r_id_q[$];
  logic aw_hs_q, w_hs_q, ar_hs_q;
  always @(posedge clk) begin
    aw_hs_q <= s_aw_valid && s_aw_ready;
    w_hs_q  <= s_w_valid && s_w_ready;
    ar_hs_q <= s_ar_valid && s_ar_ready;
    if (rst_n) begin
      if (m_aw_valid && m_aw_ready) lite_aw_q.push_back(m_aw.addr);
      if (m_ar_valid && m_ar_ready) lite_ar_q.push_back(m_ar.addr);
      if (s_b_valid && s_b_ready) begin b_id_q.push_back(s_b_id); b_resp_q.push_back(s_b_resp); end
      if (s_r_valid && s_r_ready) begin r_q.push_back(s_r); r_id_q.push_back(s_r_id); end
    end
  end

  // Reference burst addresses, from the AXI burst rules
  function automatic addr_t beat_addr(addr_t a, int i, logic [2:0] size, burst_e b, int len);
    int unsigned step = 1 << size;
    int unsigned win  = (len + 1) * step;
    case (b)
      BURST_FIXED: return a;
      BURST_WRAP:  return (a / win) * win + ((a % win) + i * step) % win;
      default:     return (i == 0) ? a : (a / step) * step + i * step;
    endcase
  endfunction

  task automatic send_aw(logic [ID_W-1:0] id, addr_t a, int len, logic [2:0] size, burst_e b);
    s_aw_id = id;
    s_aw = '{addr: a, len: 8'(len), size: size, burst: b, lock: 1'b0, cache: 4'd0, prot: 3'd0};
    s_aw_valid = 1'b1;
    do begin @(posedge clk); #1; end while (!aw_hs_q);
    s_aw_valid = 1'b0;
  endtask

  task automatic send_w(data_t d, strb_t st, bit last);
    s_w = '{data: d, strb: st, last: last};
    s_w_valid = 1'b1;
    do begin @(posedge clk); #1; end while (!w_hs_q);
    s_w_valid = 1'b0;
  endtask

  task automatic send_ar(logic [ID_W-1:0] id, addr_t a, int len, logic [2:0] size, burst_e b);
    s_ar_id = id;
    s_ar = '{addr: a, len: 8'(len), size: size, burst: b, lock: 1'b0, cache: 4'd0, prot: 3'd0};
    s_ar_valid = 1'b1;
    do begin @(posedge clk); #1; end while (!ar_hs_q);
    s_ar_valid = 1'b0;
  endtask

  task automatic wait_b(int n);
    int t = 0;
    while (b_id_q.size() < n && t < 2000) begin @(posedge clk); #1; t++; end
  endtask

  // Full-width write burst with data base+i, then checks addresses and B
  task automatic write_burst(logic [ID_W-1:0] id, addr_t a, int len, burst_e b, data_t base);
    lite_aw_q.delete();
    fork
      send_aw(id, a, len, 3'd2, b);
      for (int i = 0; i <= len; i++) send_w(base + data_t'(i), 4'hF, i == len);
    join
    wait_b(1);
    check(b_id_q.size() == 1, "one B per burst");
    if (b_id_q.size() > 0) begin
      check(b_id_q[0] == id, "B id");
      check(b_resp_q[0] == RESP_OKAY, "B resp");
    end
    b_id_q.delete(); b_resp_q.delete();
    check(lite_aw_q.size() == len + 1, "lite AW count");
    foreach (lite_aw_q[i])
      check(lite_aw_q[i] == beat_addr(a, i, 3'd2, b, len),
            $sformatf("lite AW %0d addr %h", i, lite_aw_q[i]));
  endtask

  initial begin
    s_aw_valid = 0; s_w_valid = 0; s_ar_valid = 0; s_b_ready = 1; s_r_ready = 1;
    s_aw = '0; s_w = '0; s_ar = '0; s_aw_id = '0; s_ar_id = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // INCR burst of four words
    write_burst(4'd3, 32'h100, 3, BURST_INCR, 32'hA000_0000);
    for (int i = 0; i < 4; i++)
      check(u_mem.mem[(32'h100 >> 2) + i] == 32'hA000_0000 + i, "INCR data in memory");
    // FIXED burst: every beat to the same word, last one remains
    write_burst(4'd9, 32'h200, 3, BURST_FIXED, 32'hB000_0000);
    check(u_mem.mem[32'h200 >> 2] == 32'hB000_0003, "FIXED last beat kept");
    // WRAP burst starting in the middle of its 16-byte window
    write_burst(4'd5, 32'h308, 3, BURST_WRAP, 32'hC000_0000);
    check(u_mem.mem[32'h308 >> 2] == 32'hC000_0000 && u_mem.mem[32'h300 >> 2] == 32'hC000_0002,
          "WRAP data placement");

    // Narrow INCR burst: bytes, each on its own lane
    lite_aw_q.delete();
    fork
      send_aw(4'd1, 32'h400, 3, 3'd0, BURST_INCR);
      for (int i = 0; i < 4; i++) send_w({4{8'(8'h10 + i)}}, strb_t'(1 << i), i == 3);
    join
    wait_b(1); b_id_q.delete(); b_resp_q.delete();
    foreach (lite_aw_q[i]) check(lite_aw_q[i] == 32'h400 + i, "narrow beat address");
    check(u_mem.mem[32'h400 >> 2] == 32'h1312_1110, "narrow bytes assembled");

    // Posted writes: three addresses issued before any data or response
    fork
      begin
        send_aw(4'd1, 32'h500, 0, 3'd2, BURST_INCR);
        send_aw(4'd2, 32'h504, 0, 3'd2, BURST_INCR);
        send_aw(4'd7, 32'h508, 1, 3'd2, BURST_INCR);
      end
      begin
        repeat (4) @(posedge clk); #1;
        send_w(32'h11, 4'hF, 1); send_w(32'h22, 4'hF, 1);
        send_w(32'h33, 4'hF, 0); send_w(32'h44, 4'hF, 1);
      end
    join
    wait_b(3);
    check(b_id_q.size() == 3, "three B for three posted bursts");
    if (b_id_q.size() == 3)
      check(b_id_q[0] == 1 && b_id_q[1] == 2 && b_id_q[2] == 7, "B ids in order");
    check(u_mem.mem[32'h50C >> 2] == 32'h44, "posted burst data");
    b_id_q.delete(); b_resp_q.delete();

    // Burst read back of the INCR burst
    lite_ar_q.delete();
    send_ar(4'd6, 32'h100, 3, 3'd2, BURST_INCR);
    for (int t = 0; t < 200 && r_q.size() < 4; t++) begin @(posedge clk); #1; end
    check(r_q.size() == 4, "four R beats");
    foreach (r_q[i]) begin
      check(r_q[i].data == 32'hA000_0000 + i, $sformatf("R data %0d", i));
      check(r_id_q[i] == 4'd6, "R id");
      check(r_q[i].last == (i == 3), "RLAST only on last beat");
    end
    foreach (lite_ar_q[i]) check(lite_ar_q[i] == 32'h100 + 4 * i, "lite AR address");
    r_q.delete(); r_id_q.delete();
    // WRAP read
    send_ar(4'd2, 32'h308, 3, 3'd2, BURST_WRAP);
    for (int t = 0; t < 200 && r_q.size() < 4; t++) begin @(posedge clk); #1; end
    check(r_q.size() == 4 && r_q[2].data == 32'hC000_0002 && r_q[3].last, "WRAP read");

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
