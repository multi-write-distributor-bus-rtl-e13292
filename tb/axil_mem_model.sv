// axil_mem_model: behavioural AXI4-Lite subordinate used by the testbenches.
//
// Stands in for the subordinates behind the bus: a 1024-word memory (the
// word is picked by address bits [11:2], so one 4 KB window) with byte
// strobes. A write is taken when AWVALID and WVALID are both high, then
// answered with OKAY on B; a read is answered on R in the next cycle. When
// STALL is set, READY is withheld at random to
// exercise back-pressure. A testbench can also set `hold` to stop accepting
// writes altogether for a while. It counts the writes and reads it served and
// remembers the address of the last write. Behavioural test equipment, not
// part of the bus.
module axil_mem_model
  import mwd_pkg::*;
#(
  parameter bit          STALL = 1'b1,
  parameter int unsigned SEED  = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  aw_valid,
  output logic  aw_ready,
  input  lax_t  aw,
  input  logic  w_valid,
  output logic  w_ready,
  input  data_t w_data,
  input  strb_t w_strb,
  output logic  b_valid,
  input  logic  b_ready,
  output resp_e b_resp,
  input  logic  ar_valid,
  output logic  ar_ready,
  input  lax_t  ar,
  output logic  r_valid,
  input  logic  r_ready,
  output data_t r_data,
  output resp_e r_resp
);
  data_t       mem [1024];
  int unsigned n_writes, n_reads;
  addr_t       last_waddr;
  logic        go_w, go_r;
  bit          hold = 1'b0;
  int unsigned rnd;

  initial begin
    rnd = SEED;
    foreach (mem[i]) mem[i] = '0;
  end

  assign aw_ready = aw_valid && w_valid && !b_valid && go_w && !hold;
  assign w_ready  = aw_ready;
  assign ar_ready = ar_valid && !r_valid && go_r;
  assign b_resp   = RESP_OKAY;
  assign r_resp   = RESP_OKAY;

  always @(posedge clk) begin
    rnd  = rnd * 1103515245 + 12345;
    go_w <= !STALL || rnd[17:16] != 2'b00;
    go_r <= !STALL || rnd[19:18] != 2'b00;
    if (!rst_n) begin
      b_valid   <= 1'b0;
      r_valid   <= 1'b0;
      n_writes  <= 0;
      n_reads   <= 0;
      last_waddr <= '0;
    end else begin
      if (b_valid && b_ready) b_valid <= 1'b0;
      if (r_valid && r_ready) r_valid <= 1'b0;
      if (aw_ready) begin
        for (int i = 0; i < STRB_W; i++)
          if (w_strb[i]) mem[aw.addr[11:2]][8*i +: 8] <= w_data[8*i +: 8];
        b_valid    <= 1'b1;
        n_writes   <= n_writes + 1;
        last_waddr <= aw.addr;
      end
      if (ar_ready) begin
        r_valid <= 1'b1;
        r_data  <= mem[ar.addr[11:2]];
        n_reads <= n_reads + 1;
      end
    end
  end
endmodule
