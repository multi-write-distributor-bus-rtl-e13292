// mwd_pkg: types and constants shared by the multi-write distributor bus.
//
// The bus carries 32-bit addresses and 32-bit data on every interface (the
// interconnect configuration lists 32/32 for all four slave and all four
// master interfaces). AXI4 channel payloads are bundled as packed structs so
// that FIFOs and multiplexers can move a whole channel at once; VALID/READY
// and IDs are kept outside the structs.
//
// Address map: the 4 KB window 0x4000-0x4FFF is the multi-write window that
// every master interface answers to; 0x0000, 0x1000, 0x2000 and 0x3000 are
// the private windows of master interfaces 0..3. The order of the private
// windows follows the block diagram of the bus (0x1XXX on the second
// interface, 0x2XXX on the third, 0x3XXX on the fourth).
package mwd_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned NPORT  = 4;          // slave and master interfaces

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STRB_W-1:0] strb_t;

  // AXI burst types and responses
  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_e;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  // Address (AW and AR) channel payload without ID
  typedef struct packed {
    addr_t      addr;
    logic [7:0] len;
    logic [2:0] size;
    burst_e     burst;
    logic       lock;
    logic [3:0] cache;
    logic [2:0] prot;
  } ax_t;

  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } w_t;

  typedef struct packed {
    resp_e resp;
  } b_t;

  typedef struct packed {
    data_t data;
    resp_e resp;
    logic  last;
  } r_t;

  // AXI4-Lite address payload
  typedef struct packed {
    addr_t      addr;
    logic [2:0] prot;
  } lax_t;

  // Address windows, 4 KB each, selected by address bits [31:12]
  localparam logic [19:0] MULTI_PAGE = 20'h00004;   // 0x4000-0x4FFF
  localparam logic [19:0] PRIV_PAGE [NPORT] = '{20'h00000, 20'h00001, 20'h00002, 20'h00003};

  function automatic logic is_multi(addr_t a);
    return a[ADDR_W-1:12] == MULTI_PAGE;
  endfunction

  // Single-beat full-width AXI4 address beat built from an AXI4-Lite one
  function automatic ax_t lite_to_ax(lax_t l);
    ax_t a;
    a.addr  = l.addr;
    a.len   = 8'd0;
    a.size  = 3'($clog2(STRB_W));
    a.burst = BURST_INCR;
    a.lock  = 1'b0;
    a.cache = 4'd0;
    a.prot  = l.prot;
    return a;
  endfunction

  // Worse of two responses (DECERR > SLVERR > EXOKAY/OKAY)
  function automatic resp_e worse(resp_e a, resp_e b);
    return (a > b) ? a : b;
  endfunction

endpackage
