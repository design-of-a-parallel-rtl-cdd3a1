// pva_pkg: sizes, bus encodings and shared helper functions of the Parallel
// Vector Access (PVA) unit.
//
// The unit serves base-stride vector commands <B, S, L> on a word-interleaved
// memory of NBANK SDRAM banks. Word address A lives in bank A mod NBANK at
// bank-local word address A >> MB. Sizes follow the prototype: 16 banks of
// 32-bit words, 32-element vectors (one 128-byte L2 line), 8 transaction ids,
// a 128-bit BC bus carrying 64 bits per data cycle in alternating halves, and
// SDRAM with four internal banks, RAS-to-CAS and CAS latency of two cycles.
//
// Choices of this design (the prototype does not fix them): the bit order of
// the bank-local address (row | internal bank | column), the two-bit command
// codes, the precharge and write-recovery times, and request and data fields
// on separate wires instead of one multiplexed set of lines.
package pva_pkg;

  localparam int unsigned NBANK  = 16;         // memory banks, M = 2^m
  localparam int unsigned MB     = 4;          // m = log2(NBANK)
  localparam int unsigned AW     = 32;         // vector bus address / stride width
  localparam int unsigned DW     = 32;         // word width of one bank
  localparam int unsigned VLEN   = 32;         // elements per vector command
  localparam int unsigned IDXW   = 5;          // element index width
  localparam int unsigned LENW   = 6;          // length field width (1..32)
  localparam int unsigned NTID   = 8;          // outstanding transactions
  localparam int unsigned TIDW   = 3;          // transaction id width
  localparam int unsigned DLW    = 3;          // width of log2(NextHit), 0..MB
  localparam int unsigned BUSW   = 128;        // BC bus data lines
  localparam int unsigned NDCYC  = VLEN / 2;   // 64-bit data cycles per line

  // SDRAM geometry of one bank: two 256 Mbit x16 parts side by side
  localparam int unsigned NIB    = 4;          // internal banks per part
  localparam int unsigned IBW    = 2;
  localparam int unsigned COLW   = 9;
  localparam int unsigned ROWW   = 13;
  localparam int unsigned SDAW   = 13;         // SDRAM address pins, A10 = auto precharge
  localparam int unsigned AP_BIT = 10;

  // SDRAM timing in clock cycles
  localparam int unsigned T_RCD_DEF = 2;       // RAS latency (activate to read/write)
  localparam int unsigned T_CL_DEF  = 2;       // CAS latency
  localparam int unsigned T_RP_DEF  = 2;       // precharge to activate
  localparam int unsigned T_WR_DEF  = 2;       // write recovery before precharge

  typedef enum logic [1:0] {
    CMD_VEC_READ    = 2'd0,
    CMD_VEC_WRITE   = 2'd1,
    CMD_STAGE_READ  = 2'd2,
    CMD_STAGE_WRITE = 2'd3
  } vcmd_e;

  // One vector bus request cycle.
  typedef struct packed {
    logic              valid;
    vcmd_e             cmd;
    logic [TIDW-1:0]   tid;
    logic [AW-1:0]     addr;     // base address B (word address)
    logic [AW-1:0]     stride;   // stride S (words)
    logic [LENW-1:0]   length;   // length L, 1..VLEN
  } vbus_req_t;

  // A vector request as queued in a bank controller.
  typedef struct packed {
    logic [TIDW-1:0]   tid;
    logic              wr;
    logic [AW-1:0]     stride;
    logic [AW-1:0]     addr;     // base B, or the firsthit address once acc is set
    logic [IDXW-1:0]   idx;      // FirstHit index K
    logic [DLW-1:0]    dlog;     // log2(NextHit delta) = m - s
    logic [LENW-1:0]   count;    // elements of this vector held by this bank
    logic              acc;      // address calculation complete
  } vreq_t;

  // State of one vector context.
  typedef struct packed {
    logic              valid;
    logic [TIDW-1:0]   tid;
    logic              wr;
    logic [AW-1:0]     addr;     // address of the next element to access
    logic [IDXW-1:0]   idx;      // its element index
    logic [AW-1:0]     step;     // S << (m - s)
    logic [DLW-1:0]    dlog;
    logic [LENW-1:0]   remaining;
    logic              first;    // no access issued yet
  } vctx_t;

  typedef enum logic [2:0] {
    SD_NOP = 3'd0,
    SD_ACT = 3'd1,
    SD_RD  = 3'd2,
    SD_WR  = 3'd3,
    SD_PRE = 3'd4
  } sd_op_e;

  typedef struct packed {
    sd_op_e            op;
    logic [IBW-1:0]    ba;
    logic [SDAW-1:0]   a;        // row for ACT, {A10 = auto precharge, column} for RD/WR
  } sdram_cmd_t;

  // Split of a global word address into SDRAM coordinates.
  function automatic logic [COLW-1:0] addr_col(logic [AW-1:0] a);
    return a[MB +: COLW];
  endfunction
  function automatic logic [IBW-1:0] addr_ibank(logic [AW-1:0] a);
    return a[MB+COLW +: IBW];
  endfunction
  function automatic logic [ROWW-1:0] addr_row(logic [AW-1:0] a);
    return a[MB+COLW+IBW +: ROWW];
  endfunction

  // Number of trailing zeros of the low MB stride bits (s in S = sigma * 2^s);
  // a stride that is a multiple of NBANK gives s = m.
  function automatic logic [DLW-1:0] stride_tz(logic [MB-1:0] s);
    logic [DLW-1:0] tz;
    tz = DLW'(MB);
    for (int i = MB - 1; i >= 0; i--)
      if (s[i]) tz = DLW'(i);
    return tz;
  endfunction

  // K1 for each low stride value: the least index k with
  // (k * S) mod NBANK = 2^s, i.e. the inverse of sigma modulo 2^(m-s).
  // Built once at elaboration as the FirstHit look-up table.
  function automatic logic [NBANK*MB-1:0] build_k1_table();
    logic [NBANK*MB-1:0] t;
    t = '0;
    for (int sv = 1; sv < NBANK; sv++) begin
      int tz;
      tz = 0;
      while (((sv >> tz) & 1) == 0) tz++;
      for (int k = NBANK - 1; k >= 0; k--)
        if (((k * sv) % NBANK) == (1 << tz)) t[sv*MB +: MB] = MB'(k);
    end
    return t;
  endfunction

endpackage
