// firsthit_predict (FHP): watches the vector bus and decides, for one bank,
// whether a VEC_READ / VEC_WRITE <B, S, L> has elements in this bank.
//
// It uses the word-interleave results of the PVA algorithm: with
// b0 = B mod M, d = (BANK_ID - b0) mod M and S mod M = sigma * 2^s, the bank
// is hit iff d is a multiple of 2^s; the first element that hits is
// K = (K1 * (d >> s)) mod 2^(m-s), where K1 comes from a look-up table indexed
// by S mod M, and later hits follow every delta = 2^(m-s) elements (NextHit).
// The bank holds ceil((L - K) / delta) elements when K < L.
// For a power-of-two stride (and stride 0) the first address B + K*S is a
// shift and add, so FHP completes it and sets the ACC flag; otherwise the
// FirstHit Calculate unit finishes the multiply later.
//
// Timing: one cycle. A command seen on vb_req in cycle c appears on req_valid
// / req / hit in cycle c+1. req_valid pulses for every vector read or write,
// hit tells whether this bank takes part; req.count is 0 when it does not.
// The K1 table is computed at elaboration; the register stage and the
// treatment of stride 0 are choices of this design.
module firsthit_predict
  import pva_pkg::*;
#(
  parameter int unsigned BANK_ID = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  vbus_req_t vb_req,
  output logic      req_valid,
  output logic      hit,
  output vreq_t     req
);

  localparam logic [NBANK*MB-1:0] K1_TABLE = build_k1_table();

  logic [MB-1:0]   b0, d, s_low, k1, i_dist, k_raw;
  logic [DLW-1:0]  tz, dlog;
  logic [MB-1:0]   tz_mask, dl_mask;
  logic            bank_hit, in_len, pow2, is_vec;
  logic [LENW:0]   cnt_num;
  logic [LENW-1:0] cnt;
  logic [4:0]      s_log2;
  logic [AW-1:0]   first_addr;

  always_comb begin
    b0      = vb_req.addr[MB-1:0];
    s_low   = vb_req.stride[MB-1:0];
    d       = MB'(BANK_ID) - b0;                // subtraction without underflow, mod M
    tz      = stride_tz(s_low);
    dlog    = DLW'(MB) - tz;                    // NextHit(S) = 2^(m-s)
    tz_mask = MB'((1 << tz) - 1);
    dl_mask = MB'((1 << dlog) - 1);
    bank_hit = (d & tz_mask) == '0;             // d multiple of 2^s
    i_dist  = d >> tz;
    k1      = K1_TABLE[s_low*MB +: MB];
    k_raw   = MB'(k1 * i_dist) & dl_mask;       // K_i = (K1 * i) mod 2^(m-s)
    in_len  = {{(LENW-MB){1'b0}}, k_raw} < vb_req.length;
    cnt_num = {1'b0, vb_req.length} - (LENW+1)'(k_raw) + (LENW+1)'((1 << dlog) - 1);
    cnt     = LENW'(cnt_num >> dlog);

    pow2    = (vb_req.stride & (vb_req.stride - 1)) == '0;
    s_log2  = '0;
    for (int b = 0; b < AW; b++)
      if (vb_req.stride[b]) s_log2 = 5'(b);
    first_addr = vb_req.addr + (AW'(k_raw) << s_log2);

    is_vec  = vb_req.valid && (vb_req.cmd == CMD_VEC_READ || vb_req.cmd == CMD_VEC_WRITE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_valid <= 1'b0;
      hit       <= 1'b0;
      req       <= '0;
    end else begin
      req_valid <= is_vec;
      hit       <= is_vec && bank_hit && in_len;
      if (is_vec) begin
        req.tid    <= vb_req.tid;
        req.wr     <= vb_req.cmd == CMD_VEC_WRITE;
        req.stride <= vb_req.stride;
        req.addr   <= pow2 ? first_addr : vb_req.addr;
        req.idx    <= IDXW'(k_raw);
        req.dlog   <= dlog;
        req.count  <= (bank_hit && in_len) ? cnt : '0;
        req.acc    <= pow2;
      end
    end
  end

endmodule
