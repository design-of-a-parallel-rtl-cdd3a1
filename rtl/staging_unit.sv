// staging_unit (SU): data staging and transaction bookkeeping of one bank
// controller.
//
// One transaction buffer of VLEN words per transaction id serves both
// directions: gathered read data is written into it, element by element, as
// it returns from the SDRAM; for a scattered write the whole cache line sent
// by the memory controller is captured, and the scheduler fetches the words of
// this bank's elements from it when it issues the writes.
//
// Transaction lines: a VEC_READ / VEC_WRITE for id t raises txn_busy[t]
// (this controller's hold on transaction-complete line t). One cycle later
// FirstHit Predict tells how many elements this bank owns; the hold is
// dropped at once when there are none, otherwise when the last element has
// been read back or written.
//
// Data cycles: STAGE_WRITE t in cycle c is followed by NDCYC data cycles
// c+1 .. c+NDCYC; data cycle k carries elements 2k and 2k+1 on the 64-bit
// half k mod 2 of the 128-bit BC bus (alternate halves avoid turnaround
// cycles). STAGE_READ t in cycle c makes this unit drive, in the same cycles
// and slots, the elements it gathered for t; rd_drive_en marks the 32-bit
// slots it drives and rd_drive is zero elsewhere, so the bus merge is an OR.
// The shared read/write buffer and the one-cycle gap between command and
// first data cycle are this design's choices.
module staging_unit
  import pva_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  vbus_req_t             vb_req,
  input  logic [BUSW-1:0]       vb_wdata,
  input  logic                  fhp_valid,
  input  logic [TIDW-1:0]       fhp_tid,
  input  logic [LENW-1:0]       fhp_count,
  input  logic                  rd_ret_valid,
  input  logic [TIDW-1:0]       rd_ret_tid,
  input  logic [IDXW-1:0]       rd_ret_idx,
  input  logic [DW-1:0]         rd_ret_data,
  input  logic                  wr_fetch,
  input  logic [TIDW-1:0]       wr_tid,
  input  logic [IDXW-1:0]       wr_idx,
  output logic [DW-1:0]         wr_data,
  output logic [BUSW-1:0]       rd_drive,
  output logic [BUSW/DW-1:0]    rd_drive_en,
  output logic [NTID-1:0]       txn_busy
);

  localparam int unsigned KW = $clog2(NDCYC);

  logic [DW-1:0]   tbuf      [NTID][VLEN];
  logic [VLEN-1:0] mine      [NTID];
  logic [LENW-1:0] remaining [NTID];

  logic            sw_active, sr_active;
  logic [TIDW-1:0] sw_tid, sr_tid;
  logic [KW-1:0]   sw_k, sr_k;

  logic            is_vec;
  assign is_vec = vb_req.valid && (vb_req.cmd == CMD_VEC_READ || vb_req.cmd == CMD_VEC_WRITE);

  assign wr_data = tbuf[wr_tid][wr_idx];

  // STAGE_READ drive
  always_comb begin
    logic [IDXW-1:0] e0, e1;
    logic [6:0]      base;
    rd_drive    = '0;
    rd_drive_en = '0;
    e0   = {sr_k, 1'b0};
    e1   = {sr_k, 1'b1};
    base = sr_k[0] ? 7'd64 : 7'd0;
    if (sr_active) begin
      if (mine[sr_tid][e0]) begin
        rd_drive[base +: DW]          = tbuf[sr_tid][e0];
        rd_drive_en[{sr_k[0], 1'b0}]  = 1'b1;
      end
      if (mine[sr_tid][e1]) begin
        rd_drive[base + 7'd32 +: DW]  = tbuf[sr_tid][e1];
        rd_drive_en[{sr_k[0], 1'b1}]  = 1'b1;
      end
    end
  end

  // data buffer
  always_ff @(posedge clk) begin
    if (sw_active) begin
      tbuf[sw_tid][{sw_k, 1'b0}] <= sw_k[0] ? vb_wdata[64 +: DW] : vb_wdata[0 +: DW];
      tbuf[sw_tid][{sw_k, 1'b1}] <= sw_k[0] ? vb_wdata[96 +: DW] : vb_wdata[32 +: DW];
    end
    if (rd_ret_valid) tbuf[rd_ret_tid][rd_ret_idx] <= rd_ret_data;
  end

  // control and transaction lines
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_active <= 1'b0;
      sr_active <= 1'b0;
      sw_tid    <= '0;
      sr_tid    <= '0;
      sw_k      <= '0;
      sr_k      <= '0;
      txn_busy  <= '0;
      for (int t = 0; t < NTID; t++) begin
        mine[t]      <= '0;
        remaining[t] <= '0;
      end
    end else begin
      if (sw_active) begin
        sw_k <= sw_k + 1'b1;
        if (sw_k == KW'(NDCYC - 1)) sw_active <= 1'b0;
      end
      if (sr_active) begin
        sr_k <= sr_k + 1'b1;
        if (sr_k == KW'(NDCYC - 1)) sr_active <= 1'b0;
      end
      if (vb_req.valid && vb_req.cmd == CMD_STAGE_WRITE) begin
        sw_active <= 1'b1;
        sw_tid    <= vb_req.tid;
        sw_k      <= '0;
      end
      if (vb_req.valid && vb_req.cmd == CMD_STAGE_READ) begin
        sr_active <= 1'b1;
        sr_tid    <= vb_req.tid;
        sr_k      <= '0;
      end

      for (int t = 0; t < NTID; t++) begin
        logic [LENW-1:0] dec;
        dec = LENW'(rd_ret_valid && rd_ret_tid == TIDW'(t)) + LENW'(wr_fetch && wr_tid == TIDW'(t));
        if (is_vec && vb_req.tid == TIDW'(t)) begin
          txn_busy[t] <= 1'b1;
          mine[t]     <= '0;
        end else if (fhp_valid && fhp_tid == TIDW'(t)) begin
          remaining[t] <= fhp_count;
          txn_busy[t]  <= fhp_count != '0;
        end else if (dec != '0) begin
          remaining[t] <= remaining[t] - dec;
          if (remaining[t] == dec) txn_busy[t] <= 1'b0;
        end
        if (rd_ret_valid && rd_ret_tid == TIDW'(t)) mine[t][rd_ret_idx] <= 1'b1;
      end
    end
  end

endmodule
