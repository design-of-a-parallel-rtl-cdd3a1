// bank_controller (BC): serves the part of every broadcast vector command that
// lives in one SDRAM bank (bank number BANK_ID of the word-interleaved
// memory).
//
// Path of a request: FirstHit Predict decides in one cycle whether the bank is
// hit and finds the first element; a hit is queued in the Register File run
// as a queue by the Request FIFO; FirstHit Calculate finishes the first address
// of non-power-of-two strides in two cycles and writes it back; the Access
// Scheduler takes the queue head once its address is complete, expands it in
// a vector context and drives the SDRAM; the Staging Unit holds the data and
// this controller's hold on the transaction-complete lines.
//
// Two bypass paths save latency when the controller is idle: a power-of-two
// request goes from FirstHit Predict straight into vector context 0 when the
// queue is empty, and a request whose first address FirstHit Calculate
// completes while it is the queue head goes straight into the scheduler in the
// write-back cycle.
//
// Interface: vb_req / vb_wdata from the vector bus, rd_drive / rd_drive_en /
// txn_busy back to it, one SDRAM command/data port. Timing: a request seen in
// cycle c can issue its first SDRAM operation in cycle c+2 (bypass) and the
// command reaches the SDRAM pins one cycle later.
module bank_controller
  import pva_pkg::*;
#(
  parameter int unsigned BANK_ID = 0,
  parameter int unsigned NVC     = 4,
  parameter int unsigned RQ_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  vbus_req_t          vb_req,
  input  logic [BUSW-1:0]    vb_wdata,
  output logic [BUSW-1:0]    rd_drive,
  output logic [BUSW/DW-1:0] rd_drive_en,
  output logic [NTID-1:0]    txn_busy,
  output sdram_cmd_t         sd_cmd,
  output logic [DW-1:0]      sd_wdata,
  input  logic [DW-1:0]      sd_rdata,
  output logic               fhp_bypass,
  output logic               fhc_bypass,
  output logic               idle
);

  localparam int unsigned PW = $clog2(RQ_DEPTH);

  // FirstHit Predict
  logic  fhp_valid, fhp_hit;
  vreq_t fhp_req;
  firsthit_predict #(.BANK_ID(BANK_ID)) u_fhp (
    .clk, .rst_n, .vb_req,
    .req_valid (fhp_valid),
    .hit       (fhp_hit),
    .req       (fhp_req)
  );

  // Request FIFO, Register File, FirstHit Calculate
  logic          enq, deq, rq_empty, rq_full, in0_en, in1_en, out1_en, fhc_wb, fhc_busy;
  logic [PW-1:0] head, tail, in0_sel, in1_sel, out1_sel;
  logic [PW:0]   rq_count;
  vreq_t         out0, out1, in1;

  request_fifo #(.DEPTH(RQ_DEPTH)) u_rqf (
    .clk, .rst_n, .enq, .deq,
    .head, .tail, .count(rq_count), .empty(rq_empty), .full(rq_full),
    .inbus_0_sel(in0_sel), .inbus_0_enable(in0_en)
  );

  register_file #(.DEPTH(RQ_DEPTH)) u_rf (
    .clk, .rst_n,
    .inbus_0(fhp_req), .inbus_0_sel(in0_sel), .inbus_0_enable(in0_en),
    .inbus_1(in1),     .inbus_1_sel(in1_sel), .inbus_1_enable(in1_en),
    .outbus_0_sel(head), .outbus_0_enable(!rq_empty), .outbus_0(out0),
    .outbus_1_sel(out1_sel), .outbus_1_enable(out1_en), .outbus_1(out1)
  );

  firsthit_calc #(.DEPTH(RQ_DEPTH)) u_fhc (
    .clk, .rst_n, .enq,
    .outbus_1(out1), .outbus_1_sel(out1_sel), .outbus_1_enable(out1_en),
    .inbus_1(in1), .inbus_1_sel(in1_sel), .inbus_1_enable(in1_en),
    .wb_valid(fhc_wb), .busy(fhc_busy)
  );

  // request selection for the scheduler, with the two bypass paths
  logic  head_ready, fhc_byp_ok, fhp_byp_ok, new_valid, accept;
  vreq_t new_req;

  always_comb begin
    head_ready = !rq_empty && out0.acc;
    fhc_byp_ok = !rq_empty && !out0.acc && fhc_wb && in1_sel == head;
    fhp_byp_ok = rq_empty && !fhc_busy && fhp_valid && fhp_hit && fhp_req.acc;
    new_valid  = head_ready || fhc_byp_ok || fhp_byp_ok;
    new_req    = head_ready ? out0 : (fhc_byp_ok ? in1 : fhp_req);
    deq        = accept && (head_ready || fhc_byp_ok);
    enq        = fhp_valid && fhp_hit && !(fhp_byp_ok && accept);
    fhp_bypass = fhp_byp_ok && accept;
    fhc_bypass = fhc_byp_ok && accept;
  end

  // Access Scheduler
  logic            wr_fetch, rd_ret_valid, sched_idle;
  logic [TIDW-1:0] wr_tid, rd_ret_tid;
  logic [IDXW-1:0] wr_idx, rd_ret_idx;
  logic [DW-1:0]   wr_data, rd_ret_data;
  logic [NIB-1:0]  hit_pred, more_pred, close_pred;
  logic            actv;

  access_scheduler #(.NVC(NVC)) u_sched (
    .clk, .rst_n,
    .new_valid, .new_req, .accept,
    .sd_cmd, .sd_wdata, .sd_rdata,
    .wr_fetch, .wr_tid, .wr_idx, .wr_data,
    .rd_ret_valid, .rd_ret_tid, .rd_ret_idx, .rd_ret_data,
    .bank_hit_predict(hit_pred), .bank_more_hit_predict(more_pred),
    .bank_close_predict(close_pred), .bank_actv(actv), .idle(sched_idle)
  );

  // Staging Unit
  staging_unit u_su (
    .clk, .rst_n, .vb_req, .vb_wdata,
    .fhp_valid, .fhp_tid(fhp_req.tid), .fhp_count(fhp_req.count),
    .rd_ret_valid, .rd_ret_tid, .rd_ret_idx, .rd_ret_data,
    .wr_fetch, .wr_tid, .wr_idx, .wr_data,
    .rd_drive, .rd_drive_en, .txn_busy
  );

  assign idle = sched_idle && rq_empty && !fhc_busy;

endmodule
