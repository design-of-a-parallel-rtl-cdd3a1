// access_scheduler (SCHED): expands vector requests into SDRAM operations,
// reorders them across up to NVC vector contexts and drives one SDRAM bank.
//
// New requests enter vector context 0; whenever a context empties, the ones
// behind it shift one place per cycle towards NVC-1, so a higher-numbered
// context always holds an older request. One scheduling policy unit per
// context sits on a daisy chain from the oldest to the newest, which lets at
// most one context issue per cycle (see sched_policy).
//
// The scheduler broadcasts each internal bank's open row. From the contexts'
// answers it forms, per internal bank, the wired-OR predict lines:
//   bank_hit_predict      some context may access the open row now
//   bank_more_hit_predict some context other than the issuing one hits the open row
//   bank_close_predict    some context needs a different row in that bank
// and bank_actv, set when some blocked context is able to activate/precharge.
//
// Row management (ManageRow): on the first access of a request the one-bit
// autoprecharge predictor of its internal bank is set to whether the row last
// accessed in that bank equals the request's first row. A read/write that is
// not the request's last closes the row by auto precharge unless the next
// element hits the same row or another context hits it; the last access keeps
// the row open if another context hits it, else closes it when a context
// needs another row or the predictor is set.
//
// Bus polarity: a younger context may read or write only when every older
// context moves data the same way and the last transfer did too; the oldest
// context may always reverse the bus. Reversal costs one idle data-bus cycle.
//
// Timing (restimers): activate to read/write T_RCD, precharge to activate
// T_RP, write to precharge T_WR, read data T_CL cycles after the read reaches
// the SDRAM. The SDRAM command and write data leave through registers, one
// cycle after the decision; read data is returned to the staging unit with
// its transaction id and element index T_CL+1 cycles after the decision.
// Write data is fetched from the staging unit in the decision cycle.
// Only eligible (polarity-allowed) contexts raise bank_hit_predict, so a
// younger context of the other polarity cannot keep an older one from
// precharging; this, the tRAS-free timing model and the reading of "last row
// address" as the row last read or written are this design's choices.
module access_scheduler
  import pva_pkg::*;
#(
  parameter int unsigned NVC   = 4,
  parameter int unsigned T_RCD = T_RCD_DEF,
  parameter int unsigned T_CL  = T_CL_DEF,
  parameter int unsigned T_RP  = T_RP_DEF,
  parameter int unsigned T_WR  = T_WR_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // new vector request
  input  logic                 new_valid,
  input  vreq_t                new_req,
  output logic                 accept,
  // SDRAM
  output sdram_cmd_t           sd_cmd,
  output logic [DW-1:0]        sd_wdata,
  input  logic [DW-1:0]        sd_rdata,
  // staging unit
  output logic                 wr_fetch,
  output logic [TIDW-1:0]      wr_tid,
  output logic [IDXW-1:0]      wr_idx,
  input  logic [DW-1:0]        wr_data,
  output logic                 rd_ret_valid,
  output logic [TIDW-1:0]      rd_ret_tid,
  output logic [IDXW-1:0]      rd_ret_idx,
  output logic [DW-1:0]        rd_ret_data,
  // predict lines (observable)
  output logic [NIB-1:0]       bank_hit_predict,
  output logic [NIB-1:0]       bank_more_hit_predict,
  output logic [NIB-1:0]       bank_close_predict,
  output logic                 bank_actv,
  output logic                 idle
);

  localparam int unsigned TW = 4;

  // ---------------- vector contexts ----------------
  vctx_t                     ctx       [NVC];
  logic [IBW-1:0]            vc_ibank  [NVC];
  logic [ROWW-1:0]           vc_row    [NVC];
  logic [COLW-1:0]           vc_col    [NVC];
  logic [NVC-1:0]            vc_hit, vc_conf, vc_last, vc_nexthit;
  logic [NVC-1:0]            vc_load, vc_release, vc_adv;
  vctx_t                     vc_load_ctx [NVC];

  logic [NIB-1:0]            open_q;
  logic [NIB-1:0][ROWW-1:0]  open_row;
  logic [NIB-1:0][ROWW-1:0]  last_row;
  logic [NIB-1:0]            ap_pred;
  logic                      last_dir;      // 1: last transfer was a write

  vctx_t                     new_ctx;
  always_comb begin
    new_ctx.valid     = 1'b1;
    new_ctx.tid       = new_req.tid;
    new_ctx.wr        = new_req.wr;
    new_ctx.addr      = new_req.addr;
    new_ctx.idx       = new_req.idx;
    new_ctx.step      = new_req.stride << new_req.dlog;
    new_ctx.dlog      = new_req.dlog;
    new_ctx.remaining = new_req.count;
    new_ctx.first     = 1'b1;
  end

  for (genvar i = 0; i < NVC; i++) begin : g_vc
    vector_context u_vc (
      .clk, .rst_n,
      .load        (vc_load[i]),
      .load_ctx    (vc_load_ctx[i]),
      .release_ctx (vc_release[i]),
      .advance     (vc_adv[i]),
      .open_q, .open_row,
      .ctx         (ctx[i]),
      .ibank       (vc_ibank[i]),
      .row         (vc_row[i]),
      .col         (vc_col[i]),
      .row_hit     (vc_hit[i]),
      .row_conflict(vc_conf[i]),
      .last        (vc_last[i]),
      .next_row_hit(vc_nexthit[i])
    );
  end

  // ---------------- restimers ----------------
  logic [NIB-1:0] rcd_ok, act_ok, pre_ok;
  logic [NIB-1:0] rcd_ld, act_ld, pre_ld;
  logic [TW-1:0]  act_val [NIB];
  logic           rd_ok, wr_ok, rd_ld, wr_ld;
  logic [TW-1:0]  rd_val, wr_val;

  for (genvar b = 0; b < NIB; b++) begin : g_rt
    restimer #(.W(TW)) u_rcd (.clk, .rst_n, .load(rcd_ld[b]), .load_val(TW'(T_RCD)), .avail(rcd_ok[b]));
    restimer #(.W(TW)) u_act (.clk, .rst_n, .load(act_ld[b]), .load_val(act_val[b]),  .avail(act_ok[b]));
    restimer #(.W(TW)) u_pre (.clk, .rst_n, .load(pre_ld[b]), .load_val(TW'(T_WR)),  .avail(pre_ok[b]));
  end
  restimer #(.W(TW)) u_rdok (.clk, .rst_n, .load(rd_ld), .load_val(rd_val), .avail(rd_ok));
  restimer #(.W(TW)) u_wrok (.clk, .rst_n, .load(wr_ld), .load_val(wr_val), .avail(wr_ok));

  // ---------------- readiness and predict lines ----------------
  logic [NVC-1:0] elig, ready, blocked, can_ap, issue_rw, issue_ap;
  logic [NVC:0]   lock;

  always_comb begin
    for (int i = 0; i < NVC; i++) begin
      logic oldest, same;
      oldest = 1'b1;
      same   = 1'b1;
      for (int j = i + 1; j < NVC; j++) begin
        if (ctx[j].valid) begin
          oldest = 1'b0;
          if (ctx[j].wr != ctx[i].wr) same = 1'b0;
        end
      end
      elig[i]    = ctx[i].valid && (oldest || (same && last_dir == ctx[i].wr));
      ready[i]   = elig[i] && vc_hit[i] && rcd_ok[vc_ibank[i]] && (ctx[i].wr ? wr_ok : rd_ok);
      blocked[i] = ctx[i].valid && !vc_hit[i];
      can_ap[i]  = vc_conf[i] ? (pre_ok[vc_ibank[i]] && rcd_ok[vc_ibank[i]]) : act_ok[vc_ibank[i]];
    end

    bank_hit_predict   = '0;
    bank_close_predict = '0;
    for (int i = 0; i < NVC; i++) begin
      if (elig[i] && vc_hit[i])         bank_hit_predict[vc_ibank[i]]   = 1'b1;
      if (ctx[i].valid && !vc_hit[i])   bank_close_predict[vc_ibank[i]] = 1'b1;
    end

    bank_actv = 1'b0;
    for (int i = 0; i < NVC; i++)
      if (blocked[i] && can_ap[i] && !bank_hit_predict[vc_ibank[i]]) bank_actv = 1'b1;
  end

  // daisy chain from the oldest context (NVC-1) to the newest (0)
  assign lock[NVC] = 1'b1;
  for (genvar i = NVC - 1; i >= 0; i--) begin : g_spu
    sched_policy u_spu (
      .valid            (ctx[i].valid),
      .ready            (ready[i]),
      .blocked          (blocked[i]),
      .can_actpre       (can_ap[i]),
      .bank_hit_predict (bank_hit_predict[vc_ibank[i]]),
      .bank_actv        (bank_actv),
      .lock_in          (lock[i+1]),
      .issue_rw         (issue_rw[i]),
      .issue_actpre     (issue_ap[i]),
      .lock_out         (lock[i])
    );
  end

  // ---------------- the granted operation ----------------
  logic                 any_rw, any_ap, g_wr, g_first, g_last, g_next, ap_new, do_ap;
  logic [IBW-1:0]       g_ib;
  logic [ROWW-1:0]      g_row;
  logic [COLW-1:0]      g_col;
  logic [TIDW-1:0]      g_tid;
  logic [IDXW-1:0]      g_idx;
  logic [NVC-1:0]       grant;

  always_comb begin
    grant   = issue_rw | issue_ap;
    any_rw  = |issue_rw;
    any_ap  = |issue_ap;
    g_wr    = 1'b0;
    g_first = 1'b0;
    g_last  = 1'b0;
    g_next  = 1'b0;
    g_ib    = '0;
    g_row   = '0;
    g_col   = '0;
    g_tid   = '0;
    g_idx   = '0;
    for (int i = 0; i < NVC; i++) begin
      if (grant[i]) begin
        g_wr    = ctx[i].wr;
        g_first = ctx[i].first;
        g_last  = vc_last[i];
        g_next  = vc_nexthit[i];
        g_ib    = vc_ibank[i];
        g_row   = vc_row[i];
        g_col   = vc_col[i];
        g_tid   = ctx[i].tid;
        g_idx   = ctx[i].idx;
      end
    end

    bank_more_hit_predict = '0;
    for (int i = 0; i < NVC; i++)
      if (vc_hit[i] && !grant[i]) bank_more_hit_predict[vc_ibank[i]] = 1'b1;

    // ManageRow
    ap_new = g_first ? (last_row[g_ib] == g_row) : ap_pred[g_ib];
    if (g_last)
      do_ap = !bank_more_hit_predict[g_ib] && (bank_close_predict[g_ib] || ap_new);
    else
      do_ap = !(g_next || bank_more_hit_predict[g_ib]);
  end

  // restimer loads
  always_comb begin
    rcd_ld = '0;
    act_ld = '0;
    pre_ld = '0;
    for (int b = 0; b < NIB; b++) act_val[b] = TW'(T_RP);
    rd_ld  = 1'b0;
    wr_ld  = 1'b0;
    rd_val = TW'(2);              // write -> read: one idle data-bus cycle
    wr_val = TW'(T_CL + 2);       // read -> write: data returns T_CL later, then one idle cycle
    if (any_ap) begin
      if (open_q[g_ib]) act_ld[g_ib] = 1'b1;          // precharge
      else              rcd_ld[g_ib] = 1'b1;          // activate
    end
    if (any_rw) begin
      if (g_wr) begin
        rd_ld        = 1'b1;
        pre_ld[g_ib] = 1'b1;
        if (do_ap) begin
          act_ld[g_ib]  = 1'b1;
          act_val[g_ib] = TW'(T_WR + T_RP);
        end
      end else begin
        wr_ld = 1'b1;
        if (do_ap) begin
          act_ld[g_ib]  = 1'b1;
          act_val[g_ib] = TW'(1 + T_RP);
        end
      end
    end
  end

  // context loading and shifting
  always_comb begin
    vc_adv     = issue_rw;
    vc_load    = '0;
    vc_release = '0;
    for (int i = 0; i < NVC; i++) vc_load_ctx[i] = ctx[i];
    for (int i = 1; i < NVC; i++) begin
      if (!ctx[i].valid && ctx[i-1].valid && !issue_rw[i-1]) begin
        vc_load[i]     = 1'b1;
        vc_load_ctx[i] = ctx[i-1];
        vc_release[i-1] = 1'b1;
      end
    end
    accept = !ctx[0].valid || vc_release[0];
    if (new_valid && accept) begin
      vc_load[0]     = 1'b1;
      vc_load_ctx[0] = new_ctx;
    end
  end

  // ---------------- state, SDRAM command and read return ----------------
  logic [T_CL:0]   rd_pipe_v;
  logic [TIDW-1:0] rd_pipe_tid [T_CL+1];
  logic [IDXW-1:0] rd_pipe_idx [T_CL+1];
  logic            all_empty;

  always_comb begin
    all_empty = 1'b1;
    for (int i = 0; i < NVC; i++) if (ctx[i].valid) all_empty = 1'b0;
  end
  assign idle = all_empty && !(|rd_pipe_v);

  assign wr_fetch = any_rw && g_wr;
  assign wr_tid   = g_tid;
  assign wr_idx   = g_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      open_q    <= '0;
      open_row  <= '0;
      last_row  <= '0;
      ap_pred   <= '0;
      last_dir  <= 1'b0;
      sd_cmd    <= '{op: SD_NOP, ba: '0, a: '0};
      sd_wdata  <= '0;
      rd_pipe_v <= '0;
      for (int k = 0; k <= T_CL; k++) begin
        rd_pipe_tid[k] <= '0;
        rd_pipe_idx[k] <= '0;
      end
    end else begin
      sd_cmd <= '{op: SD_NOP, ba: '0, a: '0};
      if (any_ap) begin
        if (open_q[g_ib]) begin
          sd_cmd         <= '{op: SD_PRE, ba: g_ib, a: '0};
          open_q[g_ib]   <= 1'b0;
        end else begin
          sd_cmd         <= '{op: SD_ACT, ba: g_ib, a: SDAW'(g_row)};
          open_q[g_ib]   <= 1'b1;
          open_row[g_ib] <= g_row;
        end
      end else if (any_rw) begin
        sd_cmd.op           <= g_wr ? SD_WR : SD_RD;
        sd_cmd.ba           <= g_ib;
        sd_cmd.a            <= SDAW'(g_col) | (SDAW'(do_ap) << AP_BIT);
        last_dir            <= g_wr;
        last_row[g_ib]      <= g_row;
        if (g_first) ap_pred[g_ib] <= ap_new;
        if (do_ap) open_q[g_ib] <= 1'b0;
      end
      if (wr_fetch) sd_wdata <= wr_data;

      rd_pipe_v[0]   <= any_rw && !g_wr;
      rd_pipe_tid[0] <= g_tid;
      rd_pipe_idx[0] <= g_idx;
      for (int k = 1; k <= T_CL; k++) begin
        rd_pipe_v[k]   <= rd_pipe_v[k-1];
        rd_pipe_tid[k] <= rd_pipe_tid[k-1];
        rd_pipe_idx[k] <= rd_pipe_idx[k-1];
      end
    end
  end

  assign rd_ret_valid = rd_pipe_v[T_CL];
  assign rd_ret_tid   = rd_pipe_tid[T_CL];
  assign rd_ret_idx   = rd_pipe_idx[T_CL];
  assign rd_ret_data  = sd_rdata;

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
