// tb_pva_top: end-to-end test of the PVA unit at its full default size
// (16 bank controllers, 32-element vectors, 8 transaction ids).
//
// The testbench plays the memory controller: it issues vector reads and
// writes with various bases, strides and lengths on the vector bus, stages
// write lines before VEC_WRITE, waits for the transaction-complete lines and
// collects read lines with STAGE_READ. Every bank is attached to an
// sdram_model that checks SDRAM timing. Expected data come from a reference
// memory updated in command order (a word never written holds init_word).
//
// Checks: every gathered word; each line returned in exactly 16 data cycles;
// no SDRAM timing breach; no two banks driving one slot; and that each
// mechanism of the design happened at least once: both bypass paths, queueing
// in the request FIFO, FirstHit Calculate write-backs, banks without hits,
// vector-context shifts, out-of-order issue by a younger context, deferral of
// a ready context while another activates or precharges, explicit precharges,
// auto precharges, reads and writes that leave the row open, bus polarity
// reversals, and the request-to-first-operation latency of 2 cycles for
// power-of-two strides and at most 5 for others.
module tb_pva_top;
  import pva_pkg::*;
  import pva_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  vbus_req_t                   vb_req;
  logic [BUSW-1:0]             vb_wdata, vb_rdata;
  logic [NTID-1:0]             transaction_complete;
  sdram_cmd_t [NBANK-1:0]      sd_cmd;
  logic [NBANK-1:0][DW-1:0]    sd_wdata, sd_rdata;
  logic [NBANK-1:0]            fhp_bypass, fhc_bypass;
  logic                        idle;
  int                          viol [NBANK];

  pva_top dut (
    .clk, .rst_n, .vb_req, .vb_wdata, .vb_rdata, .transaction_complete,
    .sd_cmd, .sd_wdata, .sd_rdata, .fhp_bypass, .fhc_bypass, .idle
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_mem
    sdram_model #(.BANK(b)) u_mem (
      .clk, .cmd(rst_n ? sd_cmd[b] : '0), .wdata(sd_wdata[b]), .rdata(sd_rdata[b]), .violations(viol[b])
    );
  end

  int checks = 0, failures = 0;

  // ---------------- mechanism counters ----------------
  int n_fhp_byp, n_fhc_byp, n_enq, n_fhc_wb, n_nohit, n_shift, n_ooo, n_defer;
  int n_pre, n_act, n_ap, n_keep, n_rev;
  int n_fhp_byp_b [NBANK], n_fhc_byp_b [NBANK], n_enq_b [NBANK], n_wb_b [NBANK], n_nohit_b [NBANK];
  int n_shift_b [NBANK], n_ooo_b [NBANK], n_defer_b [NBANK], n_pre_b [NBANK], n_act_b [NBANK];
  int n_ap_b [NBANK], n_keep_b [NBANK], n_rev_b [NBANK];

  logic [NBANK-1:0] vc0_valid;

  for (genvar b = 0; b < NBANK; b++) begin : g_cnt
    assign vc0_valid[b] = dut.g_bc[b].u_bc.u_sched.ctx[0].valid;
    logic last_wr = 1'b0;
    logic any_rw_seen = 1'b0;
    initial begin
      n_fhp_byp_b[b] = 0; n_fhc_byp_b[b] = 0; n_enq_b[b] = 0; n_wb_b[b] = 0; n_nohit_b[b] = 0;
      n_shift_b[b] = 0; n_ooo_b[b] = 0; n_defer_b[b] = 0; n_pre_b[b] = 0; n_act_b[b] = 0;
      n_ap_b[b] = 0; n_keep_b[b] = 0; n_rev_b[b] = 0;
    end
    always @(posedge clk) if (rst_n) begin
      if (fhp_bypass[b]) n_fhp_byp_b[b]++;
      if (fhc_bypass[b]) n_fhc_byp_b[b]++;
      if (dut.g_bc[b].u_bc.enq) n_enq_b[b]++;
      if (dut.g_bc[b].u_bc.fhc_wb) n_wb_b[b]++;
      if (dut.g_bc[b].u_bc.fhp_valid && !dut.g_bc[b].u_bc.fhp_hit) n_nohit_b[b]++;
      if (|dut.g_bc[b].u_bc.u_sched.vc_release) n_shift_b[b]++;
      if (dut.g_bc[b].u_bc.u_sched.bank_actv && |dut.g_bc[b].u_bc.u_sched.ready) n_defer_b[b]++;
      for (int i = 0; i < 3; i++)
        if (dut.g_bc[b].u_bc.u_sched.issue_rw[i] && dut.g_bc[b].u_bc.u_sched.ctx[i+1].valid) n_ooo_b[b]++;
      case (sd_cmd[b].op)
        SD_PRE: n_pre_b[b]++;
        SD_ACT: n_act_b[b]++;
        SD_RD, SD_WR: begin
          if (sd_cmd[b].a[AP_BIT]) n_ap_b[b]++; else n_keep_b[b]++;
          if (any_rw_seen && last_wr != (sd_cmd[b].op == SD_WR)) n_rev_b[b]++;
          last_wr     <= sd_cmd[b].op == SD_WR;
          any_rw_seen <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  // ---------------- reference memory ----------------
  logic [31:0] ref_mem [logic [31:0]];
  function automatic logic [31:0] ref_rd(logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : init_word(a);
  endfunction

  typedef struct {
    logic        used;
    logic        wr;
    logic [31:0] exp [VLEN];
    logic [5:0]  len;
  } txn_t;
  txn_t txn [NTID];

  // ---------------- bus tasks ----------------
  task automatic idle_bus();
    vb_req   <= '0;
    vb_wdata <= '0;
  endtask

  task automatic send(vcmd_e cmd, logic [2:0] tid, logic [31:0] addr, logic [31:0] stride, logic [5:0] len);
    @(posedge clk);
    vb_req <= '{valid: 1'b1, cmd: cmd, tid: tid, addr: addr, stride: stride, length: len};
    @(posedge clk);
    vb_req <= '0;
  endtask

  task automatic wait_tid_free(logic [2:0] tid);
    int guard = 0;
    while (!transaction_complete[tid] && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
  endtask

  task automatic do_write(logic [2:0] tid, logic [31:0] base, logic [31:0] stride, logic [5:0] len);
    logic [31:0] line [VLEN];
    for (int i = 0; i < VLEN; i++) line[i] = $urandom;
    @(posedge clk);
    vb_req <= '{valid: 1'b1, cmd: CMD_STAGE_WRITE, tid: tid, addr: '0, stride: '0, length: '0};
    for (int k = 0; k < NDCYC; k++) begin
      @(posedge clk);
      vb_req   <= '0;
      vb_wdata <= '0;
      if (k % 2 == 0) vb_wdata[63:0]   <= {line[2*k+1], line[2*k]};
      else            vb_wdata[127:64] <= {line[2*k+1], line[2*k]};
    end
    @(posedge clk);
    vb_wdata <= '0;
    vb_req   <= '{valid: 1'b1, cmd: CMD_VEC_WRITE, tid: tid, addr: base, stride: stride, length: len};
    for (int i = 0; i < int'(len); i++) ref_mem[base + stride * i] = line[i];
    txn[tid].used = 1'b1;
    txn[tid].wr   = 1'b1;
    @(posedge clk);
    vb_req <= '0;
  endtask

  task automatic do_read(logic [2:0] tid, logic [31:0] base, logic [31:0] stride, logic [5:0] len);
    for (int i = 0; i < int'(len); i++) txn[tid].exp[i] = ref_rd(base + stride * i);
    txn[tid].len  = len;
    txn[tid].used = 1'b1;
    txn[tid].wr   = 1'b0;
    send(CMD_VEC_READ, tid, base, stride, len);
  endtask

  task automatic collect(logic [2:0] tid);
    logic [31:0] got [VLEN];
    int guard = 0;
    // the transaction lines follow a command after one cycle
    repeat (2) @(posedge clk);
    #1;
    while (!transaction_complete[tid] && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
    checks++;
    if (!transaction_complete[tid]) begin
      failures++;
      $display("FAIL: transaction %0d never completed", tid);
    end
    if (!txn[tid].wr) begin
      @(posedge clk);
      vb_req <= '{valid: 1'b1, cmd: CMD_STAGE_READ, tid: tid, addr: '0, stride: '0, length: '0};
      @(posedge clk);
      vb_req <= '0;
      for (int k = 0; k < NDCYC; k++) begin
        #1;
        if (k % 2 == 0) {got[2*k+1], got[2*k]} = vb_rdata[63:0];
        else            {got[2*k+1], got[2*k]} = vb_rdata[127:64];
        checks++;
        if ((k % 2 == 0 && vb_rdata[127:64] != '0) || (k % 2 == 1 && vb_rdata[63:0] != '0)) begin
          failures++;
          $display("FAIL: data cycle %0d drove the wrong half", k);
        end
        @(posedge clk);
      end
      #1;
      checks++;
      if (vb_rdata != '0) begin
        failures++;
        $display("FAIL: data still driven after 16 data cycles");
      end
      for (int i = 0; i < int'(txn[tid].len); i++) begin
        checks++;
        if (got[i] !== txn[tid].exp[i]) begin
          failures++;
          if (failures < 20) $display("FAIL: tid %0d element %0d got %h expected %h", tid, i, got[i], txn[tid].exp[i]);
        end
      end
    end
    txn[tid].used = 1'b0;
  endtask

  // latency from a vector command to the first SDRAM command on the hit bank
  task automatic latency_check(logic [31:0] base, logic [31:0] stride, int max_cyc, string what);
    int b;
    logic seen;
    b = int'(base[MB-1:0]);
    @(posedge clk);
    vb_req <= '{valid: 1'b1, cmd: CMD_VEC_READ, tid: 3'd0, addr: base, stride: stride, length: 6'd32};
    txn[0].len = 6'd32;
    for (int i = 0; i < VLEN; i++) txn[0].exp[i] = ref_rd(base + stride * i);
    txn[0].wr = 1'b0;
    @(posedge clk);                       // the command cycle ends here
    vb_req <= '0;
    seen = 1'b0;
    for (int k = 1; k <= 10 && !seen; k++) begin
      #1;
      if (vc0_valid[b]) begin
        seen = 1'b1;
        checks++;
        // k cycles after the command cycle the request sits in a vector context
        if (k > max_cyc + 1) begin
          failures++;
          $display("FAIL: %s: request reached a vector context %0d cycles after the command (max %0d)", what, k - 1, max_cyc);
        end else
          $display("%s: subcommands ready %0d cycles after the command", what, k - 1);
      end
      @(posedge clk);
    end
    if (!seen) begin
      checks++;
      failures++;
      $display("FAIL: %s: request never reached a vector context", what);
    end
    collect(3'd0);
  endtask

  // ---------------- stimulus ----------------
  localparam int STRIDES [8] = '{1, 2, 4, 8, 16, 19, 3, 12};

  initial begin
    vb_req   = '0;
    vb_wdata = '0;
    for (int t = 0; t < NTID; t++) txn[t].used = 1'b0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // subcommand generation latency on an idle unit
    latency_check(32'h0000_0100, 32'd4,  2, "power-of-two stride");
    latency_check(32'h0000_0203, 32'd19, 5, "stride 19");

    // a few directed gather/scatter operations
    do_write(3'd1, 32'h0000_1000, 32'd19, 6'd32);
    do_read (3'd2, 32'h0000_1000, 32'd19, 6'd32);
    collect(3'd1);
    collect(3'd2);
    do_read (3'd3, 32'h0000_0000, 32'd1, 6'd32);
    collect(3'd3);

    // random batches with several outstanding transactions
    for (int batch = 0; batch < 60; batch++) begin
      int n;
      n = 2 + int'($urandom_range(0, 5));
      for (int t = 0; t < n; t++) begin
        logic [31:0] base, stride;
        logic [5:0]  len;
        base   = {13'h0, 2'($urandom_range(0, 1)), 2'($urandom_range(0, 3)), 15'($urandom)};
        stride = (($urandom % 4) == 0) ? 32'($urandom_range(0, 40)) : 32'(STRIDES[$urandom % 8]);
        len    = (($urandom % 3) == 0) ? 6'($urandom_range(1, 32)) : 6'd32;
        if (($urandom % 2) == 0) do_write(3'(t), base, stride, len);
        else                     do_read (3'(t), base, stride, len);
      end
      for (int t = 0; t < n; t++) collect(3'(t));
    end

    // unrolled copy: two reads then two writes on the same vectors
    for (int rep = 0; rep < 4; rep++) begin
      do_read (3'd0, 32'h0002_0000 + 32'(rep * 64), 32'd8, 6'd32);
      do_read (3'd1, 32'h0002_0000 + 32'(rep * 64) + 32'd256, 32'd8, 6'd32);
      do_write(3'd2, 32'h0004_0000 + 32'(rep * 64), 32'd8, 6'd32);
      do_write(3'd3, 32'h0004_0000 + 32'(rep * 64) + 32'd256, 32'd8, 6'd32);
      for (int t = 0; t < 4; t++) collect(3'(t));
    end

    repeat (20) @(posedge clk);
    report();
  end

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

  task automatic report();
    int v = 0;
    n_fhp_byp = 0; n_fhc_byp = 0; n_enq = 0; n_fhc_wb = 0; n_nohit = 0; n_shift = 0; n_ooo = 0;
    n_defer = 0; n_pre = 0; n_act = 0; n_ap = 0; n_keep = 0; n_rev = 0;
    for (int b = 0; b < NBANK; b++) begin
      v += viol[b];
      n_fhp_byp += n_fhp_byp_b[b]; n_fhc_byp += n_fhc_byp_b[b]; n_enq += n_enq_b[b];
      n_fhc_wb += n_wb_b[b]; n_nohit += n_nohit_b[b]; n_shift += n_shift_b[b];
      n_ooo += n_ooo_b[b]; n_defer += n_defer_b[b]; n_pre += n_pre_b[b]; n_act += n_act_b[b];
      n_ap += n_ap_b[b]; n_keep += n_keep_b[b]; n_rev += n_rev_b[b];
    end
    checks++;
    if (v != 0) begin
      failures++;
      $display("FAIL: %0d SDRAM timing violations", v);
    end
    need("FirstHit Predict bypass", n_fhp_byp);
    need("FirstHit Calculate bypass", n_fhc_byp);
    need("request queued in RQF", n_enq);
    need("FirstHit Calculate write-back", n_fhc_wb);
    need("bank without hits", n_nohit);
    need("vector context shift", n_shift);
    need("out-of-order issue", n_ooo);
    need("ready context deferred (bank_actv)", n_defer);
    need("explicit precharge", n_pre);
    need("row activate", n_act);
    need("auto precharge", n_ap);
    need("access leaving row open", n_keep);
    need("bus polarity reversal", n_rev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dut.slot_conflict) begin
    failures++;
    $display("FAIL: two banks drove one data slot");
  end

endmodule
