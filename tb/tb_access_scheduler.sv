// tb_access_scheduler: the Access Scheduler of bank 0 driving the behavioural
// SDRAM model. The testbench plays the request queue and the Staging Unit: it
// offers random bank-local vector requests (first address, stride, NextHit,
// element count) with up to eight in flight, clustered on a few rows so that
// row hits, conflicts and reordering occur. Write data comes from a function
// of (transaction id, element index, generation); every read return is
// checked against a reference memory. Requests never overlap a pending write,
// so the reference is well defined whatever order the scheduler picks. At the
// end every request must have completed, the scheduler must be idle and the
// SDRAM model must have seen no timing or data-bus violation.
module tb_access_scheduler;
  import pva_pkg::*;
  import pva_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            new_valid, accept, wr_fetch, rd_ret_valid, bank_actv, idle;
  vreq_t           new_req;
  sdram_cmd_t      sd_cmd;
  logic [DW-1:0]   sd_wdata, sd_rdata, wr_data, rd_ret_data;
  logic [TIDW-1:0] wr_tid, rd_ret_tid;
  logic [IDXW-1:0] wr_idx, rd_ret_idx;
  logic [NIB-1:0]  bhp, bmhp, bcp;
  int              violations;

  access_scheduler u_dut (
    .clk, .rst_n, .new_valid, .new_req, .accept, .sd_cmd, .sd_wdata, .sd_rdata,
    .wr_fetch, .wr_tid, .wr_idx, .wr_data, .rd_ret_valid, .rd_ret_tid, .rd_ret_idx, .rd_ret_data,
    .bank_hit_predict(bhp), .bank_more_hit_predict(bmhp), .bank_close_predict(bcp), .bank_actv, .idle
  );
  sdram_model #(.BANK(0)) u_mem (.clk, .cmd(rst_n ? sd_cmd : '0), .wdata(sd_wdata), .rdata(sd_rdata), .violations);

  logic [31:0] ref_mem [logic [31:0]];
  logic [31:0] busy_addr [logic [31:0]];       // addresses touched by in-flight writes (value: 1)
  logic [31:0] elem_addr [NTID][VLEN];
  logic        elem_todo [NTID][VLEN];
  int          left [NTID];
  logic        is_wr [NTID];
  int          gen [NTID];
  int          done_reqs = 0, reordered = 0, last_done_seq = -1;
  int          seq_of [NTID];

  function automatic logic [31:0] wval(int t, int i, int g);
    return init_word(32'(t * 1000 + i + g * 77)) + 32'h1234;
  endfunction
  function automatic logic [31:0] mem_rd(logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : init_word(a);
  endfunction

  assign wr_data = wval(int'(wr_tid), int'(wr_idx), gen[wr_tid]);

  // Staging Unit stand-in: check returns and fetches
  always @(posedge clk) if (rst_n) begin
    if (rd_ret_valid) begin
      checks++;
      if (is_wr[rd_ret_tid] || !elem_todo[rd_ret_tid][rd_ret_idx] ||
          rd_ret_data != mem_rd(elem_addr[rd_ret_tid][rd_ret_idx])) begin
        failures++;
        if (failures < 20) $display("FAIL: read return tid %0d idx %0d data %h exp %h", rd_ret_tid, rd_ret_idx,
                                    rd_ret_data, mem_rd(elem_addr[rd_ret_tid][rd_ret_idx]));
      end
      elem_todo[rd_ret_tid][rd_ret_idx] = 1'b0;
      left[rd_ret_tid]--;
      if (left[rd_ret_tid] == 0) finish_req(int'(rd_ret_tid));
    end
    if (wr_fetch) begin
      checks++;
      if (!is_wr[wr_tid] || !elem_todo[wr_tid][wr_idx]) begin
        failures++;
        $display("FAIL: unexpected write fetch tid %0d idx %0d", wr_tid, wr_idx);
      end
      elem_todo[wr_tid][wr_idx] = 1'b0;
      ref_mem[elem_addr[wr_tid][wr_idx]] = wval(int'(wr_tid), int'(wr_idx), gen[wr_tid]);
      left[wr_tid]--;
      if (left[wr_tid] == 0) finish_req(int'(wr_tid));
    end
  end

  function automatic void finish_req(int t);
    done_reqs++;
    if (seq_of[t] < last_done_seq) reordered++;
    if (seq_of[t] > last_done_seq) last_done_seq = seq_of[t];
    for (int i = 0; i < VLEN; i++) if (elem_addr[t][i] != '1) busy_addr.delete(elem_addr[t][i]);
  endfunction

  initial begin
    int sent = 0;
    logic [12:0] rows [4];
    new_valid = 1'b0; new_req = '0;
    for (int t = 0; t < NTID; t++) begin left[t] = 0; gen[t] = 0; end
    for (int r = 0; r < 4; r++) rows[r] = 13'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (sent < 600) begin
      int t;
      logic ok;
      logic [31:0] s, a, step;
      logic [2:0] dl;
      int cnt, k;
      logic [31:0] addrs [$];
      @(negedge clk);
      new_valid = 1'b0;
      t = -1;
      for (int i = 0; i < NTID; i++) if (left[(sent + i) % NTID] == 0 && t < 0) t = (sent + i) % NTID;
      if (t < 0 || ($urandom % 4) == 0) continue;
      // bank-0 request: element addresses stay multiples of 16
      s    = ($urandom % 3 == 0) ? 32'(1 << $urandom_range(0, 6)) : 32'($urandom_range(1, 200));
      dl   = 3'(MB) - stride_tz(s[MB-1:0]);
      step = s << dl;
      a    = {rows[$urandom_range(0, 3)], 2'($urandom), 9'($urandom), 4'd0};
      cnt  = $urandom_range(1, 32 >> dl);
      k    = $urandom_range(0, (1 << dl) - 1);
      ok   = 1'b1;
      addrs.delete();
      for (int e = 0; e < cnt; e++) begin
        addrs.push_back(a + step * 32'(e));
        if (busy_addr.exists(a + step * 32'(e))) ok = 1'b0;
      end
      if (!ok) continue;
      new_req = '{tid: 3'(t), wr: 1'($urandom), stride: s, addr: a, idx: 5'(k), dlog: dl, count: 6'(cnt), acc: 1'b1};
      new_valid = 1'b1;
      #4;
      if (!accept) begin new_valid = 1'b0; continue; end
      // taken at the coming edge
      is_wr[t] = new_req.wr;
      gen[t]++;
      seq_of[t] = sent;
      for (int i = 0; i < VLEN; i++) begin elem_todo[t][i] = 1'b0; elem_addr[t][i] = '1; end
      for (int e = 0; e < cnt; e++) begin
        int idx;
        idx = k + (e << dl);
        elem_todo[t][idx] = 1'b1;
        elem_addr[t][idx] = addrs[e];
        // no later request may touch a word an in-flight request touches
        busy_addr[addrs[e]] = 1;
      end
      left[t] = cnt;
      sent++;
      @(posedge clk);
      #1;
      new_valid = 1'b0;
    end
    @(negedge clk);
    new_valid = 1'b0;
    begin
      int w;
      w = 0;
      while ((done_reqs < sent || !idle) && w < 5000) begin @(posedge clk); w++; end
    end
    checks += 4;
    if (done_reqs != sent) begin failures++; $display("FAIL: %0d of %0d requests completed", done_reqs, sent); end
    if (!idle) begin failures++; $display("FAIL: scheduler not idle"); end
    if (violations != 0) begin failures++; $display("FAIL: %0d SDRAM timing violations", violations); end
    if (reordered == 0) begin failures++; $display("FAIL: no request completed out of order"); end
    $display("requests %0d, completed out of order %0d", sent, reordered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
