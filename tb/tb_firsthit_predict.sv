// tb_firsthit_predict: checks FirstHit Predict for all 16 bank numbers against
// a brute-force expansion of the vector: for random and directed <B, S, L>
// each bank's hit flag, first index K, element count, NextHit spacing
// (2^dlog equals the index distance between its first two elements), the
// ACC flag (power-of-two stride) and, when ACC is set, the first address.
// Also checks the one-cycle latency and that non-vector commands are ignored.
module tb_firsthit_predict;
  import pva_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  vbus_req_t        vb_req;
  logic [NBANK-1:0] rv, hit;
  vreq_t            req [NBANK];

  for (genvar b = 0; b < NBANK; b++) begin : g_fhp
    firsthit_predict #(.BANK_ID(b)) u_dut (.clk, .rst_n, .vb_req, .req_valid(rv[b]), .hit(hit[b]), .req(req[b]));
  end

  task automatic check(logic c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic one(logic [31:0] base, logic [31:0] stride, logic [5:0] len, vcmd_e cmd);
    @(posedge clk);
    vb_req <= '{valid: 1'b1, cmd: cmd, tid: 3'd5, addr: base, stride: stride, length: len};
    @(posedge clk);
    vb_req <= '0;
    #1;
    for (int b = 0; b < NBANK; b++) begin
      int first, second, cnt;
      logic is_vec, p2;
      first = -1; second = -1; cnt = 0;
      for (int i = 0; i < int'(len); i++) begin
        logic [31:0] a;
        a = base + stride * 32'(i);
        if (int'(a[3:0]) == b) begin
          if (first < 0) first = i;
          else if (second < 0) second = i;
          cnt++;
        end
      end
      is_vec = cmd == CMD_VEC_READ || cmd == CMD_VEC_WRITE;
      p2 = (stride & (stride - 1)) == 0;
      check(rv[b] == is_vec, $sformatf("req_valid bank %0d", b));
      if (!is_vec) begin
        check(!hit[b], "hit on a staging command");
        continue;
      end
      check(hit[b] == (cnt > 0), $sformatf("hit bank %0d B=%0h S=%0d L=%0d", b, base, stride, len));
      check(req[b].count == 6'(cnt), $sformatf("count bank %0d B=%0h S=%0d L=%0d got %0d exp %0d", b, base, stride, len, req[b].count, cnt));
      check(req[b].acc == p2, "ACC flag");
      check(req[b].wr == (cmd == CMD_VEC_WRITE) && req[b].tid == 3'd5, "tid/op");
      if (cnt > 0) begin
        check(int'(req[b].idx) == first, $sformatf("K bank %0d B=%0h S=%0d got %0d exp %0d", b, base, stride, req[b].idx, first));
        if (second >= 0) check((1 << req[b].dlog) == second - first, $sformatf("NextHit bank %0d S=%0d", b, stride));
        if (p2) check(req[b].addr == base + stride * 32'(first), "first address");
        else    check(req[b].addr == base, "base kept for FHC");
      end
    end
  endtask

  initial begin
    vb_req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // examples of the algorithm description (M = 16): stride 10 and 12
    one(32'd2, 32'd10, 6'd32, CMD_VEC_READ);
    one(32'd0, 32'd12, 6'd32, CMD_VEC_READ);
    one(32'd5, 32'd0,  6'd7,  CMD_VEC_WRITE);
    one(32'd5, 32'd19, 6'd32, CMD_STAGE_READ);
    for (int s = 0; s < 40; s++) one($urandom, 32'(s), 6'($urandom_range(1, 32)), CMD_VEC_READ);
    for (int n = 0; n < 400; n++)
      one($urandom, (n % 2) ? $urandom : 32'($urandom_range(0, 64)), 6'($urandom_range(1, 32)),
          (n % 3) ? CMD_VEC_READ : CMD_VEC_WRITE);
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
