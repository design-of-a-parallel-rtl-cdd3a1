// tb_vector_context: loads random contexts into one vector context, advances
// it at random and checks against a reference walk: the element address
// steps by S << (m - s), the element index by the NextHit distance, the
// context empties after its last element, the SDRAM coordinates are the
// address fields, and row hit / conflict / next-row-hit agree with a random
// set of open rows.
module tb_vector_context;
  import pva_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                     load, rel, adv, row_hit, row_conflict, last, next_row_hit;
  vctx_t                    lctx, ctx;
  logic [NIB-1:0]           open_q;
  logic [NIB-1:0][ROWW-1:0] open_row;
  logic [IBW-1:0]           ibank;
  logic [ROWW-1:0]          row;
  logic [COLW-1:0]          col;

  vector_context u_dut (.clk, .rst_n, .load, .load_ctx(lctx), .release_ctx(rel), .advance(adv), .open_q, .open_row,
                        .ctx, .ibank, .row, .col, .row_hit, .row_conflict, .last, .next_row_hit);

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    load = 0; rel = 0; adv = 0; lctx = '0; open_q = '0; open_row = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 300; n++) begin
      logic [AW-1:0] a, step;
      logic [IDXW-1:0] k;
      logic [DLW-1:0] dl;
      int rem;
      dl   = 3'($urandom_range(0, 4));
      step = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(1, 64)) << dl : $urandom;
      a    = ($urandom % 2) ? $urandom : 32'($urandom_range(0, 1 << 16));
      k    = 5'($urandom_range(0, (1 << dl) - 1));
      rem  = $urandom_range(1, 32 >> dl);
      @(negedge clk);
      lctx = '{valid: 1'b1, tid: 3'($urandom), wr: 1'($urandom), addr: a, idx: k, step: step,
               dlog: dl, remaining: 6'(rem), first: 1'b1};
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      chk(ctx.valid && ctx.first, "loaded context");
      while (rem > 0) begin
        logic [AW-1:0] na;
        // random open rows, sometimes the context's own and next rows
        for (int ib = 0; ib < NIB; ib++) begin
          open_q[ib]   = 1'($urandom);
          open_row[ib] = ($urandom % 2) ? addr_row(a) : 13'($urandom);
        end
        #1;
        na = a + step;
        chk(ctx.valid && ctx.addr == a && ctx.idx == k, $sformatf("walk addr %0h exp %0h", ctx.addr, a));
        chk(ibank == a[13 +: 2] && row == a[15 +: 13] && col == a[4 +: 9], "address split");
        chk(last == (rem == 1), "last");
        chk(row_hit == (open_q[ibank] && open_row[ibank] == a[15 +: 13]), "row hit");
        chk(row_conflict == (open_q[ibank] && open_row[ibank] != a[15 +: 13]), "row conflict");
        chk(next_row_hit == (rem > 1 && na[13 +: 15] == a[13 +: 15]), "next row hit");
        adv = ($urandom % 3) != 0;
        @(negedge clk);
        if (adv) begin
          a = na; k = k + IDXW'(1 << dl); rem--;
          if (rem > 0) chk(!ctx.first, "first cleared");
        end
        adv = 1'b0;
      end
      chk(!ctx.valid, "empty after last element");
      // a release empties a context without an access
      @(negedge clk);
      lctx.first = 1'b1; load = 1'b1;
      @(negedge clk);
      load = 1'b0; rel = 1'b1;
      @(negedge clk);
      rel = 1'b0;
      chk(!ctx.valid, "release");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
