// tb_staging_unit: drives the Staging Unit as the vector bus, FirstHit Predict
// and the scheduler would. For each round it checks: the transaction line of
// an id is held from the vector command until the last element the bank owns
// has returned (or at once released when it owns none); a STAGE_READ drives
// exactly the gathered elements, two per data cycle on alternating 64-bit
// halves, in the 16 cycles after the command; a STAGE_WRITE captures the line
// so that a write fetch returns the right word.
module tb_staging_unit;
  import pva_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  vbus_req_t        vb_req;
  logic [BUSW-1:0]  vb_wdata, rd_drive;
  logic             fhp_valid, rd_ret_valid, wr_fetch;
  logic [TIDW-1:0]  fhp_tid, rd_ret_tid, wr_tid;
  logic [LENW-1:0]  fhp_count;
  logic [IDXW-1:0]  rd_ret_idx, wr_idx;
  logic [DW-1:0]    rd_ret_data, wr_data;
  logic [3:0]       rd_drive_en;
  logic [NTID-1:0]  txn_busy;

  staging_unit u_dut (.*);

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic cmd(vcmd_e c, logic [TIDW-1:0] t);
    @(negedge clk);
    vb_req = '{valid: 1'b1, cmd: c, tid: t, addr: '0, stride: 32'd1, length: 6'd32};
    @(negedge clk);
    vb_req = '0;
  endtask

  initial begin
    vb_req = '0; vb_wdata = '0; fhp_valid = 0; rd_ret_valid = 0; wr_fetch = 0;
    fhp_tid = '0; rd_ret_tid = '0; wr_tid = '0; fhp_count = '0; rd_ret_idx = '0; wr_idx = '0; rd_ret_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [TIDW-1:0] t;
      logic [VLEN-1:0] own;
      logic [DW-1:0]   val [VLEN];
      int              cnt;
      t = 3'($urandom);
      own = ($urandom % 5 == 0) ? '0 : $urandom;
      cnt = $countones(own);
      for (int i = 0; i < VLEN; i++) val[i] = $urandom;
      if (n % 2 == 0) begin
        // gather: VEC_READ, element returns, STAGE_READ
        @(negedge clk);
        vb_req = '{valid: 1'b1, cmd: CMD_VEC_READ, tid: t, addr: '0, stride: 32'd1, length: 6'd32};
        @(negedge clk);
        vb_req = '0;
        chk(txn_busy[t], "line held after vector command");
        fhp_valid = 1'b1; fhp_tid = t; fhp_count = 6'(cnt);
        @(negedge clk);
        fhp_valid = 1'b0;
        chk(txn_busy[t] == (cnt != 0), "line after FirstHit count");
        for (int i = 0, r = 0; i < VLEN; i++) begin
          if (!own[i]) continue;
          rd_ret_valid = 1'b1; rd_ret_tid = t; rd_ret_idx = 5'(i); rd_ret_data = val[i];
          @(negedge clk);
          rd_ret_valid = 1'b0;
          r++;
          chk(txn_busy[t] == (r != cnt), "line until last element");
        end
        cmd(CMD_STAGE_READ, t);
        for (int k = 0; k < NDCYC; k++) begin
          logic [1:0] s0, s1;
          s0 = {1'(k % 2), 1'b0}; s1 = {1'(k % 2), 1'b1};
          chk(rd_drive_en == ((4'(own[2*k]) << s0) | (4'(own[2*k+1]) << s1)), $sformatf("slots of data cycle %0d", k));
          if (own[2*k])   chk(rd_drive[32*s0 +: 32] == val[2*k],   "read word even");
          if (own[2*k+1]) chk(rd_drive[32*s1 +: 32] == val[2*k+1], "read word odd");
          @(negedge clk);
        end
        chk(rd_drive_en == '0, "bus released after 16 data cycles");
      end else begin
        // scatter: STAGE_WRITE with the line, VEC_WRITE, write fetches
        @(negedge clk);
        vb_req = '{valid: 1'b1, cmd: CMD_STAGE_WRITE, tid: t, addr: '0, stride: 32'd1, length: 6'd32};
        @(negedge clk);
        vb_req = '0;
        for (int k = 0; k < NDCYC; k++) begin
          vb_wdata = $urandom;
          vb_wdata[64*(k%2) +: 64] = {val[2*k+1], val[2*k]};
          @(negedge clk);
        end
        vb_wdata = '0;
        vb_req = '{valid: 1'b1, cmd: CMD_VEC_WRITE, tid: t, addr: '0, stride: 32'd1, length: 6'd32};
        @(negedge clk);
        vb_req = '0;
        fhp_valid = 1'b1; fhp_tid = t; fhp_count = 6'(cnt);
        @(negedge clk);
        fhp_valid = 1'b0;
        chk(txn_busy[t] == (cnt != 0), "write line after FirstHit count");
        for (int i = 0, r = 0; i < VLEN; i++) begin
          if (!own[i]) continue;
          wr_fetch = 1'b1; wr_tid = t; wr_idx = 5'(i);
          #1;
          chk(wr_data == val[i], $sformatf("write word %0d", i));
          @(negedge clk);
          wr_fetch = 1'b0;
          r++;
          chk(txn_busy[t] == (r != cnt), "write line until last element");
        end
      end
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
