// tb_bank_controller: one bank controller (bank 5 of 16) with the behavioural
// SDRAM model, driven through the vector bus as the memory controller would.
// Each round issues up to six back-to-back vector commands with distinct
// transaction ids (scatters are preceded by STAGE_WRITE and their 16 data
// cycles), waits for this bank's transaction lines to drop, then reads the
// gathered lines back with STAGE_READ. Checks: the bank drives exactly the
// 32-bit slots of the elements it owns (address mod 16 = 5) with the right
// data, never holds a line after its last element, and the SDRAM model sees
// no timing violation. It also measures the command-to-vector-context
// latency: a power-of-two stride must be ready within 2 cycles (FirstHit
// Predict bypass), any other stride within 5. Commands in one round never
// touch a word another command of the round writes, so the reference memory
// is defined whatever order the bank picks.
module tb_bank_controller;
  import pva_pkg::*;
  import pva_tb_pkg::*;
  localparam int BANK = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  vbus_req_t       vb_req;
  logic [BUSW-1:0] vb_wdata, rd_drive;
  logic [3:0]      rd_drive_en;
  logic [NTID-1:0] txn_busy;
  sdram_cmd_t      sd_cmd;
  logic [DW-1:0]   sd_wdata, sd_rdata;
  logic            fhp_bypass, fhc_bypass, idle;
  int              violations, n_fhp_byp = 0, n_fhc_byp = 0;

  bank_controller #(.BANK_ID(BANK)) u_dut (
    .clk, .rst_n, .vb_req, .vb_wdata, .rd_drive, .rd_drive_en, .txn_busy,
    .sd_cmd, .sd_wdata, .sd_rdata, .fhp_bypass, .fhc_bypass, .idle
  );
  sdram_model #(.BANK(BANK)) u_mem (.clk, .cmd(rst_n ? sd_cmd : '0), .wdata(sd_wdata), .rdata(sd_rdata), .violations);

  always @(posedge clk) if (rst_n) begin
    n_fhp_byp += int'(fhp_bypass);
    n_fhc_byp += int'(fhc_bypass);
  end

  logic [31:0] ref_mem [logic [31:0]];
  // 16 banks of 2^24 words: the word address has 28 significant bits
  function automatic logic [31:0] m28(logic [31:0] a);
    return {4'd0, a[27:0]};
  endfunction
  function automatic logic [31:0] ref_rd(logic [31:0] a);
    return ref_mem.exists(m28(a)) ? ref_mem[m28(a)] : init_word(m28(a));
  endfunction

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic bus(vcmd_e c, logic [2:0] t, logic [31:0] a, logic [31:0] s, logic [5:0] l);
    @(negedge clk);
    vb_req = '{valid: 1'b1, cmd: c, tid: t, addr: a, stride: s, length: l};
  endtask

  task automatic wait_lines(logic [NTID-1:0] m);
    int g;
    g = 0;
    @(negedge clk);
    vb_req = '0;
    @(negedge clk);
    while ((txn_busy & m) != '0 && g < 4000) begin @(negedge clk); g++; end
    chk((txn_busy & m) == '0, "transaction lines released");
  endtask

  task automatic stage_read(logic [2:0] t, logic [31:0] a, logic [31:0] s, logic [5:0] l);
    bus(CMD_STAGE_READ, t, '0, '0, '0);
    @(negedge clk);
    vb_req = '0;
    for (int k = 0; k < NDCYC; k++) begin
      for (int j = 0; j < 2; j++) begin
        int i;
        logic [31:0] ea;
        logic mine;
        logic [1:0] sl;
        i = 2 * k + j;
        ea = a + s * 32'(i);
        mine = i < int'(l) && ea[3:0] == 4'(BANK);
        sl = {1'(k % 2), 1'(j)};
        chk(rd_drive_en[sl] == mine, $sformatf("tid %0d element %0d slot ownership", t, i));
        if (mine) chk(rd_drive[32*sl +: 32] == ref_rd(ea), $sformatf("tid %0d element %0d at %h: got %h expected %h", t, i, ea, rd_drive[32*sl +: 32], ref_rd(ea)));
      end
      @(negedge clk);
    end
    chk(rd_drive_en == '0, "bus released after the data cycles");
  endtask

  task automatic latency(logic [31:0] s, int max_cyc);
    int k;
    bus(CMD_VEC_READ, 3'd0, 32'h40 + 32'(BANK), s, 6'd32);
    @(negedge clk);
    vb_req = '0;
    k = 0;
    while (!u_dut.u_sched.ctx[0].valid && k < 20) begin @(negedge clk); k++; end
    checks++;
    // the command occupies one cycle; the request is ready k+1 cycles after it
    if (k + 1 > max_cyc) begin
      failures++;
      $display("FAIL: stride %0d ready %0d cycles after the command (max %0d)", s, k + 1, max_cyc);
    end else $display("stride %0d: vector context loaded %0d cycles after the command", s, k + 1);
    wait_lines(8'h01);
    stage_read(3'd0, 32'h40 + 32'(BANK), s, 6'd32);
  endtask

  localparam int STRIDES [8] = '{1, 2, 4, 8, 16, 19, 3, 12};

  initial begin
    vb_req = '0; vb_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    latency(32'd4, 2);
    latency(32'd19, 5);
    latency(32'd16, 2);
    for (int r = 0; r < 150; r++) begin
      int n;
      logic [31:0] a [6], s [6];
      logic [5:0]  l [6];
      logic        w [6];
      logic [31:0] wset [logic [31:0]];
      n = $urandom_range(1, 6);
      for (int c = 0; c < n; c++) begin
        logic ok;
        do begin
          ok = 1'b1;
          w[c] = 1'($urandom);
          s[c] = ($urandom % 2) ? 32'(STRIDES[$urandom_range(0, 7)]) : 32'($urandom_range(0, 300));
          a[c] = ($urandom % 2) ? 32'($urandom_range(0, 1 << 16)) : $urandom;
          l[c] = 6'($urandom_range(1, 32));
          for (int i = 0; i < int'(l[c]); i++) if (wset.exists(m28(a[c] + s[c] * 32'(i)))) ok = 1'b0;
          // a scatter must not touch a word an earlier command of the round uses
          for (int p = 0; p < c && w[c]; p++)
            for (int i = 0; i < int'(l[c]); i++)
              for (int q = 0; q < int'(l[p]); q++)
                if (m28(a[c] + s[c] * 32'(i)) == m28(a[p] + s[p] * 32'(q))) ok = 1'b0;
          // and the same word twice in one scatter has no defined order
          if (w[c] && s[c] == 0 && l[c] > 1) ok = 1'b0;
        end while (!ok);
        if (w[c]) begin
          logic [31:0] line [VLEN];
          for (int i = 0; i < VLEN; i++) line[i] = $urandom;
          bus(CMD_STAGE_WRITE, 3'(c), '0, '0, '0);
          for (int k = 0; k < NDCYC; k++) begin
            @(negedge clk);
            vb_req = '0;
            vb_wdata = '0;
            vb_wdata[64*(k%2) +: 64] = {line[2*k+1], line[2*k]};
          end
          @(negedge clk);
          vb_wdata = '0;
          vb_req = '{valid: 1'b1, cmd: CMD_VEC_WRITE, tid: 3'(c), addr: a[c], stride: s[c], length: l[c]};
          for (int i = 0; i < int'(l[c]); i++) begin
            ref_mem[m28(a[c] + s[c] * 32'(i))] = line[i];
            wset[m28(a[c] + s[c] * 32'(i))] = 1;
          end
        end else
          bus(CMD_VEC_READ, 3'(c), a[c], s[c], l[c]);
      end
      wait_lines(8'hFF);
      for (int c = 0; c < n; c++) if (!w[c]) stage_read(3'(c), a[c], s[c], l[c]);
    end
    repeat (5) @(negedge clk);
    chk(idle, "bank controller idle at the end");
    chk(violations == 0, "no SDRAM timing violation");
    chk(n_fhp_byp > 0 && n_fhc_byp > 0, "both bypass paths used");
    $display("FirstHit Predict bypasses %0d, FirstHit Calculate bypasses %0d", n_fhp_byp, n_fhc_byp);
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
