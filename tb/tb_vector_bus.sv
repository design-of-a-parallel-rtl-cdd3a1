// tb_vector_bus: random slot drives from 16 bank controllers, each slot owned
// by at most one; checks the merged data lines, the transaction-complete
// lines (complete only when no controller holds them) and that a doubly
// driven slot is flagged.
module tb_vector_bus;
  import pva_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NBANK-1:0][BUSW-1:0] drv;
  logic [NBANK-1:0][3:0]      en;
  logic [NBANK-1:0][NTID-1:0] busy;
  logic [BUSW-1:0]            rdata;
  logic [NTID-1:0]            done;
  logic                       conflict;

  vector_bus #(.NB(NBANK)) u_dut (.clk, .rst_n, .rd_drive(drv), .rd_drive_en(en), .txn_busy(busy),
                                  .vb_rdata(rdata), .transaction_complete(done), .slot_conflict(conflict));

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [BUSW-1:0] exp;
      logic [NTID-1:0] eb;
      drv = '0; en = '0; exp = '0; eb = '0;
      for (int s = 0; s < 4; s++) begin
        if ($urandom % 3 != 0) begin
          int b;
          logic [31:0] w;
          b = int'($urandom_range(0, NBANK - 1));
          w = $urandom;
          drv[b][s*32 +: 32] = w;
          en[b][s] = 1'b1;
          exp[s*32 +: 32] = w;
        end
      end
      for (int b = 0; b < NBANK; b++) begin
        busy[b] = ($urandom % 6 == 0) ? NTID'($urandom) : '0;
        eb |= busy[b];
      end
      #1;
      checks += 3;
      if (rdata != exp) begin failures++; $display("FAIL: merged data"); end
      if (done != ~eb) begin failures++; $display("FAIL: transaction lines"); end
      if (conflict) begin failures++; $display("FAIL: false conflict"); end
    end
    drv = '0; en = '0;
    en[3][1] = 1'b1; en[9][1] = 1'b1;
    #1;
    checks++;
    if (!conflict) begin failures++; $display("FAIL: double drive not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
