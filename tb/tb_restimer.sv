// tb_restimer: loads random waits into a restimer and checks cycle by cycle
// that "available" rises exactly the loaded number of cycles after the load,
// and that a shorter load never cuts a running wait.
module tb_restimer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       load, avail;
  logic [3:0] val;
  int         ready_at, now;

  restimer #(.W(4)) u_dut (.clk, .rst_n, .load, .load_val(val), .avail);

  initial begin
    load = 1'b0; val = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    now = 0; ready_at = 0;
    for (int n = 0; n < 3000; n++) begin
      #1;
      checks++;
      if (avail != (now >= ready_at)) begin
        failures++;
        $display("FAIL: cycle %0d avail %0b, ready at %0d", now, avail, ready_at);
      end
      load = ($urandom % 5) == 0;
      val  = 4'($urandom_range(0, 15));
      @(posedge clk);
      if (load && now + int'(val) > ready_at) ready_at = now + int'(val);
      now++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
