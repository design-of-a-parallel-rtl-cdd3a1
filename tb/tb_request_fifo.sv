// tb_request_fifo: random enqueue/dequeue on the Request FIFO compared with a
// reference queue of slot numbers: the head must name the oldest slot
// written, the Inbus_0 select must name the tail, and count/empty/full must
// track occupancy.
module tb_request_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       enq, deq, empty, full, in_en;
  logic [2:0] head, tail, in_sel;
  logic [3:0] count;
  int         q [$];

  request_fifo #(.DEPTH(8)) u_dut (
    .clk, .rst_n, .enq, .deq, .head, .tail, .count, .empty, .full,
    .inbus_0_sel(in_sel), .inbus_0_enable(in_en)
  );

  initial begin
    enq = 1'b0; deq = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      #1;
      enq = ($urandom % 2) && q.size() < 8;
      deq = ($urandom % 2) && q.size() > 0;
      #1;
      checks += 4;
      if (count != 4'(q.size())) begin failures++; $display("FAIL: count %0d vs %0d", count, q.size()); end
      if (empty != (q.size() == 0) || full != (q.size() == 8)) begin failures++; $display("FAIL: empty/full"); end
      if (q.size() > 0 && int'(head) != q[0]) begin failures++; $display("FAIL: head %0d vs %0d", head, q[0]); end
      if (in_en != enq || in_sel != tail) begin failures++; $display("FAIL: inbus_0 select/enable"); end
      @(posedge clk);
      if (deq) void'(q.pop_front());
      if (enq) q.push_back(int'(in_sel));
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
