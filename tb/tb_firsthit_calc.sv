// tb_firsthit_calc: FirstHit Calculate working on a real Register File. The
// testbench plays the Request FIFO: it writes requests into consecutive slots
// through Inbus_0 and pulses enq. Requests without ACC must be written back
// exactly once with addr = B + K*S and ACC set; requests with ACC must be left
// alone. An isolated request must be written back two cycles after it was
// queued (multiply, then add and write back).
module tb_firsthit_calc;
  import pva_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  vreq_t      in0, in1, out0, out1;
  logic [2:0] s0, s1, r0, r1;
  logic       e0, e1, oe0, oe1, enq, wb_valid, busy;
  int         slot = 0;
  vreq_t      exp [8];
  int         wb_count [8];
  logic       orig_acc [8];

  register_file #(.DEPTH(8)) u_rf (
    .clk, .rst_n,
    .inbus_0(in0), .inbus_0_sel(s0), .inbus_0_enable(e0),
    .inbus_1(in1), .inbus_1_sel(s1), .inbus_1_enable(e1),
    .outbus_0_sel(r0), .outbus_0_enable(oe0), .outbus_0(out0),
    .outbus_1_sel(r1), .outbus_1_enable(oe1), .outbus_1(out1)
  );
  firsthit_calc #(.DEPTH(8)) u_dut (
    .clk, .rst_n, .enq, .outbus_1(out1), .outbus_1_sel(r1), .outbus_1_enable(oe1),
    .inbus_1(in1), .inbus_1_sel(s1), .inbus_1_enable(e1), .wb_valid, .busy
  );

  always @(posedge clk) if (rst_n && e1) wb_count[s1]++;

  function automatic vreq_t rnd(logic acc);
    vreq_t v;
    v = '{tid: 3'($urandom), wr: 1'($urandom), stride: $urandom_range(0, 5000), addr: $urandom,
          idx: 5'($urandom), dlog: 3'($urandom), count: 6'($urandom_range(1, 32)), acc: acc};
    return v;
  endfunction

  task automatic put(vreq_t v);
    @(negedge clk);
    in0 = v; s0 = 3'(slot); e0 = 1'b1; enq = 1'b1;
    exp[slot] = v;
    if (!v.acc) begin
      exp[slot].addr = v.addr + v.stride * AW'(v.idx);
      exp[slot].acc  = 1'b1;
    end
    wb_count[slot] = 0;
    orig_acc[slot] = v.acc;
    slot = (slot + 1) % 8;
    @(posedge clk);
    #1;
    e0 = 1'b0; enq = 1'b0;
  endtask

  task automatic drain_and_check(int first, int n);
    #1;
    while (busy) begin @(posedge clk); #1; end
    @(posedge clk);
    for (int i = 0; i < n; i++) begin
      int sl;
      sl = (first + i) % 8;
      r0 = 3'(sl); oe0 = 1'b1;
      #1;
      checks += 2;
      if (out0 != exp[sl]) begin failures++; $display("FAIL: slot %0d addr %0h exp %0h acc %0b wb %0d t=%0t", sl, out0.addr, exp[sl].addr, orig_acc[sl], wb_count[sl], $time); end
      if (wb_count[sl] != (orig_acc[sl] ? 0 : 1)) begin
        failures++;
        $display("FAIL: slot %0d written back %0d times", sl, wb_count[sl]);
      end
    end
    oe0 = 1'b0;
  endtask

  initial begin
    in0 = '0; s0 = '0; e0 = 1'b0; enq = 1'b0; r0 = '0; oe0 = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // isolated request: write-back two cycles after queueing
    for (int n = 0; n < 20; n++) begin
      int c;
      put(rnd(1'b0));
      c = 1;
      while (!wb_valid) begin @(posedge clk); #1; c++; end
      checks++;
      if (c != 2) begin failures++; $display("FAIL: write-back after %0d cycles", c); end
      drain_and_check((slot + 7) % 8, 1);
    end
    // bursts of up to eight mixed requests
    for (int n = 0; n < 300; n++) begin
      int first, cnt;
      first = slot; cnt = $urandom_range(1, 8);
      for (int i = 0; i < cnt; i++) put(rnd(1'($urandom)));
      drain_and_check(first, cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
