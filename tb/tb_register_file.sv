// tb_register_file: random traffic on both write ports and both read ports of
// the eight-entry Register File, compared with a reference array; also checks
// that a disabled read port returns zero.
module tb_register_file;
  import pva_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  vreq_t      in0, in1, out0, out1;
  logic [2:0] s0, s1, r0, r1;
  logic       e0, e1, oe0, oe1;
  vreq_t      model [8];

  register_file #(.DEPTH(8)) u_dut (
    .clk, .rst_n,
    .inbus_0(in0), .inbus_0_sel(s0), .inbus_0_enable(e0),
    .inbus_1(in1), .inbus_1_sel(s1), .inbus_1_enable(e1),
    .outbus_0_sel(r0), .outbus_0_enable(oe0), .outbus_0(out0),
    .outbus_1_sel(r1), .outbus_1_enable(oe1), .outbus_1(out1)
  );

  function automatic vreq_t rnd();
    vreq_t v;
    v = '{tid: 3'($urandom), wr: 1'($urandom), stride: $urandom, addr: $urandom, idx: 5'($urandom),
          dlog: 3'($urandom), count: 6'($urandom), acc: 1'($urandom)};
    return v;
  endfunction

  initial begin
    {e0, e1, oe0, oe1} = '0;
    in0 = '0; in1 = '0; s0 = '0; s1 = '0; r0 = '0; r1 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 8; i++) model[i] = '0;
    for (int n = 0; n < 2000; n++) begin
      #1;
      in0 = rnd(); in1 = rnd();
      s0 = 3'($urandom); s1 = 3'($urandom);
      e0 = 1'($urandom); e1 = 1'($urandom) && s1 != s0;
      r0 = 3'($urandom); r1 = 3'($urandom);
      oe0 = ($urandom % 4) != 0; oe1 = ($urandom % 4) != 0;
      #1;
      checks += 2;
      if (out0 !== (oe0 ? model[r0] : '0)) begin failures++; $display("FAIL: outbus_0 entry %0d", r0); end
      if (out1 !== (oe1 ? model[r1] : '0)) begin failures++; $display("FAIL: outbus_1 entry %0d", r1); end
      @(posedge clk);
      if (e0) model[s0] = in0;
      if (e1) model[s1] = in1;
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
