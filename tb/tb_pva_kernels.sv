// tb_pva_kernels: runs the evaluation kernels on the full-size unit (default
// parameters, 16 SDRAM bank models). The testbench plays the processor and
// the memory controller: for every kernel (copy, copy2, saxpy, scale, scale2,
// swap, tridiag, vaxpy) and every stride (1, 2, 4, 8, 16, 19) it processes
// vectors of 1024 elements as 32 vector commands of 32 elements each: gather
// the input lines (VEC_READ, wait for the transaction line, STAGE_READ),
// compute on them, scatter the results (STAGE_WRITE, VEC_WRITE). copy2 and
// scale2 are the two-way unrolled versions with two lines per vector in
// flight. Arithmetic is 32-bit integer (a = 3 for the scalar kernels).
// After each run every output vector is read back through the unit and
// compared with a reference computed word by word in the testbench; the
// SDRAM models must report no timing violation. The cycles each run took are
// printed. Base addresses move by a few words from run to run so that the
// vectors start in different banks.
module tb_pva_kernels;
  import pva_pkg::*;
  import pva_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  vbus_req_t                vb_req;
  logic [BUSW-1:0]          vb_wdata, vb_rdata;
  logic [NTID-1:0]          transaction_complete;
  sdram_cmd_t [NBANK-1:0]   sd_cmd;
  logic [NBANK-1:0][DW-1:0] sd_wdata, sd_rdata;
  logic [NBANK-1:0]         fhp_bypass, fhc_bypass;
  logic                     idle;
  int                       viol [NBANK];

  pva_top dut (
    .clk, .rst_n, .vb_req, .vb_wdata, .vb_rdata, .transaction_complete,
    .sd_cmd, .sd_wdata, .sd_rdata, .fhp_bypass, .fhc_bypass, .idle
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_mem
    sdram_model #(.BANK(b)) u_mem (
      .clk, .cmd(rst_n ? sd_cmd[b] : '0), .wdata(sd_wdata[b]), .rdata(sd_rdata[b]), .violations(viol[b])
    );
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef logic [31:0] line_t [VLEN];
  localparam int NEL = 1024;
  localparam int NCH = NEL / VLEN;
  localparam logic [31:0] A_SCALAR = 32'd3;

  // golden memory
  logic [31:0] gold [logic [31:0]];
  function automatic logic [31:0] g_rd(logic [31:0] a);
    return gold.exists(a) ? gold[a] : init_word(a);
  endfunction

  longint issued_at [NTID];

  // ---------------- bus tasks (driven on the falling edge) ----------------
  task automatic wait_free(int t);
    int g;
    g = 0;
    while ((cycle < issued_at[t] + 3 || !transaction_complete[t]) && g < 20000) begin @(negedge clk); g++; end
    if (g >= 20000) begin failures++; $display("FAIL: transaction %0d never completed", t); end
  endtask

  task automatic vec(vcmd_e c, int t, logic [31:0] base, logic [31:0] stride, int len);
    wait_free(t);
    @(negedge clk);
    vb_req = '{valid: 1'b1, cmd: c, tid: 3'(t), addr: base, stride: stride, length: 6'(len)};
    issued_at[t] = cycle;
    @(negedge clk);
    vb_req = '0;
  endtask

  task automatic fetch(int t, output line_t d);
    wait_free(t);
    @(negedge clk);
    vb_req = '{valid: 1'b1, cmd: CMD_STAGE_READ, tid: 3'(t), addr: '0, stride: '0, length: '0};
    @(negedge clk);
    vb_req = '0;
    for (int k = 0; k < NDCYC; k++) begin
      {d[2*k+1], d[2*k]} = vb_rdata[64*(k%2) +: 64];
      @(negedge clk);
    end
  endtask

  task automatic put(int t, logic [31:0] base, logic [31:0] stride, line_t d);
    wait_free(t);
    @(negedge clk);
    vb_req = '{valid: 1'b1, cmd: CMD_STAGE_WRITE, tid: 3'(t), addr: '0, stride: '0, length: '0};
    for (int k = 0; k < NDCYC; k++) begin
      @(negedge clk);
      vb_req = '0;
      vb_wdata = '0;
      vb_wdata[64*(k%2) +: 64] = {d[2*k+1], d[2*k]};
    end
    @(negedge clk);
    vb_wdata = '0;
    vb_req = '{valid: 1'b1, cmd: CMD_VEC_WRITE, tid: 3'(t), addr: base, stride: stride, length: 6'(VLEN)};
    issued_at[t] = cycle;
    @(negedge clk);
    vb_req = '0;
  endtask

  // ---------------- kernels ----------------
  // vectors: 0 = x, 1 = y, 2 = z, 3 = a
  logic [31:0] vbase [4];

  function automatic logic [31:0] ea(int v, int i, logic [31:0] s);
    return vbase[v] + s * 32'(i);
  endfunction

  task automatic run(string name, logic [31:0] s, int run_no);
    int    nin, nout, unroll;
    int    in_v [3];
    int    out_v [2];
    longint t0;
    logic [31:0] prev;
    for (int v = 0; v < 4; v++) vbase[v] = 32'h0010_0000 * (v + 1) + 32'((run_no * 5 + v * 7) % 61);
    unroll = (name == "copy2" || name == "scale2") ? 2 : 1;
    case (name)
      "copy", "copy2":   begin nin = 1; in_v[0] = 0; nout = 1; out_v[0] = 1; end
      "scale", "scale2": begin nin = 1; in_v[0] = 0; nout = 1; out_v[0] = 0; end
      "saxpy":           begin nin = 2; in_v[0] = 0; in_v[1] = 1; nout = 1; out_v[0] = 1; end
      "swap":            begin nin = 2; in_v[0] = 0; in_v[1] = 1; nout = 2; out_v[0] = 0; out_v[1] = 1; end
      "tridiag":         begin nin = 2; in_v[0] = 2; in_v[1] = 1; nout = 1; out_v[0] = 0; end
      default:           begin nin = 3; in_v[0] = 3; in_v[1] = 0; in_v[2] = 1; nout = 1; out_v[0] = 1; end // vaxpy
    endcase
    // golden result, element by element in program order
    prev = g_rd(vbase[0] - s);
    for (int i = 0; i < NEL; i++) begin
      logic [31:0] x, y, z, a;
      x = g_rd(ea(0, i, s)); y = g_rd(ea(1, i, s)); z = g_rd(ea(2, i, s)); a = g_rd(ea(3, i, s));
      case (name)
        "copy", "copy2":   gold[ea(1, i, s)] = x;
        "scale", "scale2": gold[ea(0, i, s)] = A_SCALAR * x;
        "saxpy":           gold[ea(1, i, s)] = A_SCALAR * x + y;
        "swap":            begin gold[ea(0, i, s)] = y; gold[ea(1, i, s)] = x; end
        "tridiag":         begin gold[ea(0, i, s)] = z * (y - prev); prev = z * (y - prev); end
        default:           gold[ea(1, i, s)] = a * x + y;
      endcase
    end
    // the unit: x[-1] for tridiag comes through a one-element gather
    t0 = cycle;
    if (name == "tridiag") begin
      line_t d;
      vec(CMD_VEC_READ, 0, vbase[0] - s, s, 1);
      fetch(0, d);
      prev = d[0];
    end
    for (int c = 0; c < NCH; c += unroll) begin
      line_t din [2][3];
      line_t dout [2][2];
      for (int u = 0; u < unroll; u++)
        for (int j = 0; j < nin; j++)
          vec(CMD_VEC_READ, u * nin + j, ea(in_v[j], (c + u) * VLEN, s), s, VLEN);
      for (int u = 0; u < unroll; u++)
        for (int j = 0; j < nin; j++) fetch(u * nin + j, din[u][j]);
      for (int u = 0; u < unroll; u++)
        for (int i = 0; i < VLEN; i++)
          case (name)
            "copy", "copy2":   dout[u][0][i] = din[u][0][i];
            "scale", "scale2": dout[u][0][i] = A_SCALAR * din[u][0][i];
            "saxpy":           dout[u][0][i] = A_SCALAR * din[u][0][i] + din[u][1][i];
            "swap":            begin dout[u][0][i] = din[u][1][i]; dout[u][1][i] = din[u][0][i]; end
            "tridiag":         begin dout[u][0][i] = din[u][0][i] * (din[u][1][i] - prev); prev = dout[u][0][i]; end
            default:           dout[u][0][i] = din[u][0][i] * din[u][1][i] + din[u][2][i];
          endcase
      for (int u = 0; u < unroll; u++)
        for (int j = 0; j < nout; j++)
          put(4 + u * nout + j, ea(out_v[j], (c + u) * VLEN, s), s, dout[u][j]);
    end
    for (int t = 0; t < NTID; t++) wait_free(t);
    $display("%-8s stride %2d: %0d cycles for %0d elements", name, s, cycle - t0, NEL);
    // read every output vector back and compare
    for (int j = 0; j < nout; j++)
      for (int c = 0; c < NCH; c++) begin
        line_t d;
        vec(CMD_VEC_READ, 0, ea(out_v[j], c * VLEN, s), s, VLEN);
        fetch(0, d);
        for (int i = 0; i < VLEN; i++) begin
          checks++;
          if (d[i] != g_rd(ea(out_v[j], c * VLEN + i, s))) begin
            failures++;
            if (failures < 20) $display("FAIL: %s stride %0d vector %0d element %0d: got %h expected %h",
                                        name, s, out_v[j], c * VLEN + i, d[i], g_rd(ea(out_v[j], c * VLEN + i, s)));
          end
        end
      end
  endtask

  localparam int STRIDES [6] = '{1, 2, 4, 8, 16, 19};

  initial begin
    string kernels [8];
    int    n;
    kernels = '{"copy", "copy2", "saxpy", "scale", "scale2", "swap", "tridiag", "vaxpy"};
    vb_req = '0;
    vb_wdata = '0;
    for (int t = 0; t < NTID; t++) issued_at[t] = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    n = 0;
    foreach (kernels[k])
      foreach (STRIDES[i]) begin
        run(kernels[k], 32'(STRIDES[i]), n);
        n++;
      end
    begin
      int v;
      v = 0;
      for (int b = 0; b < NBANK; b++) v += viol[b];
      checks++;
      if (v != 0) begin failures++; $display("FAIL: %0d SDRAM timing violations", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
