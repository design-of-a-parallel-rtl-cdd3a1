// sdram_model: behavioural model of one 32-bit SDRAM bank (two x16 parts in
// parallel, four internal banks, burst length one) as seen by one bank
// controller. Not synthesizable; for simulation only.
//
// It executes ACT / RD / WR / PRE with A10 as auto precharge, returns read
// data T_CL cycles after a read is sampled, and keeps written words in a
// sparse array; a word never written reads as init_word(global address), the
// global word address being {row, internal bank, column, BANK}. It checks the
// timing the controller must respect and counts every breach in violations:
// activate to an open bank or before the precharge time has passed, access to
// a closed bank, a different row or before T_RCD, precharge before write
// recovery, and data-bus slots that overlap or reverse direction without an
// idle cycle between them.
module sdram_model
  import pva_pkg::*;
  import pva_tb_pkg::*;
#(
  parameter int unsigned BANK  = 0,
  parameter int unsigned T_RCD = T_RCD_DEF,
  parameter int unsigned T_CL  = T_CL_DEF,
  parameter int unsigned T_RP  = T_RP_DEF,
  parameter int unsigned T_WR  = T_WR_DEF
) (
  input  logic          clk,
  input  sdram_cmd_t    cmd,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  output int            violations
);

  logic [DW-1:0]   mem [logic [31:0]];
  logic [DW-1:0]   rd_pipe [T_CL];
  longint          now;
  logic [NIB-1:0]  is_open;
  logic [ROWW-1:0] row_of [NIB];
  longint          act_ready [NIB];
  longint          acc_ready [NIB];
  longint          pre_ready [NIB];
  longint          last_slot;
  logic            last_slot_wr;

  initial begin
    now = 0;
    violations = 0;
    is_open = '0;
    last_slot = -10;
    last_slot_wr = 1'b0;
    for (int b = 0; b < NIB; b++) begin
      row_of[b] = '0;
      act_ready[b] = 0;
      acc_ready[b] = 0;
      pre_ready[b] = 0;
    end
    for (int k = 0; k < T_CL; k++) rd_pipe[k] = '0;
  end

  assign rdata = rd_pipe[T_CL-1];

  function automatic logic [31:0] gaddr(logic [IBW-1:0] ba, logic [ROWW-1:0] row, logic [COLW-1:0] col);
    return 32'({row, ba, col, MB'(BANK)});
  endfunction

  task automatic viol(string what);
    violations++;
    if (violations <= 5) $display("SDRAM bank %0d: %s violation at cycle %0d", BANK, what, now);
  endtask

  task automatic slot(longint s, logic is_wr);
    if (s <= last_slot || (is_wr != last_slot_wr && s < last_slot + 2)) viol("data bus");
    last_slot    = s;
    last_slot_wr = is_wr;
  endtask

  always @(posedge clk) begin
    logic [DW-1:0]  rd_val;
    logic [31:0]    ga;
    logic           ap;
    rd_val = '0;
    ap     = cmd.a[AP_BIT];
    case (cmd.op)
      SD_ACT: begin
        if (is_open[cmd.ba] || now < act_ready[cmd.ba]) viol("activate");
        is_open[cmd.ba]   = 1'b1;
        row_of[cmd.ba]    = cmd.a[ROWW-1:0];
        acc_ready[cmd.ba] = now + T_RCD;
        pre_ready[cmd.ba] = now + T_RCD;
      end
      SD_RD, SD_WR: begin
        if (!is_open[cmd.ba] || now < acc_ready[cmd.ba]) viol("read/write");
        ga = gaddr(cmd.ba, row_of[cmd.ba], cmd.a[COLW-1:0]);
        if (cmd.op == SD_RD) begin
          rd_val = mem.exists(ga) ? mem[ga] : init_word(ga);
          slot(now + T_CL, 1'b0);
          if (ap) act_ready[cmd.ba] = now + 1 + T_RP;
        end else begin
          mem[ga] = wdata;
          slot(now, 1'b1);
          pre_ready[cmd.ba] = now + T_WR;
          if (ap) act_ready[cmd.ba] = now + T_WR + T_RP;
        end
        if (ap) is_open[cmd.ba] = 1'b0;
      end
      SD_PRE: begin
        if (now < pre_ready[cmd.ba]) viol("precharge");
        is_open[cmd.ba]   = 1'b0;
        act_ready[cmd.ba] = now + T_RP;
      end
      default: ;
    endcase
    rd_pipe[0] <= rd_val;
    for (int k = 1; k < T_CL; k++) rd_pipe[k] <= rd_pipe[k-1];
    now++;
  end

endmodule
