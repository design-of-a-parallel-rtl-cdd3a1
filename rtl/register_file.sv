// register_file (RF): storage for vector requests that a bank controller has
// queued but not yet handed to a vector context.
//
// DEPTH entries of vreq_t with two write ports and two read ports, named as
// in the bank controller block diagram: Inbus_0 is written by the Request
// FIFO at its tail, Inbus_1 by FirstHit Calculate when it writes a completed
// firsthit address back; Outbus_0 feeds the Access Scheduler (queue head) and
// Outbus_1 feeds FirstHit Calculate (its work pointer). Each port has a
// select (entry number) and an enable.
//
// Timing: writes take effect at the clock edge; reads are combinational and
// return zero while their enable is low (the prototype's tristate read buses
// are modelled as gated outputs). The two write ports never address the same
// entry in one cycle; an assertion checks this. The depth of eight equals the
// outstanding transactions the BC bus allows.
module register_file
  import pva_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  vreq_t         inbus_0,
  input  logic [PW-1:0] inbus_0_sel,
  input  logic          inbus_0_enable,
  input  vreq_t         inbus_1,
  input  logic [PW-1:0] inbus_1_sel,
  input  logic          inbus_1_enable,
  input  logic [PW-1:0] outbus_0_sel,
  input  logic          outbus_0_enable,
  output vreq_t         outbus_0,
  input  logic [PW-1:0] outbus_1_sel,
  input  logic          outbus_1_enable,
  output vreq_t         outbus_1
);

  vreq_t entries [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) entries[i] <= '0;
    end else begin
      if (inbus_0_enable) entries[inbus_0_sel] <= inbus_0;
      if (inbus_1_enable) entries[inbus_1_sel] <= inbus_1;
    end
  end

  assign outbus_0 = outbus_0_enable ? entries[outbus_0_sel] : '0;
  assign outbus_1 = outbus_1_enable ? entries[outbus_1_sel] : '0;

  a_no_double_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(inbus_0_enable && inbus_1_enable && inbus_0_sel == inbus_1_sel));

endmodule
