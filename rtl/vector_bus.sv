// vector_bus: the bank-controller side of the shared BC bus.
//
// Requests are broadcast to every bank controller unchanged, so this module
// only merges what the controllers drive back: during STAGE_READ data cycles
// each controller drives the 32-bit slots of the elements it holds and the
// merged 128-bit lines are the OR of all drives (one slot has one owner; an
// assertion checks it). Transaction line t, held by every controller that
// still has work for transaction t, behaves as a wired OR; transaction_complete
// is its inverse: 1 once no controller holds line t.
//
// Purely combinational. Tristate drivers of the prototype bus are modelled as
// OR-merged outputs with slot enables.
module vector_bus
  import pva_pkg::*;
#(
  parameter int unsigned NB = NBANK
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NB-1:0][BUSW-1:0]       rd_drive,
  input  logic [NB-1:0][BUSW/DW-1:0]    rd_drive_en,
  input  logic [NB-1:0][NTID-1:0]       txn_busy,
  output logic [BUSW-1:0]               vb_rdata,
  output logic [NTID-1:0]               transaction_complete,
  output logic                          slot_conflict
);

  logic [NTID-1:0]    busy_or;
  logic [BUSW/DW-1:0] seen;

  always_comb begin
    vb_rdata      = '0;
    busy_or       = '0;
    seen          = '0;
    slot_conflict = 1'b0;
    for (int b = 0; b < NB; b++) begin
      vb_rdata      = vb_rdata | rd_drive[b];
      busy_or       = busy_or | txn_busy[b];
      slot_conflict = slot_conflict | (|(seen & rd_drive_en[b]));
      seen          = seen | rd_drive_en[b];
    end
    transaction_complete = ~busy_or;
  end

  a_single_driver: assert property (@(posedge clk) disable iff (!rst_n) !slot_conflict);

endmodule
