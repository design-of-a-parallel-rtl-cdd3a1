// firsthit_calc (FHC): completes the firsthit address of queued requests whose
// stride is not a power of two.
//
// The unit keeps a work pointer (workptr) into the Register File and a count
// of queued entries it has not yet scanned. Each cycle it looks at the entry
// under workptr through Outbus_1: an entry whose ACC flag is already set (a
// power-of-two stride, finished by FirstHit Predict) is skipped. Otherwise it
// multiplies the firsthit index K by the stride (cycle 1), adds the base
// address and writes the entry back through Inbus_1 with ACC set (cycle 2).
// While the scheduler is busy this two-cycle delay is hidden.
//
// Timing: the write-back cycle also raises wb_valid with the completed entry
// and its slot (wb_entry, inbus_1_sel); the bank controller uses this as the
// bypass into the access scheduler when the entry is the queue head.
// enq tells the unit that a new entry was queued in this cycle.
module firsthit_calc
  import pva_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enq,
  input  vreq_t         outbus_1,
  output logic [PW-1:0] outbus_1_sel,
  output logic          outbus_1_enable,
  output vreq_t         inbus_1,
  output logic [PW-1:0] inbus_1_sel,
  output logic          inbus_1_enable,
  output logic          wb_valid,
  output logic          busy
);

  typedef enum logic {S_SCAN, S_ADD} state_e;

  state_e          state;
  logic [PW-1:0]   workptr;
  logic [PW:0]     unscanned;
  vreq_t           ent_q;
  logic [AW-1:0]   prod_q;
  logic            advance;

  assign outbus_1_sel    = workptr;
  assign outbus_1_enable = state == S_SCAN && unscanned != '0;
  assign advance         = (state == S_SCAN && unscanned != '0 && outbus_1.acc) || state == S_ADD;

  always_comb begin
    inbus_1      = ent_q;
    inbus_1.addr = ent_q.addr + prod_q;
    inbus_1.acc  = 1'b1;
  end
  assign inbus_1_sel    = workptr;
  assign inbus_1_enable = state == S_ADD;
  assign wb_valid       = state == S_ADD;
  assign busy           = state == S_ADD || unscanned != '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_SCAN;
      workptr   <= '0;
      unscanned <= '0;
      ent_q     <= '0;
      prod_q    <= '0;
    end else begin
      unscanned <= unscanned + (PW+1)'(enq) - (PW+1)'(advance);
      if (advance) workptr <= PW'((32'(workptr) + 1) % DEPTH);
      case (state)
        S_SCAN:
          if (unscanned != '0 && !outbus_1.acc) begin
            ent_q  <= outbus_1;
            prod_q <= outbus_1.stride * AW'(outbus_1.idx);
            state  <= S_ADD;
          end
        S_ADD:
          state <= S_SCAN;
        default:
          state <= S_SCAN;
      endcase
    end
  end

endmodule
