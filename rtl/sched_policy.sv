// sched_policy (SPU): the scheduling policy unit of one vector context.
//
// The contexts form a daisy chain from the oldest to the newest; a datapath
// lock enters the oldest and each SPU either uses it to issue one SDRAM
// operation or passes it on (lock_out), so at most one operation issues per
// cycle and older contexts win. The policy:
//  * a context that is ready (its access hits an open row and all its
//    restimers allow it) waits while bank_actv shows that some context wants
//    to open or precharge a row, otherwise takes the lock and issues its read
//    or write;
//  * a blocked context (its row is not open) issues the precharge or activate
//    it needs when it holds the lock, its timers allow it (can_actpre) and no
//    context signals bank_hit_predict on that internal bank;
//  * an empty context passes the lock on.
// Row opens and precharges are thereby promoted over reads and writes.
// Purely combinational. The can_actpre gating is this design's reading of
// "only when all the resources it needs ... can be acquired".
module sched_policy (
  input  logic valid,
  input  logic ready,
  input  logic blocked,
  input  logic can_actpre,
  input  logic bank_hit_predict,
  input  logic bank_actv,
  input  logic lock_in,
  output logic issue_rw,
  output logic issue_actpre,
  output logic lock_out
);

  always_comb begin
    issue_rw     = 1'b0;
    issue_actpre = 1'b0;
    lock_out     = lock_in;
    if (valid) begin
      if (ready) begin
        if (!bank_actv && lock_in) begin
          issue_rw = 1'b1;
          lock_out = 1'b0;
        end
      end else if (blocked) begin
        if (!bank_hit_predict && can_actpre && lock_in) begin
          issue_actpre = 1'b1;
          lock_out     = 1'b0;
        end
      end
    end
  end

endmodule
