// vector_context (VC): one vector request being serviced by the access
// scheduler.
//
// The context holds the address and element index of the next element this
// bank must access, the step to the following one (S << (m - s), so the
// index grows by the NextHit delta 2^(m-s)) and the number of elements left.
// Each issued read or write (advance) moves to the next element with one add;
// the context empties itself after its last element. From the open-row state
// broadcast by the scheduler it reports whether its next access hits the open
// row of its internal bank (row_hit), finds another row open (row_conflict),
// whether this is its last access, and whether the access after it falls in
// the same row of the same internal bank (next_row_hit).
//
// Timing: load, advance and release act at the clock edge; load wins over
// release, so a context can be refilled in the cycle it hands its request on.
// All status outputs are combinational from the stored state.
module vector_context
  import pva_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  vctx_t                     load_ctx,
  input  logic                      release_ctx,
  input  logic                      advance,
  input  logic [NIB-1:0]            open_q,
  input  logic [NIB-1:0][ROWW-1:0]  open_row,
  output vctx_t                     ctx,
  output logic [IBW-1:0]            ibank,
  output logic [ROWW-1:0]           row,
  output logic [COLW-1:0]           col,
  output logic                      row_hit,
  output logic                      row_conflict,
  output logic                      last,
  output logic                      next_row_hit
);

  logic [AW-1:0] next_addr;

  assign next_addr    = ctx.addr + ctx.step;
  assign ibank        = addr_ibank(ctx.addr);
  assign row          = addr_row(ctx.addr);
  assign col          = addr_col(ctx.addr);
  assign row_hit      = ctx.valid && open_q[ibank] && open_row[ibank] == row;
  assign row_conflict = ctx.valid && open_q[ibank] && open_row[ibank] != row;
  assign last         = ctx.remaining == LENW'(1);
  assign next_row_hit = !last && addr_ibank(next_addr) == ibank && addr_row(next_addr) == row;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctx <= '0;
    end else if (load) begin
      ctx <= load_ctx;
    end else if (advance) begin
      if (last) begin
        ctx.valid <= 1'b0;
      end
      ctx.addr      <= next_addr;
      ctx.idx       <= ctx.idx + IDXW'(1 << ctx.dlog);
      ctx.remaining <= ctx.remaining - 1'b1;
      ctx.first     <= 1'b0;
    end else if (release_ctx) begin
      ctx.valid <= 1'b0;
    end
  end

endmodule
