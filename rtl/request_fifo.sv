// request_fifo (RQF): the state machine and pointers that make the Register
// File behave as a first-in first-out queue of vector requests.
//
// A request accepted by FirstHit Predict (enq) is written through Inbus_0 at
// the tail; the Access Scheduler removes the head (deq) once its address
// calculation is complete. The module keeps head, tail and an occupancy count
// and produces the Inbus_0 select/enable for the Register File.
//
// Timing: enq and deq act at the clock edge; both may happen in one cycle.
// Enqueueing into a full queue cannot happen when the memory controller keeps
// to eight outstanding transactions, and dequeueing an empty queue is a
// scheduler error; assertions check both. Pointer-and-count form is this
// design's choice.
module request_fifo #(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enq,
  input  logic          deq,
  output logic [PW-1:0] head,
  output logic [PW-1:0] tail,
  output logic [PW:0]   count,
  output logic          empty,
  output logic          full,
  output logic [PW-1:0] inbus_0_sel,
  output logic          inbus_0_enable
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (enq) tail <= PW'((32'(tail) + 1) % DEPTH);
      if (deq) head <= PW'((32'(head) + 1) % DEPTH);
      count <= count + (PW+1)'(enq) - (PW+1)'(deq);
    end
  end

  assign empty          = count == '0;
  assign full           = count == (PW+1)'(DEPTH);
  assign inbus_0_sel    = tail;
  assign inbus_0_enable = enq;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(enq && full && !deq));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(deq && empty));

endmodule
