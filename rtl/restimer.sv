// restimer: one SDRAM timing restriction as a small down-counter.
//
// Loading the value V at the clock edge that ends cycle t makes the resource
// unavailable until cycle t+V, when avail ("resource available") rises
// again. A load never shortens a wait already running: the counter takes the
// larger of the new value and what is left. The access scheduler keeps one
// restimer per restriction (activate-to-access, precharge-to-activate, write
// recovery, bus turnaround) and lets an operation issue only when every
// restimer it needs is available.
module restimer #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_val,
  output logic         avail
);

  logic [W-1:0] cnt, dec, nv;

  assign dec   = (cnt == '0) ? '0 : cnt - 1'b1;
  assign nv    = (load_val == '0) ? '0 : load_val - 1'b1;
  assign avail = cnt == '0;

  always_ff @(posedge clk) begin
    if (!rst_n)    cnt <= '0;
    else if (load) cnt <= (nv > dec) ? nv : dec;
    else           cnt <= dec;
  end

endmodule
