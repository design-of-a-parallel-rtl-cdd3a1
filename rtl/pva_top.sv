// pva_top: the Parallel Vector Access unit.
//
// A vector command <B, S, L> with a transaction id is broadcast on the vector
// bus to NBANK bank controllers. Each one works out on its own, without
// expanding the vector, which elements live in its bank, and reads or writes
// them on its SDRAM while the others do the same in parallel. Read data are
// gathered in the controllers' staging units; when every controller has
// released transaction line t, the memory controller issues STAGE_READ t and
// the controllers holding elements 2k and 2k+1 drive them in data cycle k, so
// a dense 32-word line is returned in 16 cycles of 64 bits. A write is the
// reverse: STAGE_WRITE t and 16 data cycles, then VEC_WRITE; the line for t
// is released when all elements are written to SDRAM.
//
// Ports: vb_req is the vector bus request cycle from the memory controller,
// vb_wdata the 128-bit BC bus during STAGE_WRITE data cycles, vb_rdata the
// merged BC bus during STAGE_READ data cycles, transaction_complete the
// eight transaction lines (1 = complete). Each bank has an SDRAM command port
// sd_cmd, write data sd_wdata and read data sd_rdata (SDRAM read data is
// expected T_CL cycles after the command is sampled). fhp_bypass / fhc_bypass
// report bank controllers that used a bypass path, idle that all are idle.
// Sizes come from pva_pkg and follow the prototype (16 banks, 32-element
// vectors, 8 transactions, 4 vector contexts per bank controller).
module pva_top
  import pva_pkg::*;
#(
  parameter int unsigned NVC      = 4,
  parameter int unsigned RQ_DEPTH = NTID
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  vbus_req_t                  vb_req,
  input  logic [BUSW-1:0]            vb_wdata,
  output logic [BUSW-1:0]            vb_rdata,
  output logic [NTID-1:0]            transaction_complete,
  output sdram_cmd_t [NBANK-1:0]     sd_cmd,
  output logic [NBANK-1:0][DW-1:0]   sd_wdata,
  input  logic [NBANK-1:0][DW-1:0]   sd_rdata,
  output logic [NBANK-1:0]           fhp_bypass,
  output logic [NBANK-1:0]           fhc_bypass,
  output logic                       idle
);

  logic [NBANK-1:0][BUSW-1:0]    rd_drive;
  logic [NBANK-1:0][BUSW/DW-1:0] rd_drive_en;
  logic [NBANK-1:0][NTID-1:0]    txn_busy;
  logic [NBANK-1:0]              bc_idle;
  logic                          slot_conflict;

  for (genvar b = 0; b < NBANK; b++) begin : g_bc
    bank_controller #(.BANK_ID(b), .NVC(NVC), .RQ_DEPTH(RQ_DEPTH)) u_bc (
      .clk, .rst_n, .vb_req, .vb_wdata,
      .rd_drive    (rd_drive[b]),
      .rd_drive_en (rd_drive_en[b]),
      .txn_busy    (txn_busy[b]),
      .sd_cmd      (sd_cmd[b]),
      .sd_wdata    (sd_wdata[b]),
      .sd_rdata    (sd_rdata[b]),
      .fhp_bypass  (fhp_bypass[b]),
      .fhc_bypass  (fhc_bypass[b]),
      .idle        (bc_idle[b])
    );
  end

  vector_bus #(.NB(NBANK)) u_vbus (
    .clk, .rst_n, .rd_drive, .rd_drive_en, .txn_busy,
    .vb_rdata, .transaction_complete, .slot_conflict
  );

  assign idle = &bc_idle;

endmodule
