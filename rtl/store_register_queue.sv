// store_register_queue (SRQ): for every in-flight store, the physical register
// that holds its data input. As the design describes it, the SRQ is indexed
// by the low-order bits of the store sequence number, holds only register
// numbers (no addresses, no values) and is used only at rename: a store
// writes its entry when it is renamed, and a bypassing load reads the entry
// of its predicted store to take that register as its own output mapping.
//
// ENTRIES must be a power of two so that the low SSN bits index it. The
// default of 128 (one entry per window slot, so that a window full of stores
// never overwrites a live entry) is this design's choice; the description
// only says it parallels a store queue in structure. Write happens at the
// clock edge; the read is combinational. Entries are cleared at reset.
module store_register_queue
  import nosq_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  localparam int unsigned IBITS  = $clog2(ENTRIES)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_valid,
  input  ssn_t  wr_ssn,
  input  preg_t wr_preg,
  input  ssn_t  rd_ssn,
  output preg_t rd_preg
);

  preg_t regs_q [ENTRIES];

  assign rd_preg = regs_q[rd_ssn[IBITS-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) regs_q[i] <= '0;
    end else if (wr_valid) begin
      regs_q[wr_ssn[IBITS-1:0]] <= wr_preg;
    end
  end

endmodule
