// delay_buffer: the simple load scheduler that delay needs. A load whose
// bypassing prediction has low confidence is not bypassed; instead it must
// wait until its predicted store has committed and then read the data cache.
// Rename places such a load here (with the SSN of the store it waits for)
// instead of sending it to the out-of-order engine. Each cycle the oldest
// entry whose store has committed (ssn_commit >= wait_ssn) is released to
// the engine on the rel_* port, which treats it like any nonbypassing load.
//
// The waiting rule follows the description of delay; holding the loads in a
// separate small buffer (ENTRIES, default 8), releasing one per cycle, and
// stalling rename when it is full are this design's choices. Enqueue and
// release take effect at the clock edge; rel_valid is combinational from the
// stored entries and ssn_commit. flush empties the buffer (squash); reset
// empties it.
module delay_buffer
  import nosq_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned RBITS   = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  ssn_t             ssn_commit,
  // from rename
  input  logic             enq_valid,
  input  preg_t            enq_pdst,
  input  preg_t            enq_pbase,
  input  logic [11:0]      enq_imm,
  input  logic [RBITS-1:0] enq_rob_idx,
  input  ssn_t             enq_wait_ssn,
  output logic             full,
  // to the out-of-order engine
  output logic             rel_valid,
  output preg_t            rel_pdst,
  output preg_t            rel_pbase,
  output logic [11:0]      rel_imm,
  output logic [RBITS-1:0] rel_rob_idx,
  input  logic             rel_ready
);

  typedef struct packed {
    logic             v;
    preg_t            pdst;
    preg_t            pbase;
    logic [11:0]      imm;
    logic [RBITS-1:0] rob_idx;
    ssn_t             wait_ssn;
    logic [31:0]      age;
  } dent_t;

  dent_t ent_q [ENTRIES];
  logic [31:0] age_q;

  // oldest ready entry
  logic                       sel_ok;
  logic [$clog2(ENTRIES)-1:0] sel;
  always_comb begin
    sel_ok = 1'b0;
    sel    = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent_q[i].v && ssn_commit >= ent_q[i].wait_ssn &&
          (!sel_ok || ent_q[i].age < ent_q[sel].age)) begin
        sel_ok = 1'b1;
        sel    = $clog2(ENTRIES)'(i);
      end
    end
  end

  // a free slot
  logic                       free_ok;
  logic [$clog2(ENTRIES)-1:0] free_slot;
  always_comb begin
    free_ok   = 1'b0;
    free_slot = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!ent_q[i].v) begin
        free_ok   = 1'b1;
        free_slot = $clog2(ENTRIES)'(i);
      end
    end
  end

  assign full        = !free_ok;
  assign rel_valid   = sel_ok;
  assign rel_pdst    = ent_q[sel].pdst;
  assign rel_pbase   = ent_q[sel].pbase;
  assign rel_imm     = ent_q[sel].imm;
  assign rel_rob_idx = ent_q[sel].rob_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent_q[i] <= '0;
      age_q <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) ent_q[i].v <= 1'b0;
    end else begin
      if (rel_valid && rel_ready) ent_q[sel].v <= 1'b0;
      if (enq_valid && free_ok) begin
        ent_q[free_slot] <= '{v: 1'b1, pdst: enq_pdst, pbase: enq_pbase, imm: enq_imm,
                              rob_idx: enq_rob_idx, wait_ssn: enq_wait_ssn, age: age_q};
        age_q <= age_q + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) enq_valid |-> !full);

endmodule
