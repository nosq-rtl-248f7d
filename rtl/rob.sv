// rob: the augmented reorder buffer. Besides ordering, each entry keeps what
// the extended commit pipeline needs because there is no load or store
// queue: the physical registers of the base address and of the data, the
// immediate offset, the SSNs and the rename-time bypassing decision of a
// load (rob_entry_t in nosq_pkg). That list of contents follows the design's
// description; the circular-buffer organisation is this design's own.
//
// Interface: one allocation per cycle at the tail (alloc_idx is the slot it
// takes), NWB completion ports from the out-of-order engine (a load also
// returns the SSN it was not vulnerable to), and an in-order head that the
// commit pipeline pops when head_valid (oldest entry present and done).
// flush empties the buffer in one cycle. Reset empties it.
module rob
  import nosq_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned NWB     = 4,
  localparam int unsigned IBITS  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             alloc_valid,
  input  rob_entry_t       alloc_entry,
  input  logic             alloc_done,
  output logic [IBITS-1:0] alloc_idx,
  output logic             full,
  output logic             empty,
  input  logic [NWB-1:0]   wb_valid,
  input  logic [IBITS-1:0] wb_idx      [NWB],
  input  ssn_t             wb_ssn_nvul [NWB],
  output logic             head_valid,
  output rob_entry_t       head_entry,
  input  logic             pop,
  input  logic             flush
);

  rob_entry_t       ent_q  [ENTRIES];
  logic [ENTRIES-1:0] done_q;
  logic [IBITS-1:0] head_q, tail_q;
  logic [IBITS:0]   count_q;

  assign alloc_idx  = tail_q;
  assign full       = (count_q == (IBITS+1)'(ENTRIES));
  assign empty      = (count_q == '0);
  assign head_valid = !empty && done_q[head_q];
  assign head_entry = ent_q[head_q];

  function automatic logic [IBITS-1:0] inc(logic [IBITS-1:0] p);
    return (p == IBITS'(ENTRIES - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_alloc, do_pop;
  assign do_alloc = alloc_valid && !full;
  assign do_pop   = pop && head_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      done_q  <= '0;
    end else if (flush) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      done_q  <= '0;
    end else begin
      for (int i = 0; i < NWB; i++) begin
        if (wb_valid[i]) begin
          done_q[wb_idx[i]] <= 1'b1;
          ent_q[wb_idx[i]].ssn_nvul <= wb_ssn_nvul[i];
        end
      end
      if (do_alloc) begin
        ent_q[tail_q]  <= alloc_entry;
        done_q[tail_q] <= alloc_done;
        tail_q <= inc(tail_q);
      end
      if (do_pop) head_q <= inc(head_q);
      count_q <= count_q + (IBITS+1)'(do_alloc) - (IBITS+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) alloc_valid |-> !full);

endmodule
