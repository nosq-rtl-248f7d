// ssn_counters: the two global store sequence number counters.
//   ssn_rename  SSN of the youngest renamed (dispatched) store; a store takes
//               ssn_rename + 1 when it is renamed.
//   ssn_commit  SSN of the youngest store that has written the data cache.
// SSN 0 means "no store": both counters start at 0 after reset or a clear.
//
// Wrap-around follows the description of the design: once ssn_rename reaches
// SSN_MAX (by default the largest value), wrap_stall holds rename until the pipeline has drained
// (drained high); the counters then return to 0 and clear pulses for one
// cycle so that every structure holding SSNs is emptied. A squash sets
// ssn_rename back to squash_ssn (the youngest store older than the squashed
// load). SSN_W defaults to 20 bits, the width the description gives as its
// example.
module ssn_counters
  import nosq_pkg::*;
#(
  parameter int unsigned SSN_W = SSN_BITS,
  parameter logic [SSN_W-1:0] SSN_MAX = '1   // wrap point; below '1 only to test
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rename_store,   // a store is renamed this cycle
  input  logic             commit_store,   // a store writes the cache this cycle
  input  logic             squash_valid,
  input  logic [SSN_W-1:0] squash_ssn,
  input  logic             drained,        // no instruction in flight
  output logic [SSN_W-1:0] ssn_rename,
  output logic [SSN_W-1:0] ssn_commit,
  output logic             wrap_stall,
  output logic             clear
);

  assign wrap_stall = (ssn_rename == SSN_MAX);
  assign clear      = wrap_stall && drained && (ssn_commit == ssn_rename);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ssn_rename <= '0;
      ssn_commit <= '0;
    end else if (clear) begin
      ssn_rename <= '0;
      ssn_commit <= '0;
    end else begin
      if (squash_valid)
        ssn_rename <= squash_ssn;
      else if (rename_store && !wrap_stall)
        ssn_rename <= ssn_rename + 1'b1;
      if (commit_store)
        ssn_commit <= ssn_commit + 1'b1;
    end
  end

  // A store can only commit after it was renamed.
  assert property (@(posedge clk) disable iff (!rst_n)
                   commit_store |-> ssn_commit != ssn_rename);

endmodule
