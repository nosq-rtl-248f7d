// path_history: the path history that makes the bypassing predictor's second
// table path-sensitive. Following the description of the predictor, every
// conditional branch shifts in one bit (its direction) and every procedure
// call shifts in two bits of its PC. Which two PC bits are used (bits 3:2,
// the lowest bits above the 4-byte instruction alignment) is this design's
// choice, as is the register length (HIST_BITS, default 16).
//
// Interface: one renamed instruction per cycle on upd_*; hist is the history
// before the instruction currently presented, so a load reads the path that
// led to it. restore_valid overwrites the register (squash recovery) and
// takes priority over an update in the same cycle. Reset clears it.
module path_history
  import nosq_pkg::*;
#(
  parameter int unsigned HBITS = HIST_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              upd_valid,
  input  logic              upd_cond_br,
  input  logic              upd_taken,
  input  logic              upd_call,
  input  addr_t             upd_pc,
  input  logic              restore_valid,
  input  logic [HBITS-1:0]  restore_hist,
  output logic [HBITS-1:0]  hist
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist <= '0;
    end else if (restore_valid) begin
      hist <= restore_hist;
    end else if (upd_valid && upd_cond_br) begin
      hist <= {hist[HBITS-2:0], upd_taken};
    end else if (upd_valid && upd_call) begin
      hist <= {hist[HBITS-3:0], upd_pc[3:2]};
    end
  end

endmodule
