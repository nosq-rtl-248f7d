// smb_rename: the rename stage with speculative memory bypassing (SMB).
// One decoded instruction is renamed per cycle.
//
//  - A store takes SSN ssn_rename + 1, records the physical register of its
//    data input in the store register queue and goes only to the reorder
//    buffer: stores are not executed out of order.
//  - A load looks up the bypassing predictor. With a hit, its predicted
//    distance becomes a dynamic store: ssn_bypass = ssn_rename - distance.
//    If that store has not committed (ssn_bypass > ssn_commit) and the
//    entry's confidence is at least CONF_THRESH, the load is BYPASSING: its
//    destination is mapped to the store's data register read from the SRQ,
//    and it goes only to the reorder buffer. With lower confidence it is
//    DELAYED: dispatched with wait_ssn = ssn_bypass, to read the cache once
//    that store has committed. Otherwise it is NONBYPASSING and dispatched.
//  - Other instructions are renamed and dispatched as usual.
// These rules follow the description of the design. The threshold value, the
// one-per-cycle width and the port layout are this design's choices.
//
// Timing: all outputs are combinational from the inputs in the cycle that
// fire is high; the map table, SRQ and path history update at that edge.
// new_preg comes from an external free list and is consumed when preg_used.
module smb_rename
  import nosq_pkg::*;
#(
  parameter int unsigned PRED_ENTRIES = 2048,
  parameter int unsigned PRED_WAYS    = 4,
  parameter int unsigned SRQ_ENTRIES  = 128,
  parameter int unsigned CONF_INIT    = 2,
  parameter int unsigned CONF_THRESH  = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // from decode
  input  logic       dec_valid,
  input  dec_inst_t  dec,
  output logic       dec_ready,
  input  preg_t      new_preg,
  output logic       preg_used,
  input  logic       stall,        // reorder buffer or out-of-order engine full
  // SSN counters
  input  ssn_t       ssn_rename,
  input  ssn_t       ssn_commit,
  input  logic       wrap_stall,
  output logic       rename_store,
  // reorder buffer allocation
  output logic       fire,
  output rob_entry_t rob_entry,
  output logic       rob_done,      // needs no out-of-order execution
  // dispatch to the out-of-order engine
  output logic       disp_valid,
  output op_e        disp_op,
  output logic       disp_has_dst,
  output preg_t      disp_pdst,
  output preg_t      disp_psrc1,
  output preg_t      disp_psrc2,
  output logic [11:0] disp_imm,
  output logic       disp_wait,     // delayed load
  output ssn_t       disp_wait_ssn,
  // commit side
  input  logic       train_valid,
  input  train_t     train,
  input  logic       cm_valid,
  input  areg_t      cm_areg,
  input  preg_t      cm_preg,
  input  logic       recover,
  input  hist_t      recover_hist
);

  hist_t hist;
  pred_t pred;
  preg_t p_src1, p_src2, srq_preg;
  ssn_t  ssn_bypass;
  logic  in_flight;
  ld_kind_e kind;

  assign dec_ready = !stall && !wrap_stall && !recover;
  assign fire      = dec_valid && dec_ready;

  path_history u_hist (
    .clk, .rst_n,
    .upd_valid(fire), .upd_cond_br(dec.is_cond_br), .upd_taken(dec.br_taken),
    .upd_call(dec.is_call), .upd_pc(dec.pc),
    .restore_valid(recover), .restore_hist(recover_hist), .hist(hist)
  );

  bypass_predictor #(.ENTRIES(PRED_ENTRIES), .WAYS(PRED_WAYS), .CONF_INIT(CONF_INIT)) u_pred (
    .clk, .rst_n, .lk_pc(dec.pc), .lk_hist(hist), .pred(pred),
    .train_valid, .train
  );

  always_comb begin
    ssn_bypass = ssn_rename - ssn_t'(pred.distance);
    in_flight  = pred.hit && (ssn_t'(pred.distance) < ssn_rename) && (ssn_bypass > ssn_commit);
    if (in_flight && pred.conf >= conf_t'(CONF_THRESH)) kind = LD_BYPASS;
    else if (in_flight)                                  kind = LD_DELAY;
    else                                                 kind = LD_NONBYPASS;
  end

  store_register_queue #(.ENTRIES(SRQ_ENTRIES)) u_srq (
    .clk, .rst_n,
    .wr_valid(fire && dec.op == OP_STORE), .wr_ssn(ssn_rename + 1'b1), .wr_preg(p_src2),
    .rd_ssn(ssn_bypass), .rd_preg(srq_preg)
  );

  logic  is_ld, is_st, bypass;
  preg_t dst_preg;
  assign is_ld    = dec.op == OP_LOAD;
  assign is_st    = dec.op == OP_STORE;
  assign bypass   = is_ld && kind == LD_BYPASS;
  assign dst_preg = bypass ? srq_preg : new_preg;

  rename_map u_map (
    .clk, .rst_n,
    .rd_a(dec.lsrc1), .rd_a_p(p_src1), .rd_b(dec.lsrc2), .rd_b_p(p_src2),
    .wr_valid(fire && dec.has_dst && !is_st), .wr_areg(dec.ldst), .wr_preg(dst_preg),
    .cm_valid, .cm_areg, .cm_preg, .recover
  );

  assign rename_store = fire && is_st;
  assign preg_used    = fire && dec.has_dst && !is_st && !bypass;

  always_comb begin
    rob_entry            = '0;
    rob_entry.pc         = dec.pc;
    rob_entry.op         = dec.op;
    rob_entry.has_dst    = dec.has_dst && !is_st;
    rob_entry.ldst       = dec.ldst;
    rob_entry.pdst       = dst_preg;
    rob_entry.pbase      = p_src1;
    rob_entry.pdata      = is_st ? p_src2 : dst_preg;
    rob_entry.imm        = dec.imm;
    rob_entry.ssn        = is_st ? ssn_rename + 1'b1 : ssn_rename;
    rob_entry.kind       = is_ld ? kind : LD_NONBYPASS;
    rob_entry.ssn_bypass = ssn_bypass;
    rob_entry.pred_hit   = is_ld && in_flight;
    rob_entry.hist       = hist;
    rob_entry.ssn_nvul   = ssn_commit;
    rob_done             = is_st || bypass;
  end

  assign disp_valid    = fire && !is_st && !bypass;
  assign disp_op       = dec.op;
  assign disp_has_dst  = dec.has_dst;
  assign disp_pdst     = new_preg;
  assign disp_psrc1    = p_src1;
  assign disp_psrc2    = p_src2;
  assign disp_imm      = dec.imm;
  assign disp_wait     = is_ld && kind == LD_DELAY;
  assign disp_wait_ssn = ssn_bypass;

endmodule
