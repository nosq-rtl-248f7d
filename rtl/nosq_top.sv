// nosq_top: the memory side of a core that communicates from stores to loads
// without a store queue or a load queue.
//
// Rename (smb_rename) decides for every load, with the distance-based
// bypassing predictor, whether it communicates with an in-flight store. A
// communicating load is not executed: its destination is renamed to the
// physical register that holds the store's data (speculative memory
// bypassing). Stores are not executed out of order either; they wait in the
// augmented reorder buffer (rob). The extended commit pipeline
// (commit_pipeline) reads base and data registers from the register file,
// generates addresses, writes stores into the data cache, and uses the store
// vulnerability window (SSBF plus SSNs from ssn_counters) to decide which
// loads must reread the cache to be verified. A verified mismatch squashes
// and retrains the predictor.
//
// What lies outside this module and is reached through ports: decode (one
// instruction per cycle), the free list (new_preg / preg_used), the
// out-of-order engine that executes ALU operations and nonbypassing loads
// (disp_* out; ooo_rd_* register reads; wb_* completions, which also write
// the register file when wb_has_dst), and the
// data cache (dc_* for the commit pipeline; the out-of-order engine's loads
// read it directly). Delayed loads do not go to the engine at once: they
// wait in delay_buffer until their predicted store has committed and are
// then handed over on rel_*. The engine must report, with each load's
// completion, the ssn_commit value at the time it read the cache. squash_valid asks the
// front end to refetch from squash_pc and the engine to drop all its work.
//
// SSN_MAX lowers the SSN wrap point for testing; the default is the full
// 20-bit range.
module nosq_top
  import nosq_pkg::*;
#(
  parameter int unsigned ROB_ENTRIES  = 128,
  parameter int unsigned PRED_ENTRIES = 2048,
  parameter int unsigned SRQ_ENTRIES  = 128,
  parameter int unsigned SSBF_ENTRIES = 256,
  parameter int unsigned NWB          = 4,
  parameter int unsigned NOOO_RD      = 8,
  parameter int unsigned DELAY_ENTRIES = 8,
  parameter ssn_t        SSN_MAX      = '1,
  localparam int unsigned RBITS       = $clog2(ROB_ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // decode and free list
  input  logic             dec_valid,
  input  dec_inst_t        dec,
  output logic             dec_ready,
  input  preg_t            new_preg,
  output logic             preg_used,
  // out-of-order engine
  input  logic             ooo_full,
  output logic             disp_valid,
  output op_e              disp_op,
  output logic             disp_has_dst,
  output preg_t            disp_pdst,
  output preg_t            disp_psrc1,
  output preg_t            disp_psrc2,
  output logic [11:0]      disp_imm,
  output logic [RBITS-1:0] disp_rob_idx,
  output logic             rel_valid,
  output preg_t            rel_pdst,
  output preg_t            rel_pbase,
  output logic [11:0]      rel_imm,
  output logic [RBITS-1:0] rel_rob_idx,
  input  logic             rel_ready,
  input  preg_t            ooo_rd_addr [NOOO_RD],
  output data_t            ooo_rd_data [NOOO_RD],
  input  logic [NWB-1:0]   wb_valid,
  input  logic [NWB-1:0]   wb_has_dst,
  input  preg_t            wb_preg     [NWB],
  input  data_t            wb_data     [NWB],
  input  logic [RBITS-1:0] wb_rob_idx  [NWB],
  input  ssn_t             wb_ssn_nvul [NWB],
  output ssn_t             ssn_commit,
  // data cache port of the commit pipeline
  output logic             dc_req,
  output logic             dc_we,
  output addr_t            dc_addr,
  output data_t            dc_wdata,
  input  data_t            dc_rdata,
  input  logic             evict_valid,
  input  addr_t            evict_addr,
  output logic             evict_ready,
  // squash, retirement, events
  output logic             squash_valid,
  output addr_t            squash_pc,
  output logic             retire_valid,
  output rob_entry_t       retire_entry,
  output logic             ev_rename_load,
  output ld_kind_e         ev_rename_kind,
  output logic             ev_filtered,
  output logic             ev_reexec,
  output logic             ev_train_valid,
  output train_t           ev_train,
  output logic             ev_ssn_clear
);

  // ---------------- SSN counters ----------------
  ssn_t ssn_rename;
  logic wrap_stall, ssn_clear, rename_store, commit_store, rob_empty, cp_empty;
  ssn_t squash_ssn;

  ssn_counters #(.SSN_MAX(SSN_MAX)) u_ssn (
    .clk, .rst_n,
    .rename_store, .commit_store,
    .squash_valid, .squash_ssn,
    .drained(rob_empty && cp_empty),
    .ssn_rename, .ssn_commit, .wrap_stall, .clear(ssn_clear)
  );

  // ---------------- rename ----------------
  logic       fire, rob_done, rob_full;
  rob_entry_t alloc_entry;
  logic       train_valid, cm_valid;
  train_t     train;
  areg_t      cm_areg;
  preg_t      cm_preg;
  hist_t      squash_hist;

  logic  rn_disp_valid, rn_wait, dly_full;
  ssn_t  rn_wait_ssn;

  smb_rename #(.PRED_ENTRIES(PRED_ENTRIES), .SRQ_ENTRIES(SRQ_ENTRIES)) u_rename (
    .clk, .rst_n,
    .dec_valid, .dec, .dec_ready, .new_preg, .preg_used,
    .stall(rob_full || ooo_full || dly_full),
    .ssn_rename, .ssn_commit, .wrap_stall, .rename_store,
    .fire, .rob_entry(alloc_entry), .rob_done,
    .disp_valid(rn_disp_valid), .disp_op, .disp_has_dst, .disp_pdst, .disp_psrc1, .disp_psrc2,
    .disp_imm, .disp_wait(rn_wait), .disp_wait_ssn(rn_wait_ssn),
    .train_valid, .train, .cm_valid, .cm_areg, .cm_preg,
    .recover(squash_valid), .recover_hist(squash_hist)
  );

  // ---------------- delayed loads ----------------
  assign disp_valid = rn_disp_valid && !rn_wait;

  delay_buffer #(.ENTRIES(DELAY_ENTRIES), .RBITS(RBITS)) u_delay (
    .clk, .rst_n, .flush(squash_valid), .ssn_commit,
    .enq_valid(rn_disp_valid && rn_wait), .enq_pdst(disp_pdst), .enq_pbase(disp_psrc1),
    .enq_imm(disp_imm), .enq_rob_idx(disp_rob_idx), .enq_wait_ssn(rn_wait_ssn), .full(dly_full),
    .rel_valid, .rel_pdst, .rel_pbase, .rel_imm, .rel_rob_idx, .rel_ready
  );

  // ---------------- reorder buffer ----------------
  logic       head_valid, pop;
  rob_entry_t head_entry;

  rob #(.ENTRIES(ROB_ENTRIES), .NWB(NWB)) u_rob (
    .clk, .rst_n,
    .alloc_valid(fire), .alloc_entry, .alloc_done(rob_done), .alloc_idx(disp_rob_idx),
    .full(rob_full), .empty(rob_empty),
    .wb_valid, .wb_idx(wb_rob_idx), .wb_ssn_nvul,
    .head_valid, .head_entry, .pop, .flush(squash_valid)
  );

  // ---------------- register file ----------------
  localparam int unsigned NRD = NOOO_RD + 2;
  preg_t rf_rd_addr [NRD];
  data_t rf_rd_data [NRD];
  preg_t cp_rf_addr [2];
  data_t cp_rf_data [2];

  always_comb begin
    for (int i = 0; i < NOOO_RD; i++) begin
      rf_rd_addr[i]  = ooo_rd_addr[i];
      ooo_rd_data[i] = rf_rd_data[i];
    end
    rf_rd_addr[NOOO_RD]     = cp_rf_addr[0];
    rf_rd_addr[NOOO_RD + 1] = cp_rf_addr[1];
    cp_rf_data[0] = rf_rd_data[NOOO_RD];
    cp_rf_data[1] = rf_rd_data[NOOO_RD + 1];
  end

  regfile #(.NRD(NRD), .NWR(NWB)) u_rf (
    .clk, .rst_n,
    .rd_addr(rf_rd_addr), .rd_data(rf_rd_data),
    .wr_en(wb_valid & wb_has_dst), .wr_addr(wb_preg), .wr_data(wb_data)
  );

  // ---------------- extended commit pipeline ----------------
  commit_pipeline #(.SSBF_ENTRIES(SSBF_ENTRIES)) u_commit (
    .clk, .rst_n,
    .head_valid, .head_entry, .pop,
    .rf_addr(cp_rf_addr), .rf_data(cp_rf_data),
    .dc_req, .dc_we, .dc_addr, .dc_wdata, .dc_rdata,
    .evict_valid, .evict_addr, .evict_ready,
    .ssn_clear, .ssn_commit, .commit_store,
    .cm_valid, .cm_areg, .cm_preg,
    .train_valid, .train,
    .squash_valid, .squash_pc, .squash_ssn, .squash_hist,
    .retire_valid, .retire_entry,
    .ev_filtered, .ev_reexec, .empty(cp_empty)
  );

  assign ev_rename_load = fire && dec.op == OP_LOAD;
  assign ev_rename_kind = alloc_entry.kind;
  assign ev_train_valid = train_valid;
  assign ev_train       = train;
  assign ev_ssn_clear   = ssn_clear;

endmodule
