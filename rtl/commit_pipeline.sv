// commit_pipeline: the extended in-order commit pipeline that replaces the
// load and store queues. Instructions leave the reorder buffer in order, one
// per cycle, and pass eight stages:
//
//   S0 ROB read   pop the head of the augmented reorder buffer
//   S1 Reg read   read the base register and the data register (store data,
//                 or the value a load produced) from the register file
//   S2 Agen       effective address = base + sign-extended offset
//   S3 SVW1       look up the SSBF with the load address; stores in S4/S5,
//                 which have not written the SSBF yet, are forwarded
//   S4 SVW2       reexecution filter: a bypassing load is safe when the SSBF
//                 holds exactly its predicted store (tagged hit, equal SSN);
//                 any other load is safe when SSBF[addr] <= its ssn_nvul
//   S5 DC1        stores write the data cache and the SSBF and advance
//                 ssn_commit; loads that were not filtered reread the cache
//   S6 DC2        a reread value that differs from the value the load
//                 produced squashes the load and everything younger and
//                 trains the predictor with distance = load SSN at rename -
//                 SSBF[addr]; every other load with a prediction (bypassing
//                 or delayed) raises its confidence when the SSBF names its
//                 predicted store and lowers it otherwise; the committed map
//                 table is written
//   S7 Commit     retire
//
// The stage list, the filter tests, the training rule and the sharing of one
// cache port and one data read port between store commit and load
// reexecution follow the description of the design. That description gives
// eight stages but names six (its "SVW" and "D-cache reread / D-cache write"
// stages); splitting each of those two in two, and the single-instruction
// width, are this design's reading. Distances are measured from the load's
// own rename-time SSN, which equals ssn_commit when the load commits.
//
// Interface: the data cache answers a read in the cycle after the request
// (dc_rdata valid in S6). squash_* is combinational in the cycle the
// mismatching load is in S6 and suppresses S5's cache and SSBF writes.
module commit_pipeline
  import nosq_pkg::*;
#(
  parameter int unsigned SSBF_ENTRIES = 256,
  parameter int unsigned SSBF_WAYS    = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // reorder buffer head
  input  logic       head_valid,
  input  rob_entry_t head_entry,
  output logic       pop,
  // register file: port 0 base, port 1 data
  output preg_t      rf_addr [2],
  input  data_t      rf_data [2],
  // data cache
  output logic       dc_req,
  output logic       dc_we,
  output addr_t      dc_addr,
  output data_t      dc_wdata,
  input  data_t      dc_rdata,
  // SSBF pseudo-entries for evicted blocks, and SSN wrap clear
  input  logic       evict_valid,
  input  addr_t      evict_addr,
  output logic       evict_ready,
  input  logic       ssn_clear,
  input  ssn_t       ssn_commit,
  output logic       commit_store,
  // committed map table
  output logic       cm_valid,
  output areg_t      cm_areg,
  output preg_t      cm_preg,
  // predictor training
  output logic       train_valid,
  output train_t     train,
  // squash
  output logic       squash_valid,
  output addr_t      squash_pc,
  output ssn_t       squash_ssn,
  output hist_t      squash_hist,
  // retirement and events
  output logic       retire_valid,
  output rob_entry_t retire_entry,
  output logic       ev_filtered,   // a load skipped reexecution
  output logic       ev_reexec,     // a load reread the cache
  output logic       empty
);

  typedef struct packed {
    logic       v;
    rob_entry_t e;
    data_t      base;
    data_t      data;
    addr_t      addr;
    logic       sb_hit;
    ssn_t       sb_ssn;
    logic       reexec;
    dist_t      distance;
  } stage_t;

  stage_t s1, s2, s3, s4, s5, s6, s7;
  stage_t n2, n3, n4, n5, n6;

  logic is_ld4, is_st5, is_ld6;

  // ---------------- S0: ROB read ----------------
  assign pop = head_valid && !squash_valid;

  // ---------------- S1: register read ----------------
  assign rf_addr[0] = s1.e.pbase;
  assign rf_addr[1] = s1.e.pdata;
  always_comb begin
    n2 = s1;
    n2.base = rf_data[0];
    n2.data = rf_data[1];
  end

  // ---------------- S2: address generation ----------------
  always_comb begin
    n3 = s2;
    n3.addr = s2.base[ADDR_BITS-1:0] + {{(ADDR_BITS-12){s2.e.imm[11]}}, s2.e.imm};
  end

  // ---------------- S3: SSBF lookup with forwarding ----------------
  logic sb_hit;
  ssn_t sb_ssn;
  logic sb_wr;
  assign sb_wr = is_st5 && !squash_valid;

  ssbf #(.ENTRIES(SSBF_ENTRIES), .WAYS(SSBF_WAYS)) u_ssbf (
    .clk, .rst_n, .clear(ssn_clear),
    .lk_addr(s3.addr), .lk_hit(sb_hit), .lk_ssn(sb_ssn),
    .wr_valid(sb_wr), .wr_addr(s5.addr), .wr_ssn(s5.e.ssn),
    .inv_valid(evict_valid), .inv_addr(evict_addr), .inv_ssn(ssn_commit),
    .inv_ready(evict_ready)
  );

  function automatic logic same_word(addr_t a, addr_t b);
    return a[ADDR_BITS-1:3] == b[ADDR_BITS-1:3];
  endfunction

  always_comb begin
    n4 = s3;
    n4.sb_hit = sb_hit;
    n4.sb_ssn = sb_ssn;
    if (s5.v && s5.e.op == OP_STORE && same_word(s5.addr, s3.addr)) begin
      n4.sb_hit = 1'b1;
      n4.sb_ssn = s5.e.ssn;
    end
    if (s4.v && s4.e.op == OP_STORE && same_word(s4.addr, s3.addr)) begin
      n4.sb_hit = 1'b1;
      n4.sb_ssn = s4.e.ssn;
    end
  end

  // ---------------- S4: SVW filter ----------------
  localparam dist_t DMAX = '1;
  ssn_t gap;
  assign is_ld4 = s4.v && s4.e.op == OP_LOAD;
  assign gap    = s4.e.ssn - s4.sb_ssn;
  always_comb begin
    n5 = s4;
    if (s4.e.kind == LD_BYPASS)
      n5.reexec = is_ld4 && !(s4.sb_hit && s4.sb_ssn == s4.e.ssn_bypass);
    else
      n5.reexec = is_ld4 && (s4.sb_ssn > s4.e.ssn_nvul);
    if (!s4.sb_hit || s4.sb_ssn > s4.e.ssn || gap > ssn_t'(DMAX))
      n5.distance = DMAX;
    else
      n5.distance = dist_t'(gap);
  end
  assign ev_filtered = is_ld4 && !n5.reexec;
  assign ev_reexec   = is_ld4 && n5.reexec;

  // ---------------- S5: data cache write / reread ----------------
  assign is_st5       = s5.v && s5.e.op == OP_STORE;
  assign dc_req       = (is_st5 && !squash_valid) || (s5.v && s5.reexec);
  assign dc_we        = is_st5;
  assign dc_addr      = s5.addr;
  assign dc_wdata     = s5.data;
  assign commit_store = is_st5 && !squash_valid;
  always_comb n6 = s5;

  // ---------------- S6: verify, train, commit map ----------------
  logic mismatch, correct;
  assign is_ld6   = s6.v && s6.e.op == OP_LOAD;
  assign mismatch = is_ld6 && s6.reexec && (dc_rdata != s6.data);
  assign correct  = s6.sb_hit && s6.sb_ssn == s6.e.ssn_bypass;

  assign squash_valid = mismatch;
  assign squash_pc    = s6.e.pc;
  assign squash_ssn   = s6.e.ssn;
  assign squash_hist  = s6.e.hist;

  always_comb begin
    train           = '0;
    train.pc        = s6.e.pc;
    train.hist      = s6.e.hist;
    train.distance      = s6.distance;
    train.set_dist  = mismatch;
    train.conf_up   = !mismatch && s6.e.pred_hit && correct;
    train.conf_down = !mismatch && s6.e.pred_hit && !correct;
  end
  assign train_valid = is_ld6 && (mismatch || s6.e.pred_hit);

  assign cm_valid = s6.v && s6.e.has_dst && !mismatch;
  assign cm_areg  = s6.e.ldst;
  assign cm_preg  = s6.e.pdst;

  // ---------------- S7: retire ----------------
  assign retire_valid = s7.v;
  assign retire_entry = s7.e;

  assign empty = !(s1.v || s2.v || s3.v || s4.v || s5.v || s6.v || s7.v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0; s5 <= '0; s6 <= '0; s7 <= '0;
    end else begin
      s7 <= s6;
      if (mismatch) s7.v <= 1'b0;
      if (squash_valid) begin
        s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0; s5 <= '0; s6 <= '0;
      end else begin
        s1   <= '0;
        s1.v <= pop;
        s1.e <= head_entry;
        s2 <= n2;
        s3 <= n3;
        s4 <= n4;
        s5 <= n5;
        s6 <= n6;
      end
    end
  end

endmodule
