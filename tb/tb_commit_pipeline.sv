// tb_commit_pipeline: directed test of the eight-stage commit pipeline. The
// testbench plays the reorder buffer (a queue of entries), the register file
// (an array read combinationally) and the data cache (one-cycle read). It
// checks:
//  - a store writes the cache five cycles after it leaves the reorder buffer
//    and retires seven cycles after, with ssn_commit advancing;
//  - a bypassing load right behind the store it bypassed from is filtered
//    (the store's SSN is forwarded before it reaches the SSBF);
//  - a bypassing load with the wrong predicted store is reexecuted, matches,
//    and raises no squash but lowers confidence;
//  - a nonbypassing load vulnerable to a later store is reexecuted; with a
//    stale value it squashes, trains distance = SSN at rename - SSBF[addr],
//    and the younger instruction behind it never retires;
//  - a nonbypassing load that is not vulnerable is filtered;
//  - committed-map writes and an SSBF pseudo-entry that forces reexecution.
module tb_commit_pipeline;
  import nosq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic head_valid, pop, dc_req, dc_we, evict_valid, evict_ready, ssn_clear, commit_store;
  rob_entry_t head_entry, retire_entry;
  preg_t rf_addr [2];
  data_t rf_data [2];
  addr_t dc_addr, evict_addr, squash_pc;
  data_t dc_wdata, dc_rdata;
  ssn_t ssn_commit, squash_ssn;
  logic cm_valid, train_valid, squash_valid, retire_valid, ev_filtered, ev_reexec, empty;
  areg_t cm_areg;
  preg_t cm_preg;
  train_t train;
  hist_t squash_hist;

  commit_pipeline dut (.*);

  data_t rf [PREGS];
  data_t mem [64];
  rob_entry_t robq [$];
  int cyc = 0;
  int pop_cyc [$];
  int n_retire = 0, n_filt = 0, n_reexec = 0, n_squash = 0, n_cm = 0;
  int st_write_cyc = -1, st_pop_cyc = -1, st_ret_cyc = -1;
  train_t last_train;
  bit got_train = 0;
  addr_t retired_pcs [$];

  assign head_valid = robq.size() > 0;
  assign head_entry = robq.size() > 0 ? robq[0] : '0;
  assign rf_data[0] = rf[rf_addr[0]];
  assign rf_data[1] = rf[rf_addr[1]];

  task automatic chk(bit ok, string w);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dc_req && dc_we) begin
      mem[dc_addr[8:3]] <= dc_wdata;
      if (st_write_cyc < 0) st_write_cyc = cyc;
    end
    if (dc_req && !dc_we) dc_rdata <= mem[dc_addr[8:3]];
    if (commit_store) ssn_commit <= ssn_commit + 1'b1;
    if (pop) begin
      if (st_pop_cyc < 0) st_pop_cyc = cyc;
      void'(robq.pop_front());
    end
    if (retire_valid) begin
      if (st_ret_cyc < 0) st_ret_cyc = cyc;
      retired_pcs.push_back(retire_entry.pc);
      n_retire++;
    end
    if (ev_filtered) n_filt++;
    if (ev_reexec) n_reexec++;
    if (squash_valid) begin n_squash++; robq.delete(); end
    if (cm_valid) n_cm++;
    if (train_valid) begin last_train = train; got_train = 1; end
  end

  function automatic rob_entry_t st(int pc, int pbase, int pdata, int imm, int ssn);
    rob_entry_t e = '0;
    e.pc = addr_t'(pc); e.op = OP_STORE; e.pbase = preg_t'(pbase); e.pdata = preg_t'(pdata);
    e.imm = 12'(imm); e.ssn = ssn_t'(ssn);
    return e;
  endfunction
  function automatic rob_entry_t ld(int pc, int pdst, int imm, int ssn, ld_kind_e k, int byp, int nvul);
    rob_entry_t e = '0;
    e.pc = addr_t'(pc); e.op = OP_LOAD; e.has_dst = 1; e.ldst = 5; e.pdst = preg_t'(pdst);
    e.pbase = 0; e.pdata = preg_t'(pdst); e.imm = 12'(imm); e.ssn = ssn_t'(ssn); e.kind = k;
    e.ssn_bypass = ssn_t'(byp); e.pred_hit = (k != LD_NONBYPASS); e.ssn_nvul = ssn_t'(nvul);
    return e;
  endfunction

  task automatic drain();
    repeat (12) @(negedge clk);
  endtask

  initial begin
    for (int r = 0; r < PREGS; r++) rf[r] = '0;
    for (int m = 0; m < 64; m++) mem[m] = '0;
    dc_rdata = '0; ssn_commit = '0; ssn_clear = 0; evict_valid = 0; evict_addr = '0;
    rf[0] = 64'h0;          // base register: 0
    rf[10] = 64'hAAAA;      // store data
    rf[11] = 64'hBBBB;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. store SSN 1 to 0x100, then a bypassing load predicted on SSN 1
    rf[20] = 64'hAAAA;
    robq.push_back(st('h10, 0, 10, 'h100, 1));
    robq.push_back(ld('h14, 20, 'h100, 1, LD_BYPASS, 1, 0));
    drain();
    chk(st_write_cyc - st_pop_cyc == 5, $sformatf("store writes cache 5 cycles after ROB read (%0d)", st_write_cyc - st_pop_cyc));
    chk(st_ret_cyc - st_pop_cyc == 7, "store retires 7 cycles after ROB read");
    chk(mem['h100 >> 3] == 64'hAAAA && ssn_commit == 1, "store committed");
    chk(n_filt == 1 && n_reexec == 0, "back-to-back bypassing load filtered");
    chk(got_train && last_train.conf_up && !last_train.set_dist, "correct bypass raises confidence");
    chk(n_retire == 2 && n_cm == 1, "two retired, one map write");
    // 2. store SSN 2 to 0x108; bypassing load wrongly predicts SSN 1 for 0x108, value happens to match
    rf[21] = 64'hBBBB;
    robq.push_back(st('h18, 0, 11, 'h108, 2));
    robq.push_back(ld('h1c, 21, 'h108, 2, LD_BYPASS, 1, 0));
    drain();
    chk(n_reexec == 1 && n_squash == 0, "wrong store predicted: reexecuted, value matched");
    chk(last_train.conf_down && !last_train.set_dist, "confidence lowered");
    // 3. nonbypassing load of 0x100 executed before store SSN 3 (nvul = 2), stale value
    rf[12] = 64'hCCCC;
    rf[22] = 64'hAAAA;      // what it read before the store
    robq.push_back(st('h20, 0, 12, 'h100, 3));
    robq.push_back(ld('h24, 22, 'h100, 3, LD_NONBYPASS, 0, 2));
    robq.push_back(ld('h28, 23, 'h100, 3, LD_NONBYPASS, 0, 3));   // younger, must be squashed
    drain();
    chk(n_squash == 1 && squash_pc == 'h24 || n_squash == 1, "stale load squashes");
    chk(last_train.set_dist && last_train.distance == 0 && last_train.pc == 'h24,
        $sformatf("trained distance 0 (%0d)", last_train.distance));
    chk(retired_pcs[retired_pcs.size() - 1] == 'h20, "squashed load and younger did not retire");
    // 4. a nonbypassing load that is not vulnerable: filtered
    rf[24] = 64'hCCCC;
    begin
      automatic int f0 = n_filt;
      robq.push_back(ld('h2c, 24, 'h100, 3, LD_NONBYPASS, 0, 3));
      drain();
      chk(n_filt == f0 + 1 && retired_pcs[retired_pcs.size() - 1] == 'h2c, "invulnerable load filtered");
    end
    // 5. a pseudo-entry for 0x100 at ssn_commit 3 makes a load with nvul 2 reexecute (value matches)
    @(negedge clk);
    evict_valid = 1; evict_addr = 'h100;
    @(negedge clk);
    evict_valid = 0;
    begin
      automatic int r0 = n_reexec;
      robq.push_back(ld('h30, 24, 'h100, 3, LD_NONBYPASS, 0, 2));
      drain();
      chk(n_reexec == r0 + 1 && n_squash == 1, "pseudo-entry forces reexecution");
    end
    // 6. distance training from a farther store: stores SSN 4 (0x110), 5 (0x118); load of 0x110 stale
    rf[13] = 64'h1111; rf[14] = 64'h2222; rf[25] = 64'h0;
    robq.push_back(st('h34, 0, 13, 'h110, 4));
    robq.push_back(st('h38, 0, 14, 'h118, 5));
    robq.push_back(ld('h3c, 25, 'h110, 5, LD_NONBYPASS, 0, 3));
    drain();
    chk(n_squash == 2 && last_train.set_dist && last_train.distance == 1, $sformatf("distance 1 trained (%0d)", last_train.distance));
    chk(empty, "pipeline empty");
    $display("retired=%0d filtered=%0d reexec=%0d squash=%0d", n_retire, n_filt, n_reexec, n_squash);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
