// tb_nosq_top: end-to-end test of nosq_top. The testbench plays the parts the
// top leaves outside: a front end that presents a generated program one
// instruction per cycle and refetches after a squash, a free list that hands
// out physical registers in rotation, an out-of-order engine that executes
// ALU operations and nonbypassing loads in random order with random
// latency (delayed loads reach it only when the top releases them), and a
// data cache with a one-cycle read.
//
// The program is a loop whose body contains store-load pairs at a fixed
// store distance (learned, then bypassed), a load that never meets an
// in-flight store, a load whose source store changes with the data
// (mispredicted until its confidence falls and it is delayed), and a load
// whose source follows a branch direction (path-sensitive). Every retired
// instruction's result and the final memory are compared with an in-order
// reference execution of the same program. The test counts bypassing,
// delayed and nonbypassing loads, filtered and reexecuted loads, squashes,
// confidence updates, SSN wrap-arounds, SSBF pseudo-entries and rename
// stalls, and counts a failure for each that never happened.
module tb_nosq_top;
  import nosq_pkg::*;

  localparam int unsigned ITERS = 160;
  localparam int unsigned BODY  = 16;
  localparam int unsigned N     = ITERS * BODY;
  localparam int unsigned NWB   = 4;
  localparam int unsigned NRD   = 8;
  localparam int unsigned MEMW  = 64;          // words of memory, from 0x100

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---------------- DUT ----------------
  logic       dec_valid, dec_ready, preg_used, ooo_full;
  dec_inst_t  dec;
  preg_t      new_preg;
  logic       disp_valid, disp_has_dst, rel_valid, rel_ready;
  preg_t      rel_pdst, rel_pbase;
  logic [11:0] rel_imm;
  logic [6:0] rel_rob_idx;
  op_e        disp_op;
  preg_t      disp_pdst, disp_psrc1, disp_psrc2;
  logic [11:0] disp_imm;
  ssn_t       ssn_commit;
  logic [6:0] disp_rob_idx;
  preg_t      ooo_rd_addr [NRD];
  data_t      ooo_rd_data [NRD];
  logic [NWB-1:0] wb_valid, wb_has_dst;
  preg_t      wb_preg [NWB];
  data_t      wb_data [NWB];
  logic [6:0] wb_rob_idx [NWB];
  ssn_t       wb_ssn_nvul [NWB];
  logic       dc_req, dc_we, evict_valid, evict_ready;
  addr_t      dc_addr, evict_addr, squash_pc;
  data_t      dc_wdata, dc_rdata;
  logic       squash_valid, retire_valid, ev_rename_load, ev_filtered, ev_reexec;
  logic       ev_train_valid, ev_ssn_clear;
  rob_entry_t retire_entry;
  ld_kind_e   ev_rename_kind;
  train_t     ev_train;

  nosq_top #(.SSN_MAX(ssn_t'(100))) dut (.*);

  // ---------------- program and reference ----------------
  typedef struct {
    dec_inst_t i;
    data_t     result;   // reference value of the destination
  } pinst_t;
  pinst_t prog [N];
  data_t  ref_mem [MEMW];
  data_t  mem [MEMW];

  function automatic dec_inst_t mk(op_e op, int dst, int s1, int s2, int imm, int slot, int it);
    dec_inst_t d;
    d = '0;
    d.pc = addr_t'(32'h4000 + slot * 4);
    d.op = op;
    d.has_dst = (op != OP_STORE);
    d.ldst = areg_t'(dst);
    d.lsrc1 = areg_t'(s1);
    d.lsrc2 = areg_t'(s2);
    d.imm = 12'(imm);
    return d;
  endfunction

  function automatic int widx(addr_t a);
    return int'((a - 32'h100) >> 3) % MEMW;
  endfunction

  initial begin
    data_t r [AREGS];
    for (int k = 0; k < AREGS; k++) r[k] = '0;
    for (int k = 0; k < MEMW; k++) ref_mem[k] = '0;
    for (int it = 0; it < ITERS; it++) begin
      automatic int b = it * BODY;
      automatic bit pick = $urandom_range(0, 1) == 1;
      automatic bit taken = $urandom_range(0, 1) == 1;
      // stores feeding a fixed-distance load
      prog[b+0].i  = mk(OP_ALU,   1, 1, 0, 3, 0, it);
      prog[b+1].i  = mk(OP_STORE, 0, 0, 1, 'h100, 1, it);
      prog[b+2].i  = mk(OP_ALU,   2, 2, 0, 5, 2, it);
      prog[b+3].i  = mk(OP_STORE, 0, 0, 2, 'h108, 3, it);
      prog[b+4].i  = mk(OP_LOAD,  3, 0, 0, 'h100, 4, it);   // distance 1
      prog[b+5].i  = mk(OP_ALU,   4, 3, 0, 1, 5, it);
      prog[b+6].i  = mk(OP_STORE, 0, 0, 4, pick ? 'h110 : 'h118, 6, it);
      // data-dependent source: 0x110 is written by slot 6 only when pick
      prog[b+7].i  = mk(OP_LOAD,  5, 0, 0, 'h110, 7, it);
      prog[b+8].i  = mk(OP_LOAD,  6, 0, 0, 'h1f0, 8, it);   // never stored
      prog[b+9].i  = mk(OP_ALU,   7, 6, 0, 2, 9, it);
      // conditional branch, then a load whose source follows its direction
      prog[b+10].i = mk(OP_ALU,   9, 9, 0, 1, 10, it);
      prog[b+10].i.has_dst = 1'b0;
      prog[b+10].i.is_cond_br = 1'b1;
      prog[b+10].i.br_taken = taken;
      prog[b+11].i = mk(OP_STORE, 0, 0, 5, 'h120, 11, it);
      prog[b+12].i = mk(OP_STORE, 0, 0, 7, 'h128, 12, it);
      prog[b+13].i = mk(OP_LOAD,  8, 0, 0, taken ? 'h120 : 'h128, 13, it);
      prog[b+14].i = mk(OP_ALU,  10, 8, 0, 7, 14, it);
      prog[b+15].i = mk(OP_ALU,  11, 10, 0, 1, 15, it);
      prog[b+15].i.is_call = (it % 3 == 0);
      for (int k = b; k < b + BODY; k++) begin
        data_t a;
        a = r[prog[k].i.lsrc1] + data_t'($signed(prog[k].i.imm));
        case (prog[k].i.op)
          OP_ALU:   if (prog[k].i.has_dst) r[prog[k].i.ldst] = a;
          OP_LOAD:  r[prog[k].i.ldst] = ref_mem[widx(addr_t'(a))];
          OP_STORE: ref_mem[widx(addr_t'(a))] = r[prog[k].i.lsrc2];
          default: ;
        endcase
        prog[k].result = prog[k].i.has_dst ? r[prog[k].i.ldst] : '0;
      end
    end
  end

  // ---------------- front end and free list ----------------
  int    fetch_idx = 0, retired = 0;
  int    next_free = AREGS;
  logic  preg_ready [256];
  int    inflight = 0;

  assign dec_valid = fetch_idx < N;
  assign dec       = prog[fetch_idx < N ? fetch_idx : 0].i;
  assign new_preg  = preg_t'(next_free);
  assign ooo_full  = inflight > 48;
  assign rel_ready = 1'b1;

  // ---------------- out-of-order engine model ----------------
  typedef struct {
    op_e   op;
    logic  hd;
    preg_t pdst, ps1;
    logic [11:0] imm;
    logic [6:0] rob;
    int    delay;
  } op_t;
  op_t q [$];

  // ---------------- counters ----------------
  int n_bypass = 0, n_delay = 0, n_nonbyp = 0, n_filt = 0, n_reexec = 0;
  int n_squash = 0, n_up = 0, n_down = 0, n_wrap = 0, n_evict = 0, n_stall = 0;
  int n_setd = 0, n_released = 0;
  int cycles = 0;

  // sample handshakes at the rising edge (values before the edge updates)
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dc_req && dc_we) mem[widx(dc_addr)] <= dc_wdata;
    if (dc_req && !dc_we) dc_rdata <= mem[widx(dc_addr)];
    if (evict_valid && evict_ready) n_evict++;
    if (ev_filtered) n_filt++;
    if (ev_reexec) n_reexec++;
    if (ev_ssn_clear) n_wrap++;
    if (ev_train_valid) begin
      if (ev_train.set_dist) n_setd++;
      if (ev_train.conf_up) n_up++;
      if (ev_train.conf_down) n_down++;
    end
    if (dec_valid && !dec_ready) n_stall++;
    if (retire_valid) begin
      check(retire_entry.pc == prog[retired].i.pc, $sformatf("retire pc %0d", retired));
      if (retire_entry.has_dst)
        check(dut.u_rf.regs_q[retire_entry.pdst] == prog[retired].result,
              $sformatf("value of instr %0d: %0h vs %0h", retired,
                        dut.u_rf.regs_q[retire_entry.pdst], prog[retired].result));
      retired++;
    end
    if (squash_valid) begin
      n_squash++;
      check(squash_pc == prog[retired].i.pc, "squash pc");
      fetch_idx <= retired;
      q.delete();
      inflight <= 0;
    end else begin
      if (dec_valid && dec_ready) begin
        if (ev_rename_load) begin
          case (ev_rename_kind)
            LD_BYPASS: n_bypass++;
            LD_DELAY:  n_delay++;
            default:   n_nonbyp++;
          endcase
        end
        fetch_idx <= fetch_idx + 1;
      end
      if (preg_used) begin
        preg_ready[new_preg] = 1'b0;
        next_free <= (next_free == PREGS - 1) ? AREGS : next_free + 1;
      end
      if (disp_valid) begin
        q.push_back('{disp_op, disp_has_dst, disp_pdst, disp_psrc1, disp_imm,
                      disp_rob_idx, $urandom_range(0, 3)});
      end
      inflight <= inflight + int'(disp_valid) + int'(rel_valid && rel_ready);
      if (rel_valid && rel_ready) begin
        n_released++;
        q.push_back('{OP_LOAD, 1'b1, rel_pdst, rel_pbase, rel_imm, rel_rob_idx, $urandom_range(0, 3)});
      end
    end
  end

  // drive the engine between edges
  always @(negedge clk) begin
    automatic int sel [$];
    wb_valid = '0;
    wb_has_dst = '0;
    evict_valid = ($urandom_range(0, 99) == 0);
    evict_addr = 32'h100 + 32'($urandom_range(0, 7) * 8);
    if (rst_n && !squash_valid) begin
      foreach (q[k]) begin
        if (q[k].delay > 0) q[k].delay--;
        else if (sel.size() < NWB && preg_ready[q[k].ps1])
          sel.push_back(k);
      end
      foreach (sel[j]) ooo_rd_addr[j] = q[sel[j]].ps1;
      #1;
      foreach (sel[j]) begin
        automatic op_t o = q[sel[j]];
        automatic data_t a = ooo_rd_data[j] + data_t'($signed(o.imm));
        wb_valid[j]    = 1'b1;
        wb_has_dst[j]  = o.hd;
        wb_preg[j]     = o.pdst;
        wb_rob_idx[j]  = o.rob;
        wb_ssn_nvul[j] = ssn_commit;
        wb_data[j]     = (o.op == OP_LOAD) ? mem[widx(addr_t'(a))] : a;
      end
      for (int j = sel.size() - 1; j >= 0; j--) begin
        if (q[sel[j]].hd) preg_ready[q[sel[j]].pdst] = 1'b1;
        q.delete(sel[j]);
        inflight--;
      end
    end
  end

  // ---------------- run ----------------
  initial begin
    for (int k = 0; k < 256; k++) preg_ready[k] = (k < AREGS);
    for (int k = 0; k < MEMW; k++) mem[k] = '0;
    for (int k = 0; k < NRD; k++) ooo_rd_addr[k] = '0;
    for (int k = 0; k < NWB; k++) begin
      wb_preg[k] = '0; wb_data[k] = '0; wb_rob_idx[k] = '0; wb_ssn_nvul[k] = '0;
    end
    wb_valid = '0;
    wb_has_dst = '0;
    dc_rdata = '0;
    evict_valid = 0;
    evict_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (retired == N);
    repeat (10) @(posedge clk);
    for (int k = 0; k < MEMW; k++)
      check(mem[k] == ref_mem[k], $sformatf("memory word %0d", k));
    $display("cycles=%0d retired=%0d IPC*100=%0d", cycles, retired, retired * 100 / cycles);
    $display("bypass=%0d delay=%0d nonbypass=%0d filtered=%0d reexec=%0d squash=%0d",
             n_bypass, n_delay, n_nonbyp, n_filt, n_reexec, n_squash);
    $display("released=%0d train=%0d conf_up=%0d conf_down=%0d ssn_wrap=%0d pseudo=%0d stall=%0d",
             n_released, n_setd, n_up, n_down, n_wrap, n_evict, n_stall);
    check(n_bypass > 0, "bypassing loads");
    check(n_delay > 0 && n_released > 0, "delayed loads held and released");
    check(n_nonbyp > 0, "nonbypassing loads");
    check(n_filt > 0, "filtered reexecutions");
    check(n_reexec > 0, "reexecutions");
    check(n_squash > 0, "squashes");
    check(n_setd > 0 && n_up > 0 && n_down > 0, "predictor training");
    check(n_wrap > 0, "SSN wrap-around");
    check(n_evict > 0, "SSBF pseudo-entries");
    check(n_stall > 0, "rename stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: retired %0d of %0d", retired, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
