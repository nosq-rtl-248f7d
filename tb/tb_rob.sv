// tb_rob: an 8-entry reorder buffer with two completion ports. Entries are
// allocated with increasing PCs, some already done, the rest completed in
// random order with an SSN; the head may only be taken in order and only
// once done, and must carry the SSN its completion reported. Also checked:
// full and empty, and a flush that empties the buffer.
module tb_rob;
  import nosq_pkg::*;
  localparam int E = 8, NW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc_valid, alloc_done, full, empty, head_valid, pop, flush;
  rob_entry_t alloc_entry, head_entry;
  logic [2:0] alloc_idx;
  logic [NW-1:0] wb_valid;
  logic [2:0] wb_idx [NW];
  ssn_t wb_ssn_nvul [NW];

  rob #(.ENTRIES(E), .NWB(NW)) dut (.*);

  // reference: queue of (pc, done, nvul, slot)
  int  qpc [$], qslot [$];
  bit  qdone [$];
  int  qnv [$];
  int  next_pc = 0, popped = 0, flushes = 0;

  task automatic chk(bit ok, string w);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL t=%0t %s", $time, w); end
  endtask

  initial begin
    alloc_valid = 0; alloc_done = 0; alloc_entry = '0; pop = 0; flush = 0; wb_valid = '0;
    for (int i = 0; i < NW; i++) begin wb_idx[i] = '0; wb_ssn_nvul[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      chk(empty == (qpc.size() == 0) && full == (qpc.size() == E), "full/empty");
      chk(head_valid == (qpc.size() > 0 && qdone[0]), "head valid");
      if (head_valid) chk(head_entry.pc == addr_t'(qpc[0]) && head_entry.ssn_nvul == ssn_t'(qnv[0]), "head entry");
      flush = $urandom_range(0, 200) == 0;
      pop = $urandom_range(0, 1);
      alloc_valid = !full && $urandom_range(0, 1);
      alloc_done = $urandom_range(0, 3) == 0;
      alloc_entry = '0;
      alloc_entry.pc = addr_t'(next_pc);
      alloc_entry.ssn_nvul = ssn_t'(7);
      wb_valid = '0;
      for (int i = 0; i < NW; i++) begin
        if (qpc.size() > 0 && $urandom_range(0, 1)) begin
          automatic int j = $urandom_range(0, qpc.size() - 1);
          automatic bit dup = 0;
          for (int m = 0; m < i; m++) if (wb_valid[m] && wb_idx[m] == 3'(qslot[j])) dup = 1;
          if (!qdone[j] && !dup) begin
            wb_valid[i] = 1; wb_idx[i] = 3'(qslot[j]); wb_ssn_nvul[i] = ssn_t'($urandom_range(0, 999));
          end
        end
      end
      // update the reference as the edge will
      if (flush) begin
        qpc.delete(); qslot.delete(); qdone.delete(); qnv.delete(); flushes++;
      end else begin
        for (int i = 0; i < NW; i++) if (wb_valid[i])
          foreach (qslot[j]) if (qslot[j] == int'(wb_idx[i])) begin qdone[j] = 1; qnv[j] = int'(wb_ssn_nvul[i]); end
        if (pop && head_valid) begin
          void'(qpc.pop_front()); void'(qslot.pop_front()); void'(qdone.pop_front()); void'(qnv.pop_front());
          popped++;
        end
        if (alloc_valid) begin
          qpc.push_back(next_pc); qslot.push_back(int'(alloc_idx)); qdone.push_back(alloc_done); qnv.push_back(7);
          next_pc++;
        end
      end
    end
    chk(popped > 100 && flushes > 0, "activity");
    $display("popped=%0d flushes=%0d", popped, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
