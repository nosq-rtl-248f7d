// tb_ssbf: random store writes, pseudo-entries, lookups and clears on a small
// SSBF (16 entries, 2 ways) against a reference model with the same
// replacement and per-set eviction floor. A miss must return the largest SSN
// evicted from the set; a pseudo-entry is taken only without a store write.
module tb_ssbf;
  import nosq_pkg::*;
  localparam int E = 16, W = 2, S = E / W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, lk_hit, wr_valid, inv_valid, inv_ready;
  addr_t lk_addr, wr_addr, inv_addr;
  ssn_t lk_ssn, wr_ssn, inv_ssn;

  ssbf #(.ENTRIES(E), .WAYS(W)) dut (.*);

  logic mv [S][W];
  int   mt [S][W], ms [S][W], fl [S], rr [S];
  int   evictions = 0;

  function automatic int sidx(addr_t a); return int'(a[5:3]); endfunction
  function automatic int stag(addr_t a); return int'(a[31:6]); endfunction
  function automatic addr_t raddr(); return addr_t'($urandom_range(0, 63) * 8); endfunction

  initial begin
    for (int s = 0; s < S; s++) begin fl[s] = 0; rr[s] = 0; for (int w = 0; w < W; w++) mv[s][w] = 0; end
    clear = 0; wr_valid = 0; inv_valid = 0; lk_addr = '0; wr_addr = '0; inv_addr = '0;
    wr_ssn = '0; inv_ssn = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      automatic int s, t, hw, fw, v, ws;
      automatic bit h = 0;
      automatic int es = 0;
      automatic addr_t wa;
      @(negedge clk);
      lk_addr = raddr();
      #1;
      s = sidx(lk_addr); t = stag(lk_addr);
      es = fl[s];
      for (int w = 0; w < W; w++) if (mv[s][w] && mt[s][w] == t) begin h = 1; es = ms[s][w]; end
      checks++;
      if (lk_hit !== h || lk_ssn !== ssn_t'(es)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d addr %h hit %b/%b ssn %0d/%0d", k, lk_addr, lk_hit, h, lk_ssn, es);
      end
      clear = $urandom_range(0, 400) == 0;
      wr_valid = $urandom_range(0, 1); wr_addr = raddr(); wr_ssn = ssn_t'($urandom_range(1, 5000));
      inv_valid = $urandom_range(0, 3) == 0; inv_addr = raddr(); inv_ssn = ssn_t'($urandom_range(1, 5000));
      #1;
      checks++;
      if (inv_ready !== !wr_valid) failures++;
      if (clear) begin
        for (int q = 0; q < S; q++) begin fl[q] = 0; for (int w = 0; w < W; w++) mv[q][w] = 0; end
      end else if (wr_valid || inv_valid) begin
        wa = wr_valid ? wr_addr : inv_addr;
        ws = wr_valid ? int'(wr_ssn) : int'(inv_ssn);
        s = sidx(wa); t = stag(wa); hw = -1; fw = -1;
        for (int w = W - 1; w >= 0; w--) begin
          if (mv[s][w] && mt[s][w] == t) hw = w;
          if (!mv[s][w]) fw = w;
        end
        v = (hw >= 0) ? hw : (fw >= 0) ? fw : rr[s];
        if (hw < 0 && fw < 0) begin
          if (ms[s][v] > fl[s]) fl[s] = ms[s][v];
          rr[s] = (rr[s] + 1) % W;
          evictions++;
        end
        mv[s][v] = 1; mt[s][v] = t; ms[s][v] = ws;
      end
    end
    checks++;
    if (evictions == 0) failures++;
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
