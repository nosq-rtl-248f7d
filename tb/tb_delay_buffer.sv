// tb_delay_buffer: random delayed loads enter a 4-entry buffer, each waiting
// for a store SSN near the current ssn_commit, while ssn_commit advances.
// A reference list checks that the buffer releases exactly the oldest entry
// whose store has committed, never one whose store has not, reports full
// when no slot is free, and empties on a flush.
module tb_delay_buffer;
  import nosq_pkg::*;
  localparam int E = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush, enq_valid, full, rel_valid, rel_ready;
  ssn_t ssn_commit, enq_wait_ssn;
  preg_t enq_pdst, enq_pbase, rel_pdst, rel_pbase;
  logic [11:0] enq_imm, rel_imm;
  logic [6:0] enq_rob_idx, rel_rob_idx;

  delay_buffer #(.ENTRIES(E)) dut (.*);

  typedef struct { int pdst; int ws; } m_t;
  m_t m [$];
  int released = 0, tag = 0;

  task automatic chk(bit ok, string w);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL t=%0t %s", $time, w); end
  endtask

  initial begin
    flush = 0; enq_valid = 0; rel_ready = 0; ssn_commit = 10; enq_wait_ssn = '0;
    enq_pdst = '0; enq_pbase = '0; enq_imm = '0; enq_rob_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      automatic int exp_i = -1;
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) ssn_commit = ssn_commit + 1'b1;
      #1;
      foreach (m[i]) if (exp_i < 0 && int'(ssn_commit) >= m[i].ws) exp_i = i;
      chk(full == (m.size() == E), "full");
      chk(rel_valid == (exp_i >= 0), "release valid");
      if (exp_i >= 0) chk(rel_pdst == preg_t'(m[exp_i].pdst) && rel_rob_idx == 7'(m[exp_i].pdst) &&
                          rel_imm == 12'(m[exp_i].pdst), "oldest ready released");
      flush = $urandom_range(0, 150) == 0;
      rel_ready = $urandom_range(0, 1);
      enq_valid = !full && $urandom_range(0, 1);
      tag = (tag + 1) % 128;
      enq_pdst = preg_t'(tag); enq_rob_idx = 7'(tag); enq_imm = 12'(tag); enq_pbase = preg_t'(tag);
      enq_wait_ssn = ssn_commit + ssn_t'($urandom_range(0, 6)) - 2;
      if (flush) m.delete();
      else begin
        if (rel_valid && rel_ready) begin m.delete(exp_i); released++; end
        if (enq_valid) m.push_back('{tag, int'(enq_wait_ssn)});
      end
    end
    chk(released > 200, "activity");
    $display("released=%0d", released);
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
