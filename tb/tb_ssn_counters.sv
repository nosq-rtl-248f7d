// tb_ssn_counters: random store renames and commits (never committing more
// than were renamed), squashes back to the committed count, and a wrap point
// lowered to 50 so that wrap-around happens: rename must stall at the wrap
// point, the clear pulse must come only once everything committed and the
// pipeline is drained, and both counters must restart at 0.
module tb_ssn_counters;
  import nosq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rename_store, commit_store, squash_valid, drained, wrap_stall, clear;
  ssn_t squash_ssn, ssn_rename, ssn_commit;
  int   mr = 0, mc = 0, wraps = 0;

  ssn_counters #(.SSN_MAX(ssn_t'(50))) dut (.*);

  task automatic chk(bit ok, string w);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s r=%0d/%0d c=%0d/%0d", w, ssn_rename, mr, ssn_commit, mc); end
  endtask

  initial begin
    rename_store = 0; commit_store = 0; squash_valid = 0; squash_ssn = '0; drained = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      chk(ssn_rename == ssn_t'(mr) && ssn_commit == ssn_t'(mc), "counters");
      chk(wrap_stall == (mr == 50), "wrap stall");
      rename_store = $urandom_range(0, 1);
      commit_store = (mc < mr) && $urandom_range(0, 1);
      squash_valid = $urandom_range(0, 60) == 0;
      squash_ssn = ssn_t'(commit_store ? mc + 1 : mc);
      drained = (mc == mr) && $urandom_range(0, 1);
      #1;
      chk(clear == (mr == 50 && mc == 50 && drained), "clear");
      if (clear) begin mr = 0; mc = 0; wraps++; end
      else begin
        if (squash_valid) mr = int'(squash_ssn);
        else if (rename_store && mr != 50) mr++;
        if (commit_store) mc++;
      end
    end
    chk(wraps > 0, "wrap-around happened");
    $display("wraps=%0d", wraps);
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
