// tb_path_history: drives random branches, calls and plain instructions into
// path_history and compares the register with a reference shift model
// (branch: shift in the direction; call: shift in PC bits 3:2), including a
// restore that overrides a simultaneous update.
module tb_path_history;
  import nosq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic upd_valid, upd_cond_br, upd_taken, upd_call, restore_valid;
  addr_t upd_pc;
  hist_t restore_hist, hist, model;

  path_history dut (.*);

  initial begin
    upd_valid = 0; upd_cond_br = 0; upd_taken = 0; upd_call = 0; upd_pc = '0;
    restore_valid = 0; restore_hist = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      checks++;
      if (hist !== model) begin
        failures++;
        $display("FAIL step %0d: %h vs %h", k, hist, model);
      end
      upd_valid = $urandom_range(0, 3) != 0;
      upd_cond_br = $urandom_range(0, 1);
      upd_call = !upd_cond_br && $urandom_range(0, 1);
      upd_taken = $urandom_range(0, 1);
      upd_pc = $urandom;
      restore_valid = $urandom_range(0, 30) == 0;
      restore_hist = hist_t'($urandom);
      if (restore_valid) model = restore_hist;
      else if (upd_valid && upd_cond_br) model = {model[HIST_BITS-2:0], upd_taken};
      else if (upd_valid && upd_call) model = {model[HIST_BITS-3:0], upd_pc[3:2]};
    end
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
