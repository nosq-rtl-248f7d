// tb_rename_map: random rename writes, committed writes and recoveries
// against two reference tables; a recovery must load the committed table,
// including a committed write in the same cycle.
module tb_rename_map;
  import nosq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  areg_t rd_a, rd_b, wr_areg, cm_areg;
  preg_t rd_a_p, rd_b_p, wr_preg, cm_preg;
  logic  wr_valid, cm_valid, recover;
  preg_t ms [AREGS], ma [AREGS];

  rename_map dut (.*);

  initial begin
    for (int i = 0; i < AREGS; i++) begin ms[i] = preg_t'(i); ma[i] = preg_t'(i); end
    wr_valid = 0; cm_valid = 0; recover = 0; rd_a = '0; rd_b = '0;
    wr_areg = '0; wr_preg = '0; cm_areg = '0; cm_preg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      rd_a = areg_t'($urandom); rd_b = areg_t'($urandom);
      #1;
      checks++;
      if (rd_a_p !== ms[rd_a] || rd_b_p !== ms[rd_b]) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d", k);
      end
      wr_valid = $urandom_range(0, 1); wr_areg = areg_t'($urandom); wr_preg = preg_t'($urandom_range(0, PREGS - 1));
      cm_valid = $urandom_range(0, 1); cm_areg = areg_t'($urandom); cm_preg = preg_t'($urandom_range(0, PREGS - 1));
      recover = $urandom_range(0, 15) == 0;
      if (cm_valid) ma[cm_areg] = cm_preg;
      if (recover) ms = ma;
      else if (wr_valid) ms[wr_areg] = wr_preg;
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
