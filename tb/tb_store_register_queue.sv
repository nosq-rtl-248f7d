// tb_store_register_queue: random writes by SSN and reads by SSN against a
// reference array indexed by the low seven SSN bits (128 entries), checking
// that reset clears the entries and that SSNs 128 apart share an entry.
module tb_store_register_queue;
  import nosq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  wr_valid;
  ssn_t  wr_ssn, rd_ssn;
  preg_t wr_preg, rd_preg;
  preg_t model [128];

  store_register_queue dut (.*);

  initial begin
    for (int i = 0; i < 128; i++) model[i] = '0;
    wr_valid = 0; wr_ssn = '0; wr_preg = '0; rd_ssn = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      rd_ssn = ssn_t'($urandom);
      #1;
      checks++;
      if (rd_preg !== model[rd_ssn[6:0]]) begin
        failures++;
        if (failures < 10) $display("FAIL ssn %0d: %0d vs %0d", rd_ssn, rd_preg, model[rd_ssn[6:0]]);
      end
      wr_valid = $urandom_range(0, 1);
      wr_ssn = ssn_t'($urandom);
      wr_preg = preg_t'($urandom);
      if (wr_valid) model[wr_ssn[6:0]] = wr_preg;
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
