// tb_regfile: random writes on four ports and reads on ten ports of the
// 160-entry register file against a reference array; a read sees the value
// from before a same-cycle write, and the highest port wins a write
// collision.
module tb_regfile;
  import nosq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  preg_t rd_addr [10];
  data_t rd_data [10];
  logic [3:0] wr_en;
  preg_t wr_addr [4];
  data_t wr_data [4];
  data_t model [PREGS];

  regfile dut (.*);

  initial begin
    for (int r = 0; r < PREGS; r++) model[r] = '0;
    wr_en = '0;
    for (int i = 0; i < 4; i++) begin wr_addr[i] = '0; wr_data[i] = '0; end
    for (int i = 0; i < 10; i++) rd_addr[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int i = 0; i < 10; i++) rd_addr[i] = preg_t'($urandom_range(0, PREGS - 1));
      wr_en = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        wr_addr[i] = preg_t'($urandom_range(0, 15));
        wr_data[i] = {$urandom, $urandom};
      end
      #1;
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (rd_data[i] !== model[rd_addr[i]]) begin
          failures++;
          if (failures < 10) $display("FAIL reg %0d", rd_addr[i]);
        end
      end
      for (int i = 0; i < 4; i++) if (wr_en[i]) model[wr_addr[i]] = wr_data[i];
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
