// tb_smb_rename: directed test of the SMB rename stage. The testbench plays
// the SSN counters and the commit side. It checks that a store takes the next
// SSN and is not dispatched; that a load missing in the predictor is
// dispatched as nonbypassing; that after training the same load bypasses,
// is not dispatched and takes the store's data register, which a consumer
// then reads; that low confidence turns it into a delayed load waiting for
// the store's SSN; that a committed store is not bypassed; that an SSN wrap
// stall holds rename; and that recovery restores the committed mapping.
module tb_smb_rename;
  import nosq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic dec_valid, dec_ready, preg_used, stall, wrap_stall, rename_store, fire, rob_done;
  dec_inst_t dec;
  preg_t new_preg;
  ssn_t ssn_rename, ssn_commit;
  rob_entry_t rob_entry;
  logic disp_valid, disp_wait, disp_has_dst;
  op_e disp_op;
  preg_t disp_pdst, disp_psrc1, disp_psrc2;
  logic [11:0] disp_imm;
  ssn_t disp_wait_ssn;
  logic train_valid, cm_valid, recover;
  train_t train;
  areg_t cm_areg;
  preg_t cm_preg;
  hist_t recover_hist;

  smb_rename dut (.*);

  task automatic chk(bit ok, string w);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  function automatic dec_inst_t mk(op_e op, int dst, int s1, int s2, addr_t pc);
    dec_inst_t d = '0;
    d.pc = pc; d.op = op; d.has_dst = op != OP_STORE;
    d.ldst = areg_t'(dst); d.lsrc1 = areg_t'(s1); d.lsrc2 = areg_t'(s2); d.imm = 12'h100;
    return d;
  endfunction

  // present one instruction for one cycle; outputs are checked before the edge
  task automatic present(dec_inst_t d, preg_t np);
    @(negedge clk);
    dec = d; new_preg = np; dec_valid = 1;
    #1;
  endtask

  task automatic finish_cycle();
    @(posedge clk);
    #1;
    dec_valid = 0;
    if (rename_store) ssn_rename = ssn_rename + 1'b1;
  endtask

  task automatic do_train(bit sd, int d, bit up, bit dn);
    @(negedge clk);
    train = '0; train.pc = 32'h500; train.hist = '0;
    train.set_dist = sd; train.distance = dist_t'(d); train.conf_up = up; train.conf_down = dn;
    train_valid = 1;
    @(negedge clk);
    train_valid = 0;
  endtask

  localparam addr_t LDPC = 32'h500;
  initial begin
    dec_valid = 0; dec = '0; new_preg = '0; stall = 0; wrap_stall = 0;
    ssn_rename = '0; ssn_commit = '0; train_valid = 0; train = '0;
    cm_valid = 0; cm_areg = '0; cm_preg = '0; recover = 0; recover_hist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // r1 <- ALU into p40
    present(mk(OP_ALU, 1, 0, 0, 32'h4f0), 40);
    chk(fire && disp_valid && disp_pdst == 40 && preg_used && !rob_done, "ALU dispatched");
    finish_cycle();
    // store r1
    present(mk(OP_STORE, 0, 0, 1, 32'h4f4), 41);
    chk(fire && !disp_valid && rename_store && rob_done && rob_entry.ssn == 1 &&
        rob_entry.pdata == 40 && !preg_used, "store: SSN 1, data p40, not dispatched");
    finish_cycle();
    // load, predictor cold: nonbypassing
    present(mk(OP_LOAD, 2, 0, 0, LDPC), 42);
    chk(disp_valid && !disp_wait && rob_entry.kind == LD_NONBYPASS && rob_entry.pdst == 42, "cold load nonbypassing");
    finish_cycle();
    // train distance 0 (the youngest store), confidence starts at threshold
    do_train(1, 0, 0, 0);
    present(mk(OP_LOAD, 2, 0, 0, LDPC), 43);
    chk(!disp_valid && rob_done && rob_entry.kind == LD_BYPASS && rob_entry.pdst == 40 &&
        rob_entry.ssn_bypass == 1 && !preg_used, "trained load bypasses to p40");
    finish_cycle();
    present(mk(OP_ALU, 3, 2, 0, 32'h504), 43);
    chk(disp_valid && disp_psrc1 == 40, "consumer reads the store's data register");
    finish_cycle();
    // lower confidence below threshold: delayed
    do_train(0, 0, 0, 1);
    present(mk(OP_LOAD, 4, 0, 0, LDPC), 44);
    chk(disp_valid && disp_wait && disp_wait_ssn == 1 && rob_entry.kind == LD_DELAY &&
        rob_entry.pdst == 44, "low confidence load delayed");
    finish_cycle();
    // store committed: nonbypassing even with a prediction
    ssn_commit = 1;
    present(mk(OP_LOAD, 4, 0, 0, LDPC), 45);
    chk(disp_valid && !disp_wait && rob_entry.kind == LD_NONBYPASS, "committed store not bypassed");
    finish_cycle();
    // wrap stall
    wrap_stall = 1;
    present(mk(OP_ALU, 5, 0, 0, 32'h508), 46);
    chk(!dec_ready && !fire && !disp_valid, "wrap stall holds rename");
    @(negedge clk);
    wrap_stall = 0;
    dec_valid = 0;
    // recovery: committed table says r2 -> p9
    @(negedge clk);
    cm_valid = 1; cm_areg = 2; cm_preg = 9; recover = 1;
    @(negedge clk);
    cm_valid = 0; recover = 0;
    present(mk(OP_ALU, 6, 2, 1, 32'h50c), 47);
    chk(disp_psrc1 == 9 && disp_psrc2 == 1, "recovered mapping");
    finish_cycle();
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
