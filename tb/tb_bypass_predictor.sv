// tb_bypass_predictor: directed test of the hybrid predictor at its default
// size. It checks that a load misses before training; that training installs
// the distance in both tables; that the path-sensitive table wins for the
// path it was trained on while other paths fall back to the path-insensitive
// table; that a second misprediction on another path lowers the shared
// path-insensitive entry's confidence; and that confidence updates reach
// both tables.
module tb_bypass_predictor;
  import nosq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t  lk_pc;
  hist_t  lk_hist;
  pred_t  pred;
  logic   train_valid;
  train_t train;

  bypass_predictor dut (.*);

  task automatic expect_pred(addr_t pc, hist_t h, bit hit, bit fp, int d, int c, string what);
    lk_pc = pc; lk_hist = h;
    #1;
    checks++;
    if (pred.hit !== hit || (hit && (pred.from_path !== fp || pred.distance !== dist_t'(d) ||
        pred.conf !== conf_t'(c)))) begin
      failures++;
      $display("FAIL %s: hit=%b path=%b dist=%0d conf=%0d", what, pred.hit, pred.from_path,
               pred.distance, pred.conf);
    end
  endtask

  task automatic do_train(addr_t pc, hist_t h, bit sd, int d, bit up, bit dn);
    @(negedge clk);
    train = '0;
    train.pc = pc; train.hist = h; train.set_dist = sd; train.distance = dist_t'(d);
    train.conf_up = up; train.conf_down = dn;
    train_valid = 1;
    @(negedge clk);
    train_valid = 0;
  endtask

  localparam addr_t A = 32'h0000_4a10, B = 32'h0000_4b20;
  initial begin
    train_valid = 0; train = '0; lk_pc = '0; lk_hist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_pred(A, 16'h0001, 0, 0, 0, 0, "cold miss");
    do_train(A, 16'h0001, 1, 3, 0, 0);
    expect_pred(A, 16'h0001, 1, 1, 3, 2, "path-sensitive after training");
    expect_pred(A, 16'h0002, 1, 0, 3, 2, "other path uses path-insensitive");
    expect_pred(B, 16'h0001, 0, 0, 0, 0, "other PC misses");
    do_train(A, 16'h0002, 1, 5, 0, 0);
    expect_pred(A, 16'h0001, 1, 1, 3, 2, "first path keeps its distance");
    expect_pred(A, 16'h0002, 1, 1, 5, 2, "second path learned");
    expect_pred(A, 16'h0003, 1, 0, 5, 1, "insensitive retrained, confidence lowered");
    do_train(A, 16'h0001, 0, 0, 1, 0);
    expect_pred(A, 16'h0001, 1, 1, 3, 3, "confidence up (path)");
    expect_pred(A, 16'h0003, 1, 0, 5, 2, "confidence up (insensitive)");
    do_train(A, 16'h0002, 0, 0, 0, 1);
    do_train(A, 16'h0002, 0, 0, 0, 1);
    do_train(A, 16'h0002, 0, 0, 0, 1);
    expect_pred(A, 16'h0002, 1, 1, 5, 0, "confidence saturates at zero");
    do_train(B, 16'h0000, 0, 0, 1, 0);
    expect_pred(B, 16'h0000, 0, 0, 0, 0, "confidence update never allocates");
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
