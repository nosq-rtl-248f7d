// tb_bp_table: random lookups and training requests against bp_table with a
// small configuration (16 entries, 2 ways), compared each cycle with a
// reference model of the same rules: hit returns distance and confidence; a
// misprediction installs the distance and lowers confidence by one on a hit,
// or allocates (invalid way first, else round robin) with the initial
// confidence; confidence saturates at 0 and 3.
module tb_bp_table;
  import nosq_pkg::*;
  localparam int E = 16, W = 2, S = E / W, TB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [$clog2(S)-1:0] lk_idx, upd_idx;
  logic [TB-1:0] lk_tag, upd_tag;
  logic lk_hit, upd_valid, upd_set_dist, upd_conf_up, upd_conf_down;
  dist_t lk_dist, upd_dist;
  conf_t lk_conf;

  bp_table #(.ENTRIES(E), .WAYS(W), .TAG_BITS(TB), .CONF_INIT(2)) dut (.*);

  logic          mv [S][W];
  logic [TB-1:0] mt [S][W];
  int            md [S][W], mc [S][W], rr [S];

  task automatic model_lookup(input int s, input int t, output bit h, output int d, output int c);
    h = 0; d = 0; c = 0;
    for (int w = 0; w < W; w++) if (mv[s][w] && mt[s][w] == TB'(t)) begin h = 1; d = md[s][w]; c = mc[s][w]; end
  endtask

  initial begin
    for (int s = 0; s < S; s++) begin rr[s] = 0; for (int w = 0; w < W; w++) mv[s][w] = 0; end
    upd_valid = 0; upd_set_dist = 0; upd_conf_up = 0; upd_conf_down = 0;
    lk_idx = '0; lk_tag = '0; upd_idx = '0; upd_tag = '0; upd_dist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      automatic bit h; automatic int d, c, hw, fw;
      @(negedge clk);
      lk_idx = $urandom_range(0, S - 1);
      lk_tag = $urandom_range(0, 5);
      #1;
      model_lookup(lk_idx, lk_tag, h, d, c);
      checks++;
      if (lk_hit != h || (h && (lk_dist != dist_t'(d) || lk_conf != conf_t'(c)))) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d hit %b/%b dist %0d/%0d conf %0d/%0d", k, lk_hit, h, lk_dist, d, lk_conf, c);
      end
      // training request, applied to the model now and to the table at the edge
      upd_valid = $urandom_range(0, 1);
      upd_idx = $urandom_range(0, S - 1);
      upd_tag = $urandom_range(0, 5);
      upd_set_dist = $urandom_range(0, 2) == 0;
      upd_conf_up = $urandom_range(0, 1);
      upd_conf_down = !upd_conf_up;
      upd_dist = dist_t'($urandom);
      if (upd_valid) begin
        hw = -1; fw = -1;
        for (int w = W - 1; w >= 0; w--) begin
          if (mv[upd_idx][w] && mt[upd_idx][w] == upd_tag) hw = w;
          if (!mv[upd_idx][w]) fw = w;
        end
        if (hw >= 0) begin
          if (upd_set_dist) begin md[upd_idx][hw] = upd_dist; if (mc[upd_idx][hw] > 0) mc[upd_idx][hw]--; end
          else if (upd_conf_up) begin if (mc[upd_idx][hw] < 3) mc[upd_idx][hw]++; end
          else if (mc[upd_idx][hw] > 0) mc[upd_idx][hw]--;
        end else if (upd_set_dist) begin
          automatic int v = (fw >= 0) ? fw : rr[upd_idx];
          if (fw < 0) rr[upd_idx] = (rr[upd_idx] + 1) % W;
          mv[upd_idx][v] = 1; mt[upd_idx][v] = upd_tag; md[upd_idx][v] = upd_dist; mc[upd_idx][v] = 2;
        end
      end
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
