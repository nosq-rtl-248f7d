// bypass_predictor: the distance-based bypassing predictor. For each load it
// predicts how many dynamic stores back the store lies whose value the load
// will read. It is a hybrid of two set-associative tables of equal size:
//   - a path-insensitive table indexed and tagged by the load PC;
//   - a path-sensitive table indexed and tagged by the load PC combined with
//     the path history.
// Both are read at rename and the path-sensitive prediction wins when it
// hits; both are trained at commit with the same request. This structure
// follows the description of the design; the hash (index = PC[9:2] XOR the
// two halves of the history folded together, tag = PC[31:10] XOR the history)
// is this design's own choice.
//
// ENTRIES counts both tables together (default 2,048 as described). With
// 32-bit PCs an entry has 1 valid + 22 tag + 8 distance + 2 confidence bits.
// Lookup is combinational; training takes effect at the next clock edge.
module bypass_predictor
  import nosq_pkg::*;
#(
  parameter int unsigned ENTRIES   = 2048,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned CONF_INIT = 2,
  localparam int unsigned SETS     = ENTRIES / 2 / WAYS,
  localparam int unsigned IDX_BITS = $clog2(SETS),
  localparam int unsigned TAG_BITS = ADDR_BITS - 2 - IDX_BITS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  addr_t  lk_pc,
  input  hist_t  lk_hist,
  output pred_t  pred,
  input  logic   train_valid,
  input  train_t train
);

  function automatic logic [IDX_BITS-1:0] fold_hist(hist_t h);
    logic [IDX_BITS-1:0] f;
    f = '0;
    for (int i = 0; i < HIST_BITS; i++) f[i % IDX_BITS] ^= h[i];
    return f;
  endfunction

  function automatic logic [IDX_BITS-1:0] pc_idx(addr_t pc);
    return pc[IDX_BITS+1:2];
  endfunction

  function automatic logic [TAG_BITS-1:0] pc_tag(addr_t pc);
    return pc[ADDR_BITS-1:IDX_BITS+2];
  endfunction

  function automatic logic [TAG_BITS-1:0] path_tag(addr_t pc, hist_t h);
    return pc_tag(pc) ^ TAG_BITS'(h);
  endfunction

  logic  pi_hit, ps_hit;
  dist_t pi_dist, ps_dist;
  conf_t pi_conf, ps_conf;

  bp_table #(.ENTRIES(ENTRIES / 2), .WAYS(WAYS), .TAG_BITS(TAG_BITS), .CONF_INIT(CONF_INIT)) u_pi (
    .clk, .rst_n,
    .lk_idx(pc_idx(lk_pc)), .lk_tag(pc_tag(lk_pc)),
    .lk_hit(pi_hit), .lk_dist(pi_dist), .lk_conf(pi_conf),
    .upd_valid(train_valid), .upd_idx(pc_idx(train.pc)), .upd_tag(pc_tag(train.pc)),
    .upd_set_dist(train.set_dist), .upd_dist(train.distance),
    .upd_conf_up(train.conf_up), .upd_conf_down(train.conf_down)
  );

  bp_table #(.ENTRIES(ENTRIES / 2), .WAYS(WAYS), .TAG_BITS(TAG_BITS), .CONF_INIT(CONF_INIT)) u_ps (
    .clk, .rst_n,
    .lk_idx(pc_idx(lk_pc) ^ fold_hist(lk_hist)), .lk_tag(path_tag(lk_pc, lk_hist)),
    .lk_hit(ps_hit), .lk_dist(ps_dist), .lk_conf(ps_conf),
    .upd_valid(train_valid), .upd_idx(pc_idx(train.pc) ^ fold_hist(train.hist)),
    .upd_tag(path_tag(train.pc, train.hist)),
    .upd_set_dist(train.set_dist), .upd_dist(train.distance),
    .upd_conf_up(train.conf_up), .upd_conf_down(train.conf_down)
  );

  always_comb begin
    pred.hit       = pi_hit | ps_hit;
    pred.from_path = ps_hit;
    pred.distance      = ps_hit ? ps_dist : pi_dist;
    pred.conf      = ps_hit ? ps_conf : pi_conf;
  end

endmodule
