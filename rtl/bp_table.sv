// bp_table: one set-associative table of the bypassing predictor. Each entry
// holds a valid bit, a tag, a predicted store distance and a short confidence
// counter, as the description of the predictor and of delay specifies. The
// caller forms the set index and tag (from the PC alone, or from the PC and
// path history).
//
// Lookup is combinational (rename reads the table in the cycle it presents
// lk_idx/lk_tag). Update is applied at the clock edge:
//   upd_set_dist  a misprediction: a hitting entry takes the new distance and
//                 its confidence drops by one; a miss allocates an entry with
//                 confidence CONF_INIT.
//   upd_conf_up   / upd_conf_down: a hitting entry's counter saturates up or
//                 down; a miss is ignored.
// Replacement (an invalid way first, else a per-set round-robin pointer),
// CONF_INIT and the saturating arithmetic are this design's choices; the
// description does not give them. Reset invalidates every entry.
module bp_table
  import nosq_pkg::*;
#(
  parameter int unsigned ENTRIES  = 1024,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned TAG_BITS = 22,
  parameter int unsigned CONF_INIT = 2,
  localparam int unsigned SETS     = ENTRIES / WAYS,
  localparam int unsigned IDX_BITS = $clog2(SETS),
  localparam int unsigned WAY_BITS = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // lookup
  input  logic [IDX_BITS-1:0] lk_idx,
  input  logic [TAG_BITS-1:0] lk_tag,
  output logic                lk_hit,
  output dist_t               lk_dist,
  output conf_t               lk_conf,
  // update
  input  logic                upd_valid,
  input  logic [IDX_BITS-1:0] upd_idx,
  input  logic [TAG_BITS-1:0] upd_tag,
  input  logic                upd_set_dist,
  input  dist_t               upd_dist,
  input  logic                upd_conf_up,
  input  logic                upd_conf_down
);

  logic [TAG_BITS-1:0] tag_q  [SETS][WAYS];
  dist_t               dist_q [SETS][WAYS];
  conf_t               conf_q [SETS][WAYS];
  logic [WAYS-1:0]     valid_q [SETS];
  logic [WAY_BITS-1:0] rr_q    [SETS];

  // lookup
  always_comb begin
    lk_hit  = 1'b0;
    lk_dist = '0;
    lk_conf = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[lk_idx][w] && tag_q[lk_idx][w] == lk_tag) begin
        lk_hit  = 1'b1;
        lk_dist = dist_q[lk_idx][w];
        lk_conf = conf_q[lk_idx][w];
      end
    end
  end

  // update: find the hitting way, or a victim
  logic                u_hit;
  logic [WAY_BITS-1:0] u_way;
  logic                u_free;
  logic [WAY_BITS-1:0] u_free_way;
  always_comb begin
    u_hit = 1'b0;
    u_way = '0;
    u_free = 1'b0;
    u_free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[upd_idx][w] && tag_q[upd_idx][w] == upd_tag) begin
        u_hit = 1'b1;
        u_way = WAY_BITS'(w);
      end
      if (!valid_q[upd_idx][w]) begin
        u_free = 1'b1;
        u_free_way = WAY_BITS'(w);
      end
    end
  end

  localparam conf_t CMAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
    end else if (upd_valid) begin
      if (u_hit) begin
        if (upd_set_dist) begin
          dist_q[upd_idx][u_way] <= upd_dist;
          if (conf_q[upd_idx][u_way] != '0)
            conf_q[upd_idx][u_way] <= conf_q[upd_idx][u_way] - 1'b1;
        end else if (upd_conf_up) begin
          if (conf_q[upd_idx][u_way] != CMAX)
            conf_q[upd_idx][u_way] <= conf_q[upd_idx][u_way] + 1'b1;
        end else if (upd_conf_down) begin
          if (conf_q[upd_idx][u_way] != '0)
            conf_q[upd_idx][u_way] <= conf_q[upd_idx][u_way] - 1'b1;
        end
      end else if (upd_set_dist) begin
        if (u_free) begin
          valid_q[upd_idx][u_free_way] <= 1'b1;
          tag_q[upd_idx][u_free_way]   <= upd_tag;
          dist_q[upd_idx][u_free_way]  <= upd_dist;
          conf_q[upd_idx][u_free_way]  <= conf_t'(CONF_INIT);
        end else begin
          tag_q[upd_idx][rr_q[upd_idx]]  <= upd_tag;
          dist_q[upd_idx][rr_q[upd_idx]] <= upd_dist;
          conf_q[upd_idx][rr_q[upd_idx]] <= conf_t'(CONF_INIT);
          rr_q[upd_idx] <= (rr_q[upd_idx] == WAY_BITS'(WAYS - 1)) ? '0 : rr_q[upd_idx] + 1'b1;
        end
      end
    end
  end

endmodule
