// ssbf: the store sequence Bloom filter of the store vulnerability window
// (SVW) scheme, in the tagged, set-associative form this design requires.
// It remembers, per 8-byte word address, the SSN of the youngest committed
// store to that word.
//
//   wr_*   a committing store writes SSBF[addr] = its SSN.
//   inv_*  a pseudo-entry for a block the data cache is forced to evict
//          (so that stores by other processors are seen); it is taken only in
//          a cycle without a store write (inv_ready).
//   lk_*   combinational lookup. lk_hit says whether the word itself is
//          tracked; lk_ssn is its SSN on a hit. On a miss lk_ssn is the
//          largest SSN ever evicted from that set, so an inequality test
//          against lk_ssn stays safe; the equality test used for bypassing
//          loads must also require lk_hit.
//   clear  empties the table (SSN wrap-around).
//
// The description calls the table small, tagged and set-associative but does
// not size it; 256 entries in 4 ways, word granularity, the per-set eviction
// floor and round-robin replacement are this design's choices. Pseudo-entries
// are made for the word address given on inv_addr.
module ssbf
  import nosq_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned SSN_W   = SSN_BITS,
  localparam int unsigned SETS     = ENTRIES / WAYS,
  localparam int unsigned IDX_BITS = $clog2(SETS),
  localparam int unsigned TAG_BITS = ADDR_BITS - 3 - IDX_BITS,
  localparam int unsigned WAY_BITS = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  addr_t            lk_addr,
  output logic             lk_hit,
  output logic [SSN_W-1:0] lk_ssn,
  input  logic             wr_valid,
  input  addr_t            wr_addr,
  input  logic [SSN_W-1:0] wr_ssn,
  input  logic             inv_valid,
  input  addr_t            inv_addr,
  input  logic [SSN_W-1:0] inv_ssn,
  output logic             inv_ready
);

  logic [TAG_BITS-1:0] tag_q   [SETS][WAYS];
  logic [SSN_W-1:0]    ssn_q   [SETS][WAYS];
  logic [WAYS-1:0]     valid_q [SETS];
  logic [SSN_W-1:0]    floor_q [SETS];
  logic [WAY_BITS-1:0] rr_q    [SETS];

  function automatic logic [IDX_BITS-1:0] idx_of(addr_t a);
    return a[IDX_BITS+2:3];
  endfunction
  function automatic logic [TAG_BITS-1:0] tag_of(addr_t a);
    return a[ADDR_BITS-1:IDX_BITS+3];
  endfunction

  always_comb begin
    lk_hit = 1'b0;
    lk_ssn = floor_q[idx_of(lk_addr)];
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[idx_of(lk_addr)][w] && tag_q[idx_of(lk_addr)][w] == tag_of(lk_addr)) begin
        lk_hit = 1'b1;
        lk_ssn = ssn_q[idx_of(lk_addr)][w];
      end
    end
  end

  // write port: a store, or else a pseudo-entry
  assign inv_ready = !wr_valid;
  logic             w_en;
  addr_t            w_addr;
  logic [SSN_W-1:0] w_ssn;
  assign w_en   = wr_valid || inv_valid;
  assign w_addr = wr_valid ? wr_addr : inv_addr;
  assign w_ssn  = wr_valid ? wr_ssn  : inv_ssn;

  logic [IDX_BITS-1:0] w_idx;
  logic                w_hit, w_free;
  logic [WAY_BITS-1:0] w_way, w_free_way, w_victim;
  assign w_idx = idx_of(w_addr);
  always_comb begin
    w_hit = 1'b0;
    w_way = '0;
    w_free = 1'b0;
    w_free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[w_idx][w] && tag_q[w_idx][w] == tag_of(w_addr)) begin
        w_hit = 1'b1;
        w_way = WAY_BITS'(w);
      end
      if (!valid_q[w_idx][w]) begin
        w_free = 1'b1;
        w_free_way = WAY_BITS'(w);
      end
    end
    w_victim = w_hit ? w_way : (w_free ? w_free_way : rr_q[w_idx]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        floor_q[s] <= '0;
        rr_q[s]    <= '0;
      end
    end else if (clear) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        floor_q[s] <= '0;
      end
    end else if (w_en) begin
      valid_q[w_idx][w_victim] <= 1'b1;
      tag_q[w_idx][w_victim]   <= tag_of(w_addr);
      ssn_q[w_idx][w_victim]   <= w_ssn;
      if (!w_hit && !w_free) begin
        if (ssn_q[w_idx][w_victim] > floor_q[w_idx])
          floor_q[w_idx] <= ssn_q[w_idx][w_victim];
        rr_q[w_idx] <= (rr_q[w_idx] == WAY_BITS'(WAYS - 1)) ? '0 : rr_q[w_idx] + 1'b1;
      end
    end
  end

endmodule
