// regfile: the physical register file. NRD combinational read ports and NWR
// write ports, written at the clock edge; a read in the same cycle as a write
// to the same register returns the old value. In this design the commit
// pipeline owns two of the read ports (base address and store data / load
// value), the ports the out-of-order engine used to spend on stores; the
// rest serve the out-of-order engine. Port counts, the 64-bit width and
// zero-initialisation at reset are this design's choices. When two write
// ports name the same register, the higher-numbered port wins.
module regfile
  import nosq_pkg::*;
#(
  parameter int unsigned NREGS = PREGS,
  parameter int unsigned NRD   = 10,
  parameter int unsigned NWR   = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  preg_t          rd_addr [NRD],
  output data_t          rd_data [NRD],
  input  logic [NWR-1:0] wr_en,
  input  preg_t          wr_addr [NWR],
  input  data_t          wr_data [NWR]
);

  data_t regs_q [NREGS];

  always_comb begin
    for (int i = 0; i < NRD; i++) rd_data[i] = regs_q[rd_addr[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs_q[r] <= '0;
    end else begin
      for (int i = 0; i < NWR; i++)
        if (wr_en[i]) regs_q[wr_addr[i]] <= wr_data[i];
    end
  end

endmodule
