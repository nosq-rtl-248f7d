// rename_map: the register map table. The speculative table maps each
// logical register to a physical register at rename; the committed table is
// updated as instructions pass the commit point. On a squash the speculative
// table is reloaded from the committed one (a committed write in the same
// cycle is included). With speculative memory bypassing a load's logical
// destination may be mapped to a register that another instruction (the
// store's data producer) already owns; the map table itself does not care.
//
// The map table is named by the design; keeping a committed copy for
// recovery is this design's choice. Two combinational read ports, one write
// port each for rename and commit. Reset maps logical register i to physical
// register i in both tables.
module rename_map
  import nosq_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  areg_t rd_a,
  output preg_t rd_a_p,
  input  areg_t rd_b,
  output preg_t rd_b_p,
  input  logic  wr_valid,
  input  areg_t wr_areg,
  input  preg_t wr_preg,
  input  logic  cm_valid,
  input  areg_t cm_areg,
  input  preg_t cm_preg,
  input  logic  recover
);

  preg_t spec_q [AREGS];
  preg_t arch_q [AREGS];

  assign rd_a_p = spec_q[rd_a];
  assign rd_b_p = spec_q[rd_b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < AREGS; i++) begin
        spec_q[i] <= preg_t'(i);
        arch_q[i] <= preg_t'(i);
      end
    end else begin
      if (cm_valid) arch_q[cm_areg] <= cm_preg;
      if (recover) begin
        for (int i = 0; i < AREGS; i++)
          spec_q[i] <= (cm_valid && cm_areg == areg_t'(i)) ? cm_preg : arch_q[i];
      end else if (wr_valid) begin
        spec_q[wr_areg] <= wr_preg;
      end
    end
  end

endmodule
