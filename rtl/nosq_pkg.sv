// nosq_pkg: types and constants shared by the store-queue-free (NoSQ) memory
// pipeline. The core renames and commits one instruction per cycle; stores and
// loads are tracked by store sequence numbers (SSNs), and loads that are
// predicted to communicate with an in-flight store take that store's data
// register at rename (speculative memory bypassing) instead of executing.
//
// Numbers that follow the description of the design: 20-bit SSNs, a
// 128-instruction window, a 2,048-entry bypassing predictor split over a
// path-insensitive and a path-sensitive table, an eight-stage in-order commit
// pipeline. Widths that the description leaves open (32-bit addresses and
// PCs, 64-bit data, 32 logical and 160 physical registers, 16 bits of path
// history, a 256-entry SSBF) are this design's own choices.
package nosq_pkg;

  localparam int unsigned XLEN        = 64;   // data width
  localparam int unsigned ADDR_BITS   = 32;   // byte address and PC width
  localparam int unsigned AREGS       = 32;   // logical registers
  localparam int unsigned PREGS       = 160;  // physical registers (32 + 128 window)
  localparam int unsigned AREG_BITS   = $clog2(AREGS);
  localparam int unsigned PREG_BITS   = $clog2(PREGS);
  localparam int unsigned SSN_BITS    = 20;   // store sequence number width
  localparam int unsigned DIST_BITS   = 8;    // predicted store distance
  localparam int unsigned CONF_BITS   = 2;    // delay confidence counter
  localparam int unsigned HIST_BITS   = 16;   // path history length

  typedef logic [ADDR_BITS-1:0] addr_t;
  typedef logic [XLEN-1:0]      data_t;
  typedef logic [AREG_BITS-1:0] areg_t;
  typedef logic [PREG_BITS-1:0] preg_t;
  typedef logic [SSN_BITS-1:0]  ssn_t;
  typedef logic [DIST_BITS-1:0] dist_t;
  typedef logic [CONF_BITS-1:0] conf_t;
  typedef logic [HIST_BITS-1:0] hist_t;

  // What rename decided for a load.
  typedef enum logic [1:0] {
    LD_NONBYPASS = 2'd0,  // dispatched, reads the data cache
    LD_BYPASS    = 2'd1,  // output mapped to the store's data register
    LD_DELAY     = 2'd2   // dispatched, waits for the predicted store to commit
  } ld_kind_e;

  typedef enum logic [1:0] {
    OP_ALU   = 2'd0,
    OP_LOAD  = 2'd1,
    OP_STORE = 2'd2
  } op_e;

  // One instruction as decode hands it to rename.
  typedef struct packed {
    addr_t pc;
    op_e   op;
    logic  has_dst;     // writes ldst
    areg_t ldst;
    areg_t lsrc1;       // base register of a load or store
    areg_t lsrc2;       // data register of a store
    logic [11:0] imm;   // signed address offset
    logic  is_cond_br;  // conditional branch, taken in br_taken
    logic  br_taken;
    logic  is_call;     // procedure call
  } dec_inst_t;

  // A bypassing-predictor lookup result.
  typedef struct packed {
    logic  hit;
    logic  from_path;   // provided by the path-sensitive table
    dist_t distance;
    conf_t conf;
  } pred_t;

  // Augmented reorder-buffer entry: what the commit pipeline needs to
  // regenerate addresses, verify loads and commit stores.
  typedef struct packed {
    addr_t    pc;
    op_e      op;
    logic     has_dst;
    areg_t    ldst;
    preg_t    pdst;       // register holding the result (store: unused)
    preg_t    pbase;      // base address register
    preg_t    pdata;      // store data register; load value register
    logic [11:0] imm;
    ssn_t     ssn;        // store: own SSN; load: SSN_rename at its rename
    ld_kind_e kind;
    ssn_t     ssn_bypass; // load: predicted bypassing store
    logic     pred_hit;   // load: predictor supplied a distance
    hist_t    hist;       // path history at rename (for training)
    ssn_t     ssn_nvul;   // load: youngest store it is not vulnerable to
  } rob_entry_t;

  // Commit-time training request to the bypassing predictor.
  typedef struct packed {
    addr_t pc;
    hist_t hist;
    logic  set_dist;    // misprediction: install dist, lower confidence
    dist_t distance;
    logic  conf_up;     // correct prediction: raise confidence
    logic  conf_down;   // wrong prediction: lower confidence
  } train_t;

endpackage
