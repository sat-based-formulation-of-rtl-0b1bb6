// ring_pkg: types and constants shared by the ring-connected matrix-vector
// multiplier. Every core holds two kinds of data in its registers: elements
// Is[x] of the input vector and running sums Istim[y] of the result vector.
// Both share one signed data type. A core is driven, once per time cycle, by
// one core_instr_t word taken from its own program memory; the word is the
// per-core, per-cycle slice of a mapping solution.
//
// The data width and the register-index width are not given in the
// source description; 32-bit two's-complement data and up to 16 registers
// per core are this design's choices.
package ring_pkg;

  // Width of every data word (Is, Istim and weights w).
  localparam int unsigned DATA_W = 32;
  // Width of a register index inside a core; bounds the registers per core.
  localparam int unsigned REG_IDX_W = 4;
  localparam int unsigned MAX_REGS = 1 << REG_IDX_W;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic [REG_IDX_W-1:0] reg_idx_t;

  // One time cycle of one core.
  //   mac_en   : perform regs[acc_sel] <= w(t) * regs[is_sel] + regs[acc_sel]
  //   send_en  : at the end of the cycle send regs[send_sel] (after the
  //              multiply-add of this cycle) to the next core of the ring
  //   recv_sel : register that takes the datum arriving from the previous
  //              core at the end of this cycle (used only if one arrives)
  typedef struct packed {
    logic     mac_en;
    reg_idx_t is_sel;
    reg_idx_t acc_sel;
    logic     send_en;
    reg_idx_t send_sel;
    reg_idx_t recv_sel;
  } core_instr_t;

  // The single-datum link from a core to the next core.
  typedef struct packed {
    logic  valid;
    data_t data;
  } link_t;

  // Target of a host load into the ring.
  typedef enum logic [1:0] {
    LD_REG    = 2'd0,  // a data register (Is or initial Istim)
    LD_WEIGHT = 2'd1,  // the weight used in a given time cycle
    LD_INSTR  = 2'd2   // the instruction of a given time cycle
  } load_sel_e;

endpackage
