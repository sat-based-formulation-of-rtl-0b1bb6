// ring_mv: top level. A ring of C cores that multiplies a matrix by a vector
// by following a mapping solution computed in advance, plus the constraint
// circuit that decides whether a mapping is legal.
//
// Ring: core c sends to core c+1 and the last core sends to the first; data
// never moves backwards. In every time cycle each core does at most one
// multiply-add w[y][x]*Is[x] + Istim[y], receives at most one datum from the
// previous core and sends at most one datum to the next core. Before a run
// the host loads, per core, the initial registers (Is[x] and zeroed Istim[y]),
// the weight and the instruction of every time cycle (ld_* port, one word per
// clock while idle). A `start` pulse with n_cycles = T runs T time cycles,
// one per clock; `done` pulses one clock after the last one. The results
// Istim[y] are then read from the registers with rd_core/rd_addr (rd_data is
// combinational).
//
// Checker: mapping_checker, the circuit whose satisfying inputs are the legal
// mappings, stands beside the datapath with its own ports (chk_*). Its size
// is set separately (CHK_X, CHK_Y, CHK_T, CHK_C); the default x=y=t=c=4 is
// the size of the worked constraint-circuit examples of the formulation. At
// 16x16 on 16 cores in 16 cycles it has 2*16^4 product/weight inputs, which
// is practical as a SAT instance but not as a circuit to simulate routinely.
module ring_mv
  import ring_pkg::*;
#(
  parameter int unsigned C     = 16,   // cores in the ring
  parameter int unsigned R     = 2,    // data registers per core
  parameter int unsigned T_MAX = 16,   // time cycles a run can have
  parameter int unsigned CHK_X = 4,    // constraint circuit: matrix columns
  parameter int unsigned CHK_Y = 4,    //   matrix rows
  parameter int unsigned CHK_T = 4,    //   time cycles
  parameter int unsigned CHK_C = 4     //   cores
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // run control
  input  logic                     start,
  input  logic [$clog2(T_MAX):0]   n_cycles,
  output logic                     busy,
  output logic                     done,
  // host load
  input  logic                     ld_en,
  input  logic [$clog2(C)-1:0]     ld_core,
  input  load_sel_e                ld_sel,
  input  logic [$clog2(T_MAX)-1:0] ld_addr,
  input  data_t                    ld_data,
  input  core_instr_t              ld_instr,
  // result read-back
  input  logic [$clog2(C)-1:0]     rd_core,
  input  reg_idx_t                 rd_addr,
  output data_t                    rd_data,
  // mapping constraint circuit
  input  logic                     chk_nz       [CHK_Y][CHK_X],
  input  logic                     chk_w        [CHK_Y][CHK_X][CHK_T][CHK_C],
  input  logic                     chk_wis      [CHK_Y][CHK_X][CHK_T][CHK_C],
  input  logic                     chk_is       [CHK_X][CHK_T][CHK_C],
  input  logic                     chk_istim    [CHK_Y][CHK_T][CHK_C],
  input  logic                     chk_is_nx    [CHK_X][CHK_T][CHK_C],
  input  logic                     chk_istim_nx [CHK_Y][CHK_T][CHK_C],
  output logic                     chk_ok,
  output logic [3:0]               chk_group_ok  // {res, sop, transfer, map}
);

  logic                     run;
  logic [$clog2(T_MAX)-1:0] t_idx;
  link_t                    link [C];   // link[c]: from core c to core c+1
  data_t                    rd_each [C];

  ring_sequencer #(.T_MAX(T_MAX)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .n_cycles (n_cycles),
    .run      (run),
    .t_idx    (t_idx),
    .done     (done)
  );

  assign busy = run;

  for (genvar c = 0; c < C; c++) begin : g_core
    ring_core #(.R(R), .T_MAX(T_MAX)) u_core (
      .clk      (clk),
      .rst_n    (rst_n),
      .run      (run),
      .t_idx    (t_idx),
      .link_in  (link[(c + C - 1) % C]),
      .link_out (link[c]),
      .ld_en    (ld_en && int'(ld_core) == c),
      .ld_sel   (ld_sel),
      .ld_addr  (ld_addr),
      .ld_data  (ld_data),
      .ld_instr (ld_instr),
      .rd_addr  (rd_addr),
      .rd_data  (rd_each[c])
    );
  end

  assign rd_data = rd_each[rd_core];

  mapping_checker #(.X(CHK_X), .Y(CHK_Y), .T(CHK_T), .C(CHK_C)) u_chk (
    .nz          (chk_nz),
    .w_v         (chk_w),
    .wis_v       (chk_wis),
    .is_v        (chk_is),
    .istim_v     (chk_istim),
    .is_nx       (chk_is_nx),
    .istim_nx    (chk_istim_nx),
    .ok_map      (chk_group_ok[0]),
    .ok_transfer (chk_group_ok[1]),
    .ok_sop      (chk_group_ok[2]),
    .ok_res      (chk_group_ok[3]),
    .ok          (chk_ok)
  );

endmodule
