// ring_core: one core of the ring-connected matrix-vector multiplier.
//
// A core holds R data registers (Is and Istim values), a weight store and a
// program store, both with one entry per time cycle, and one multiply-add
// ALU. While `run` is high, every clock cycle is one time cycle t (t_idx):
//   * the instruction and weight of cycle t are read from the stores;
//   * if mac_en, the ALU computes w(t) * regs[is_sel] + regs[acc_sel] and the
//     result replaces regs[acc_sel] at the clock edge ending the cycle;
//   * if send_en, regs[send_sel] leaves on link_out at the end of the cycle.
//     When the sent register is the one the ALU updates in this cycle, the
//     fresh sum is sent (a bypass from the ALU output to the link);
//   * a datum arriving on link_in (valid) is written into regs[recv_sel] at
//     the same edge, so it is present on this core from cycle t+1 on.
// So at most one datum enters and at most one leaves a core per time cycle,
// and one multiply-add is done per cycle, as the architecture requires.
// Weights, instructions and initial register contents are written by the host
// before the first time cycle through the ld_* port; results are read back
// through rd_addr/rd_data after the last one.
//
// Storing one weight per time cycle (instead of a weight per matrix element)
// and the instruction encoding are this design's own choices: the source
// gives the data flow of a core but not its control.
module ring_core
  import ring_pkg::*;
#(
  parameter int unsigned R     = 2,   // data registers
  parameter int unsigned T_MAX = 16   // time cycles the stores can hold
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sequencing
  input  logic                     run,
  input  logic [$clog2(T_MAX)-1:0] t_idx,
  // ring links
  input  link_t                    link_in,
  output link_t                    link_out,
  // host load (only while run is low)
  input  logic                     ld_en,
  input  load_sel_e                ld_sel,
  input  logic [$clog2(T_MAX)-1:0] ld_addr,
  input  data_t                    ld_data,
  input  core_instr_t              ld_instr,
  // host read-back of a data register
  input  reg_idx_t                 rd_addr,
  output data_t                    rd_data
);

  core_instr_t imem [T_MAX];
  data_t       wmem [T_MAX];

  core_instr_t instr;
  data_t       w;
  data_t       is_data, acc_data, tx_data, alu_out;
  logic        mac_do, send_do, recv_do;

  always_ff @(posedge clk) begin
    if (ld_en && ld_sel == LD_INSTR)  imem[ld_addr] <= ld_instr;
    if (ld_en && ld_sel == LD_WEIGHT) wmem[ld_addr] <= ld_data;
  end

  always_comb begin
    instr   = imem[t_idx];
    w       = wmem[t_idx];
    mac_do  = run && instr.mac_en;
    send_do = run && instr.send_en;
    recv_do = run && link_in.valid;
  end

  core_regfile #(.R(R)) u_regs (
    .clk      (clk),
    .rst_n    (rst_n),
    .ld_we    (ld_en && ld_sel == LD_REG),
    .ld_addr  (reg_idx_t'(ld_addr)),
    .ld_data  (ld_data),
    .rx_we    (recv_do),
    .rx_addr  (instr.recv_sel),
    .rx_data  (link_in.data),
    .alu_we   (mac_do),
    .alu_addr (instr.acc_sel),
    .alu_data (alu_out),
    .is_addr  (instr.is_sel),
    .is_data  (is_data),
    .acc_addr (instr.acc_sel),
    .acc_data (acc_data),
    .tx_addr  (instr.send_sel),
    .tx_data  (tx_data),
    .rd_addr  (rd_addr),
    .rd_data  (rd_data)
  );

  core_alu u_alu (
    .w         (w),
    .is_val    (is_data),
    .istim_in  (acc_data),
    .istim_out (alu_out)
  );

  always_comb begin
    link_out.valid = send_do;
    link_out.data  = (mac_do && instr.send_sel == instr.acc_sel) ? alu_out : tx_data;
  end

  // A received datum may only overwrite the ALU's target register when that
  // register's new value is leaving through the link in the same cycle.
  a_rx_alu_clash: assert property (@(posedge clk) disable iff (!rst_n)
    (recv_do && mac_do && instr.recv_sel == instr.acc_sel)
      |-> (send_do && instr.send_sel == instr.acc_sel));

  // Host loads happen only between runs.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) ld_en |-> !run);

endmodule
