// core_regfile: the data registers of one ring core. They hold the vector
// elements Is[x] and the partial sums Istim[y] currently mapped on the core;
// the mapping keeps at most ceil((X+Y)/C) of them on a core at any cycle, so
// that many registers suffice.
//
// Reads are combinational through four ports: the two ALU operands, the
// value to send to the next core and a host read port. Writes happen at the
// rising clock edge through three ports with fixed priority:
//   1. the host load port (used only while the ring is idle),
//   2. the datum received from the previous core,
//   3. the ALU result.
// The received datum wins over the ALU result because, when both address
// the same register, the ALU result is the value being sent away in the same
// cycle. Reset clears every register to zero. The port structure is this
// design's choice; the source only shows a bank of registers on a bus.
module core_regfile
  import ring_pkg::*;
#(
  parameter int unsigned R = 2   // registers per core
) (
  input  logic     clk,
  input  logic     rst_n,
  // host load
  input  logic     ld_we,
  input  reg_idx_t ld_addr,
  input  data_t    ld_data,
  // datum arriving from the previous core
  input  logic     rx_we,
  input  reg_idx_t rx_addr,
  input  data_t    rx_data,
  // ALU result
  input  logic     alu_we,
  input  reg_idx_t alu_addr,
  input  data_t    alu_data,
  // read ports
  input  reg_idx_t is_addr,
  output data_t    is_data,
  input  reg_idx_t acc_addr,
  output data_t    acc_data,
  input  reg_idx_t tx_addr,
  output data_t    tx_data,
  input  reg_idx_t rd_addr,
  output data_t    rd_data
);

  data_t regs [R];

  // Read of register a; an index beyond R reads as zero.
  function automatic data_t rd(input reg_idx_t a, input data_t r [R]);
    data_t v;
    v = '0;
    for (int i = 0; i < R; i++) if (int'(a) == i) v = r[i];
    return v;
  endfunction

  always_comb begin
    is_data  = rd(is_addr, regs);
    acc_data = rd(acc_addr, regs);
    tx_data  = rd(tx_addr, regs);
    rd_data  = rd(rd_addr, regs);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < R; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < R; i++) begin
        if (ld_we && int'(ld_addr) == i)        regs[i] <= ld_data;
        else if (rx_we && int'(rx_addr) == i)   regs[i] <= rx_data;
        else if (alu_we && int'(alu_addr) == i) regs[i] <= alu_data;
      end
    end
  end

  initial assert (R >= 1 && R <= MAX_REGS)
    else $error("core_regfile: R=%0d outside 1..%0d", R, MAX_REGS);

endmodule
