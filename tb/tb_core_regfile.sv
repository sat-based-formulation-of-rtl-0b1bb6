// tb_core_regfile: drives random traffic on all three write ports of a
// 4-entry register file and compares every read port with a model that
// applies the write priority host load > received datum > ALU result.
// Also checks reset to zero and that out-of-range indices read zero.
module tb_core_regfile;
  import ring_pkg::*;

  localparam int unsigned R = 4;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld_we = 0, rx_we = 0, alu_we = 0;
  reg_idx_t ld_addr = '0, rx_addr = '0, alu_addr = '0;
  data_t ld_data = '0, rx_data = '0, alu_data = '0;
  reg_idx_t is_addr = '0, acc_addr = '0, tx_addr = '0, rd_addr = '0;
  data_t is_data, acc_data, tx_data, rd_data;

  core_regfile #(.R(R)) u_dut (.*);

  data_t model [R];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t m(reg_idx_t a);
    return (int'(a) < R) ? model[a] : '0;
  endfunction

  task automatic check_reads();
    is_addr = reg_idx_t'($urandom_range(0, R));
    acc_addr = reg_idx_t'($urandom_range(0, R - 1));
    tx_addr = reg_idx_t'($urandom_range(0, R - 1));
    rd_addr = reg_idx_t'($urandom_range(0, R + 2));
    #1;
    checks++;
    if (is_data !== m(is_addr) || acc_data !== m(acc_addr) ||
        tx_data !== m(tx_addr) || rd_data !== m(rd_addr)) begin
      failures++;
      $display("read mismatch at %0t", $time);
    end
  endtask

  initial begin
    for (int i = 0; i < R; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < R; i++) begin rd_addr = reg_idx_t'(i); #1; checks++;
      if (rd_data !== '0) begin failures++; $display("reg %0d not reset", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ld_we = ($urandom_range(0, 7) == 0);
      rx_we = $urandom_range(0, 1);
      alu_we = $urandom_range(0, 1);
      ld_addr = reg_idx_t'($urandom_range(0, R - 1));
      rx_addr = reg_idx_t'($urandom_range(0, R - 1));
      alu_addr = reg_idx_t'($urandom_range(0, R - 1));
      ld_data = data_t'($urandom); rx_data = data_t'($urandom); alu_data = data_t'($urandom);
      @(posedge clk);
      if (alu_we) model[alu_addr] = alu_data;
      if (rx_we) model[rx_addr] = rx_data;
      if (ld_we) model[ld_addr] = ld_data;
      @(negedge clk);
      ld_we = 0; rx_we = 0; alu_we = 0;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
