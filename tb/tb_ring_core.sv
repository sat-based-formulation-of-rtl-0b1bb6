// tb_ring_core: runs one core with random programs, weights, initial
// registers and random arrivals on its input link, and compares the datum it
// sends in every time cycle and its final registers with a cycle model:
// multiply-add into the accumulator register, send after the multiply-add
// (so a register updated in the cycle is sent with its new value), arriving
// datum stored at the end of the cycle and taking precedence over the ALU
// write. Programs never let an arrival overwrite an ALU target that is not
// also being sent (the rule the mapping guarantees).
module tb_ring_core;
  import ring_pkg::*;

  localparam int unsigned R = 3;
  localparam int unsigned T_MAX = 8;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic run = 1'b0;
  logic [$clog2(T_MAX)-1:0] t_idx = '0;
  link_t link_in = '0, link_out;
  logic ld_en = 1'b0;
  load_sel_e ld_sel = LD_REG;
  logic [$clog2(T_MAX)-1:0] ld_addr = '0;
  data_t ld_data = '0;
  core_instr_t ld_instr = '0;
  reg_idx_t rd_addr = '0;
  data_t rd_data;

  ring_core #(.R(R), .T_MAX(T_MAX)) u_dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(load_sel_e s, int a, data_t d, core_instr_t i);
    @(negedge clk);
    ld_en = 1'b1; ld_sel = s; ld_addr = ($clog2(T_MAX))'(a); ld_data = d; ld_instr = i;
    @(negedge clk);
    ld_en = 1'b0;
  endtask

  initial begin
    core_instr_t prog [T_MAX];
    data_t wts [T_MAX];
    data_t regs [R];
    link_t arr [T_MAX];
    data_t exp_send, sum;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run_n = 0; run_n < 40; run_n++) begin
      for (int r = 0; r < R; r++) begin
        regs[r] = data_t'($urandom_range(0, 200)) - 100;
        load(LD_REG, r, regs[r], '0);
      end
      for (int t = 0; t < T_MAX; t++) begin
        prog[t] = '0;
        prog[t].mac_en   = ($urandom_range(0, 3) != 0);
        prog[t].is_sel   = reg_idx_t'($urandom_range(0, R - 1));
        prog[t].acc_sel  = reg_idx_t'($urandom_range(0, R - 1));
        prog[t].send_en  = ($urandom_range(0, 1) != 0);
        prog[t].send_sel = reg_idx_t'($urandom_range(0, R - 1));
        prog[t].recv_sel = reg_idx_t'($urandom_range(0, R - 1));
        arr[t].valid = ($urandom_range(0, 1) != 0);
        arr[t].data  = data_t'($urandom_range(0, 200)) - 100;
        if (arr[t].valid && prog[t].mac_en && prog[t].recv_sel == prog[t].acc_sel) begin
          prog[t].send_en = 1'b1; prog[t].send_sel = prog[t].acc_sel;
        end
        wts[t] = data_t'($urandom_range(0, 200)) - 100;
        load(LD_INSTR, t, '0, prog[t]);
        load(LD_WEIGHT, t, wts[t], '0);
      end
      for (int t = 0; t < T_MAX; t++) begin
        @(negedge clk);
        run = 1'b1; t_idx = ($clog2(T_MAX))'(t); link_in = arr[t];
        #1;
        sum = wts[t] * regs[prog[t].is_sel] + regs[prog[t].acc_sel];
        exp_send = (prog[t].mac_en && prog[t].send_sel == prog[t].acc_sel) ? sum
                 : regs[prog[t].send_sel];
        checks++;
        if (link_out.valid !== prog[t].send_en ||
            (prog[t].send_en && link_out.data !== exp_send)) begin
          failures++;
          $display("run %0d t %0d: sent %b/%0d, expected %b/%0d", run_n, t,
                   link_out.valid, link_out.data, prog[t].send_en, exp_send);
        end
        if (prog[t].mac_en) regs[prog[t].acc_sel] = sum;
        if (arr[t].valid) regs[prog[t].recv_sel] = arr[t].data;
      end
      @(negedge clk);
      run = 1'b0; link_in = '0;
      for (int r = 0; r < R; r++) begin
        rd_addr = reg_idx_t'(r);
        #1;
        checks++;
        if (rd_data !== regs[r]) begin
          failures++; $display("run %0d reg %0d = %0d, expected %0d", run_n, r, rd_data, regs[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
