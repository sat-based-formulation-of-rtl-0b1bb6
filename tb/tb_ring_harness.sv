// tb_ring_harness: drives one ring_mv instance through complete runs of a
// mapping (tb_map_pkg::ring_map) and checks it. A run loads the initial
// registers, weights and instructions, pulses start, checks that the ring is
// busy for exactly T clock cycles, then reads every Istim[y] from the
// register the mapping leaves it in and compares it with the product of the
// matrix and vector computed here. check_map() feeds a mapping's variables to
// the constraint circuit, expects it to accept them, and then breaks the
// mapping in one way per constraint group and expects a rejection.
// Counters record how often each mechanism of the ring occurred.
module tb_ring_harness
  import ring_pkg::*;
  import tb_map_pkg::*;
#(
  parameter int unsigned C     = 4,
  parameter int unsigned R     = 2,
  parameter int unsigned T_MAX = 4,
  parameter int unsigned CHK_X = 4,
  parameter int unsigned CHK_Y = 4,
  parameter int unsigned CHK_T = 4,
  parameter int unsigned CHK_C = 4
);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     start = 1'b0;
  logic [$clog2(T_MAX):0]   n_cycles = '0;
  logic                     busy, done;
  logic                     ld_en = 1'b0;
  logic [$clog2(C)-1:0]     ld_core = '0;
  load_sel_e                ld_sel = LD_REG;
  logic [$clog2(T_MAX)-1:0] ld_addr = '0;
  data_t                    ld_data = '0;
  core_instr_t              ld_instr = '0;
  logic [$clog2(C)-1:0]     rd_core = '0;
  reg_idx_t                 rd_addr = '0;
  data_t                    rd_data;
  logic chk_nz [CHK_Y][CHK_X];
  logic chk_w [CHK_Y][CHK_X][CHK_T][CHK_C];
  logic chk_wis [CHK_Y][CHK_X][CHK_T][CHK_C];
  logic chk_is [CHK_X][CHK_T][CHK_C];
  logic chk_istim [CHK_Y][CHK_T][CHK_C];
  logic chk_is_nx [CHK_X][CHK_T][CHK_C];
  logic chk_istim_nx [CHK_Y][CHK_T][CHK_C];
  logic chk_ok;
  logic [3:0] chk_group_ok;

  ring_mv #(.C(C), .R(R), .T_MAX(T_MAX), .CHK_X(CHK_X), .CHK_Y(CHK_Y), .CHK_T(CHK_T),
            .CHK_C(CHK_C)) u_dut (.*);

  // mechanism counters
  int n_mac_ops, n_idle_alu, n_is_moves, n_istim_moves, n_bypass, n_reuse;
  int n_wrap = 0, n_chk_reject = 0, n_runs = 0;
  ring_map cur;

  int core_mac [C], core_idle [C], core_is [C], core_st [C], core_byp [C], core_reuse [C];
  for (genvar c = 0; c < C; c++) begin : g_probe
    core_instr_t i;
    logic rx;
    assign i  = u_dut.g_core[c].u_core.instr;
    assign rx = u_dut.g_core[c].u_core.link_in.valid;
    initial begin
      core_mac[c] = 0; core_idle[c] = 0; core_is[c] = 0; core_st[c] = 0;
      core_byp[c] = 0; core_reuse[c] = 0;
    end
    always @(posedge clk) if (rst_n && busy && cur != null) begin
      if (i.mac_en) core_mac[c]++; else core_idle[c]++;
      if (i.send_en) begin
        if (cur.snd_k[int'(u_dut.t_idx)][c] == 1) core_is[c]++; else core_st[c]++;
        if (i.mac_en && i.send_sel == i.acc_sel) core_byp[c]++;
      end
      if (rx && i.send_en && i.recv_sel == i.send_sel) core_reuse[c]++;
    end
  end

  always @(posedge clk) if (rst_n && busy && u_dut.link[C-1].valid) n_wrap++;

  always_comb begin
    n_mac_ops = 0; n_idle_alu = 0; n_is_moves = 0; n_istim_moves = 0; n_bypass = 0; n_reuse = 0;
    for (int c = 0; c < C; c++) begin
      n_mac_ops += core_mac[c]; n_idle_alu += core_idle[c]; n_is_moves += core_is[c];
      n_istim_moves += core_st[c]; n_bypass += core_byp[c]; n_reuse += core_reuse[c];
    end
  end

  task automatic load(input int c, input load_sel_e s, input int a, input data_t d,
                      input core_instr_t ins);
    @(negedge clk);
    ld_en = 1'b1; ld_core = ($clog2(C))'(c); ld_sel = s;
    ld_addr = ($clog2(T_MAX))'(a); ld_data = d; ld_instr = ins;
    @(negedge clk);
    ld_en = 1'b0;
  endtask

  task automatic reset();
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Fill the constraint circuit's inputs from mapping m.
  task automatic set_vars(ring_map m);
    for (int y = 0; y < CHK_Y; y++) for (int x = 0; x < CHK_X; x++) chk_nz[y][x] = 1'b0;
    for (int t = 0; t < CHK_T; t++)
      for (int c = 0; c < CHK_C; c++) begin
        for (int y = 0; y < CHK_Y; y++) for (int x = 0; x < CHK_X; x++) begin
          chk_w[y][x][t][c]   = (m.mac_y[t][c] == y && m.mac_x[t][c] == x);
          chk_wis[y][x][t][c] = (m.mac_y[t][c] == y && m.mac_x[t][c] == x);
          if (m.mac_y[t][c] == y && m.mac_x[t][c] == x) chk_nz[y][x] = 1'b1;
        end
        for (int x = 0; x < CHK_X; x++) begin
          chk_is[x][t][c]    = (m.is_loc[t][x] == c);
          chk_is_nx[x][t][c] = (m.snd_k[t][c] == 1 && m.snd_id[t][c] == x);
        end
        for (int y = 0; y < CHK_Y; y++) begin
          chk_istim[y][t][c]    = (m.st_loc[t][y] == c);
          chk_istim_nx[y][t][c] = (m.snd_k[t][c] == 2 && m.snd_id[t][c] == y);
        end
      end
  endtask

  // Run mapping m once with random data; adds to checks/failures.
  task automatic run(ring_map m, input int seed, inout int checks, inout int failures);
    data_t wm [MAXN][MAXN];
    data_t xv [MAXN];
    data_t ref_y;
    int cyc;
    int e;
    void'($urandom(seed));
    cur = m;
    e = m.build();
    checks++;
    if (e != 0) begin failures++; $display("mapping inconsistent (%0d)", e); end
    for (int y = 0; y < m.Y; y++) for (int x = 0; x < m.X; x++) wm[y][x] = '0;
    for (int t = 0; t < m.T; t++) for (int c = 0; c < C; c++)
      if (m.mac_y[t][c] >= 0) wm[m.mac_y[t][c]][m.mac_x[t][c]] = data_t'($urandom_range(0, 2000)) - 1000;
    for (int x = 0; x < m.X; x++) xv[x] = data_t'($urandom_range(0, 2000)) - 1000;
    reset();
    // registers: everything zero, then the Is values
    for (int x = 0; x < m.X; x++) load(m.is_loc[0][x], LD_REG, m.is_reg[0][x], xv[x], '0);
    for (int t = 0; t < m.T; t++) for (int c = 0; c < C; c++) begin
      load(c, LD_INSTR, t, '0, m.instr[t][c]);
      load(c, LD_WEIGHT, t,
           (m.mac_y[t][c] >= 0) ? wm[m.mac_y[t][c]][m.mac_x[t][c]] : data_t'(0), '0);
    end
    @(negedge clk);
    start = 1'b1; n_cycles = ($clog2(T_MAX)+1)'(m.T);
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    n_runs++;
    checks++;
    if (cyc != m.T) begin
      failures++; $display("run took %0d time cycles, expected %0d", cyc, m.T);
    end
    for (int y = 0; y < m.Y; y++) begin
      ref_y = '0;
      for (int x = 0; x < m.X; x++) ref_y += wm[y][x] * xv[x];
      rd_core = ($clog2(C))'(m.st_loc[m.T][y]);
      rd_addr = reg_idx_t'(m.st_reg[m.T][y]);
      #1;
      checks++;
      if (rd_data !== ref_y) begin
        failures++; $display("Istim[%0d] = %0d, expected %0d", y + 1, rd_data, ref_y);
      end
    end
  endtask

  // Present mapping m (sized CHK_X x CHK_Y on CHK_C cores, CHK_T cycles) to
  // the constraint circuit: it must accept it and reject one broken version
  // per constraint group.
  task automatic check_map(ring_map m, inout int checks, inout int failures);
    checks++;
    if (m.build() != 0 || m.X != CHK_X || m.Y != CHK_Y || m.T != CHK_T || m.C != CHK_C) begin
      failures++; $display("mapping does not fit the constraint circuit");
      return;
    end
    // constraint circuit: accepts the mapping ...
    set_vars(m);
    #1;
    checks++;
    if (chk_ok !== 1'b1) begin
      failures++; $display("constraint circuit rejects a legal mapping (%b)", chk_group_ok);
    end
    // ... and rejects it broken in each group
    chk_wis[m.mac_y[0][0] < 0 ? m.mac_y[1][0] : m.mac_y[0][0]]
           [m.mac_x[0][0] < 0 ? m.mac_x[1][0] : m.mac_x[0][0]][m.T-1][CHK_C-1] = 1'b1;
    #1; checks++;
    if (chk_group_ok[0] || chk_ok) begin failures++; $display("extra product accepted"); end
    else n_chk_reject++;
    set_vars(m);
    chk_is_nx[m.X-1][m.T-1][0] = 1'b1;
    #1; checks++;
    if (chk_group_ok[1] || chk_ok) begin failures++; $display("move after last cycle accepted"); end
    else n_chk_reject++;
    set_vars(m);
    for (int c = 0; c < CHK_C; c++) chk_is[0][0][c] = 1'b0;
    chk_is[0][0][m.is_loc[0][0]] = 1'b0;
    chk_is[0][0][(m.is_loc[0][0] + CHK_C/2) % CHK_C] = 1'b1;
    #1; checks++;
    if (chk_ok) begin failures++; $display("displaced Is accepted"); end
    else n_chk_reject++;
    // two products (of non-zero elements) on the ALU of core 1 in cycle 1
    set_vars(m);
    begin
      int found = 0;
      for (int t = 0; t < m.T && found < 2; t++)
        for (int c = 0; c < m.C && found < 2; c++)
          if (m.mac_y[t][c] >= 0) begin
            chk_wis[m.mac_y[t][c]][m.mac_x[t][c]][0][0] = 1'b1;
            found++;
          end
    end
    #1; checks++;
    if (chk_group_ok[3] || chk_ok) begin failures++; $display("two products on one ALU accepted"); end
    else n_chk_reject++;
  endtask

endmodule
