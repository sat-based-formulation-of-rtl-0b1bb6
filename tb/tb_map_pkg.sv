// tb_map_pkg: testbench support for the ring-connected multiplier.
//
// A ring_map holds a mapping solution in the form it is drawn in mapping
// tables: for every time cycle t and core c, the multiply-add done there
// (w[y][x]*Is[x] into Istim[y], or none) and the datum sent to the next core
// (an Is[x], an Istim[y], or none), plus the core each Is[x] and Istim[y]
// starts on. build() follows the data through the ring, checks that the
// mapping is consistent (operands present, register limit kept), gives every
// datum a register on its core and produces the per-core instruction words
// the hardware runs. Indices are 0-based here (the tables count from 1).
package tb_map_pkg;
  import ring_pkg::*;

  localparam int MAXT = 32;
  localparam int MAXC = 16;
  localparam int MAXN = 16;

  class ring_map;
    int C, T, X, Y, R;
    int mac_y [MAXT][MAXC];
    int mac_x [MAXT][MAXC];
    int snd_k [MAXT][MAXC];     // 0 none, 1 Is, 2 Istim
    int snd_id[MAXT][MAXC];
    int is_c0 [MAXN];
    int st_c0 [MAXN];
    // derived by build()
    int is_loc[MAXT+1][MAXN];
    int st_loc[MAXT+1][MAXN];
    int is_reg[MAXT+1][MAXN];
    int st_reg[MAXT+1][MAXN];
    core_instr_t instr[MAXT][MAXC];

    function new(int c, int t, int x, int y, int r);
      C = c; T = t; X = x; Y = y; R = r;
      for (int i = 0; i < MAXT; i++)
        for (int j = 0; j < MAXC; j++) begin
          mac_y[i][j] = -1; mac_x[i][j] = -1; snd_k[i][j] = 0; snd_id[i][j] = 0;
        end
      for (int i = 0; i < MAXN; i++) begin is_c0[i] = 0; st_c0[i] = 0; end
    endfunction

    // 1-based entry as printed in a mapping table.
    function void op(int t, int c, int y, int x, int k, int id);
      mac_y[t-1][c-1] = y - 1; mac_x[t-1][c-1] = x - 1;
      snd_k[t-1][c-1] = k;     snd_id[t-1][c-1] = id - 1;
    endfunction

    // Regular mapping of an N x N product on N cores in N cycles: core c
    // keeps Istim[c]; Is[x] visits every core, one step per cycle.
    function void systolic();
      for (int c = 0; c < C; c++) begin is_c0[c] = c; st_c0[c] = c; end
      for (int t = 0; t < T; t++)
        for (int c = 0; c < C; c++) begin
          mac_y[t][c] = c;
          mac_x[t][c] = (c - t + 2 * C) % C;
          snd_k[t][c] = (t < T - 1) ? 1 : 0;
          snd_id[t][c] = (c - t + 2 * C) % C;
        end
    endfunction

    // Returns the number of inconsistencies found (0 for a usable mapping).
    function int build();
      int err = 0;
      bit used [MAXC][MAX_REGS];
      int cnt;
      for (int x = 0; x < X; x++) is_loc[0][x] = is_c0[x];
      for (int y = 0; y < Y; y++) st_loc[0][y] = st_c0[y];
      for (int t = 0; t < T; t++) begin
        for (int x = 0; x < X; x++) is_loc[t+1][x] = is_loc[t][x];
        for (int y = 0; y < Y; y++) st_loc[t+1][y] = st_loc[t][y];
        for (int c = 0; c < C; c++) begin
          if (snd_k[t][c] == 1) begin
            if (is_loc[t][snd_id[t][c]] != c) err++;
            is_loc[t+1][snd_id[t][c]] = (c + 1) % C;
          end else if (snd_k[t][c] == 2) begin
            if (st_loc[t][snd_id[t][c]] != c) err++;
            st_loc[t+1][snd_id[t][c]] = (c + 1) % C;
          end
          if (mac_y[t][c] >= 0)
            if (is_loc[t][mac_x[t][c]] != c || st_loc[t][mac_y[t][c]] != c) err++;
        end
      end
      // registers at t = 0: in order, Is first
      for (int c = 0; c < C; c++) begin
        cnt = 0;
        for (int x = 0; x < X; x++) if (is_loc[0][x] == c) begin is_reg[0][x] = cnt; cnt++; end
        for (int y = 0; y < Y; y++) if (st_loc[0][y] == c) begin st_reg[0][y] = cnt; cnt++; end
        if (cnt > R) err++;
      end
      for (int t = 0; t < T; t++) begin
        for (int c = 0; c < C; c++) for (int r = 0; r < MAX_REGS; r++) used[c][r] = 0;
        // data that stay keep their register
        for (int x = 0; x < X; x++)
          if (is_loc[t+1][x] == is_loc[t][x]) begin
            is_reg[t+1][x] = is_reg[t][x]; used[is_loc[t][x]][is_reg[t][x]] = 1;
          end
        for (int y = 0; y < Y; y++)
          if (st_loc[t+1][y] == st_loc[t][y]) begin
            st_reg[t+1][y] = st_reg[t][y]; used[st_loc[t][y]][st_reg[t][y]] = 1;
          end
        // arriving data take the lowest free register
        for (int x = 0; x < X; x++)
          if (is_loc[t+1][x] != is_loc[t][x]) begin
            is_reg[t+1][x] = -1;
            for (int r = R - 1; r >= 0; r--) if (!used[is_loc[t+1][x]][r]) is_reg[t+1][x] = r;
            if (is_reg[t+1][x] < 0) begin err++; is_reg[t+1][x] = 0; end
            used[is_loc[t+1][x]][is_reg[t+1][x]] = 1;
          end
        for (int y = 0; y < Y; y++)
          if (st_loc[t+1][y] != st_loc[t][y]) begin
            st_reg[t+1][y] = -1;
            for (int r = R - 1; r >= 0; r--) if (!used[st_loc[t+1][y]][r]) st_reg[t+1][y] = r;
            if (st_reg[t+1][y] < 0) begin err++; st_reg[t+1][y] = 0; end
            used[st_loc[t+1][y]][st_reg[t+1][y]] = 1;
          end
        // instruction words
        for (int c = 0; c < C; c++) begin
          int p = (c + C - 1) % C;
          instr[t][c] = '0;
          if (mac_y[t][c] >= 0) begin
            instr[t][c].mac_en  = 1'b1;
            instr[t][c].is_sel  = reg_idx_t'(is_reg[t][mac_x[t][c]]);
            instr[t][c].acc_sel = reg_idx_t'(st_reg[t][mac_y[t][c]]);
          end
          if (snd_k[t][c] != 0) begin
            instr[t][c].send_en  = 1'b1;
            instr[t][c].send_sel = reg_idx_t'(snd_k[t][c] == 1 ? is_reg[t][snd_id[t][c]]
                                                               : st_reg[t][snd_id[t][c]]);
          end
          if (snd_k[t][p] != 0)
            instr[t][c].recv_sel = reg_idx_t'(snd_k[t][p] == 1 ? is_reg[t+1][snd_id[t][p]]
                                                               : st_reg[t+1][snd_id[t][p]]);
        end
      end
      return err;
    endfunction

    // Multiply-adds in the mapping.
    function int n_mac();
      int n = 0;
      for (int t = 0; t < T; t++) for (int c = 0; c < C; c++) if (mac_y[t][c] >= 0) n++;
      return n;
    endfunction
  endclass

  // Mapping of Fig. "x=y=t=c=4": 4x4 dense matrix, 4 cores, 4 time cycles.
  function automatic ring_map map_4x4();
    ring_map m = new(4, 4, 4, 4, 2);
    // start: core1 Is4/Istim4, core2 Is3/Istim3, core3 Is1/Istim1, core4 Is2/Istim2
    m.is_c0[3] = 0; m.st_c0[3] = 0;
    m.is_c0[2] = 1; m.st_c0[2] = 1;
    m.is_c0[0] = 2; m.st_c0[0] = 2;
    m.is_c0[1] = 3; m.st_c0[1] = 3;
    //    t  c  y  x  send Is[id]
    m.op(1, 1, 4, 4, 1, 4); m.op(2, 1, 4, 2, 1, 2); m.op(3, 1, 4, 1, 1, 1); m.op(4, 1, 4, 3, 0, 1);
    m.op(1, 2, 3, 3, 1, 3); m.op(2, 2, 3, 4, 1, 4); m.op(3, 2, 3, 2, 1, 2); m.op(4, 2, 3, 1, 0, 1);
    m.op(1, 3, 1, 1, 1, 1); m.op(2, 3, 1, 3, 1, 3); m.op(3, 3, 1, 4, 1, 4); m.op(4, 3, 1, 2, 0, 1);
    m.op(1, 4, 2, 2, 1, 2); m.op(2, 4, 2, 1, 1, 1); m.op(3, 4, 2, 3, 1, 3); m.op(4, 4, 2, 4, 0, 1);
    return m;
  endfunction

  // Mapping of Fig. "x=y=3, t=5, c=2": 3x3 dense matrix, 2 cores, 5 cycles;
  // the ALU of core 2 is idle in cycle 1.
  function automatic ring_map map_3x3();
    ring_map m = new(2, 5, 3, 3, 3);
    m.is_c0[0] = 0; m.is_c0[2] = 0; m.is_c0[1] = 1;
    m.st_c0[1] = 0; m.st_c0[0] = 1; m.st_c0[2] = 1;
    //    t  c  y  x  send  id     (send kind 1 = Is, 2 = Istim)
    m.op(1, 1, 2, 1, 2, 2); m.op(2, 1, 1, 3, 2, 1); m.op(3, 1, 3, 3, 1, 3);
    m.op(4, 1, 3, 1, 2, 2); m.op(5, 1, 1, 1, 0, 1);
    m.op(1, 2, 0, 0, 2, 1); m.op(2, 2, 3, 2, 2, 3); m.op(3, 2, 2, 2, 2, 2);
    m.op(4, 2, 1, 2, 2, 1); m.op(5, 2, 2, 3, 0, 1);
    return m;
  endfunction
  // Sparse 4x4 matrix of the form
  //   w11  0  w13 w14
  //    0  w22  0  w24
  //   w31  0   0   0
  //    0  w42 w43 w44
  // on 4 cores in 3 time cycles (9 products; the densest column has 3, and
  // 9 products on 4 ALUs need 3 cycles, so 3 is the minimum). The mapping was
  // found by solving the constraint circuit of mapping_checker with a SAT
  // solver.
  function automatic ring_map map_sp4();
    ring_map m = new(4, 3, 4, 4, 2);
    m.is_c0[0] = 3; m.is_c0[1] = 0; m.is_c0[2] = 1; m.is_c0[3] = 2;
    m.st_c0[0] = 3; m.st_c0[1] = 0; m.st_c0[2] = 1; m.st_c0[3] = 2;
    m.op(1, 1, 2, 2, 1, 2); m.op(1, 2, 0, 0, 1, 3); m.op(1, 3, 4, 4, 1, 4); m.op(1, 4, 1, 1, 1, 1);
    m.op(2, 1, 0, 0, 1, 1); m.op(2, 2, 0, 0, 1, 2); m.op(2, 3, 4, 3, 1, 3); m.op(2, 4, 1, 4, 1, 4);
    m.op(3, 1, 2, 4, 0, 0); m.op(3, 2, 3, 1, 0, 0); m.op(3, 3, 4, 2, 0, 0); m.op(3, 4, 1, 3, 0, 0);
    return m;
  endfunction

  // Sparse 8x8 matrix (27 zero elements) on 4 cores in 10 time cycles with
  // 4 registers per core; non-zero pattern by rows:
  //   11111110 10010001 01001111 00110001 10011110 11010110 01011001 01101110
  // 37 products on 4 ALUs need at least 10 cycles (column 4 has 6 non-zero
  // elements, which alone would need 6). Found with a SAT solver on the
  // constraint circuit of mapping_checker.
  function automatic ring_map map_sp8();
    ring_map m = new(4, 10, 8, 8, 4);
    m.is_c0[0] = 0; m.is_c0[1] = 3; m.is_c0[2] = 2; m.is_c0[3] = 2;
    m.is_c0[4] = 1; m.is_c0[5] = 1; m.is_c0[6] = 0; m.is_c0[7] = 3;
    m.st_c0[0] = 1; m.st_c0[1] = 1; m.st_c0[2] = 3; m.st_c0[3] = 2;
    m.st_c0[4] = 0; m.st_c0[5] = 3; m.st_c0[6] = 2; m.st_c0[7] = 0;
    m.op(1, 1, 8, 7, 2, 8); m.op(1, 2, 1, 6, 2, 2); m.op(1, 3, 4, 4, 1, 3); m.op(1, 4, 6, 2, 2, 6);
    m.op(2, 1, 5, 1, 2, 5); m.op(2, 2, 8, 5, 1, 5); m.op(2, 3, 7, 4, 2, 2); m.op(2, 4, 3, 2, 1, 3);
    m.op(3, 1, 0, 0, 1, 3); m.op(3, 2, 5, 6, 2, 5); m.op(3, 3, 7, 5, 1, 4); m.op(3, 4, 2, 8, 1, 8);
    m.op(4, 1, 6, 7, 1, 7); m.op(4, 2, 1, 3, 1, 3); m.op(4, 3, 5, 5, 2, 5); m.op(4, 4, 0, 0, 2, 3);
    m.op(5, 1, 3, 8, 1, 8); m.op(5, 2, 1, 7, 2, 1); m.op(5, 3, 4, 3, 1, 3); m.op(5, 4, 2, 4, 2, 2);
    m.op(6, 1, 6, 1, 2, 3); m.op(6, 2, 8, 6, 2, 8); m.op(6, 3, 1, 5, 2, 1); m.op(6, 4, 5, 4, 2, 5);
    m.op(7, 1, 2, 1, 2, 2); m.op(7, 2, 3, 7, 1, 8); m.op(7, 3, 0, 0, 2, 8); m.op(7, 4, 1, 2, 2, 1);
    m.op(8, 1, 1, 1, 2, 5); m.op(8, 2, 3, 6, 2, 2); m.op(8, 3, 7, 8, 2, 7); m.op(8, 4, 8, 2, 1, 4);
    m.op(9, 1, 6, 4, 2, 6); m.op(9, 2, 5, 7, 2, 3); m.op(9, 3, 4, 8, 2, 2); m.op(9, 4, 7, 2, 2, 7);
    m.op(10, 1, 1, 4, 0, 0); m.op(10, 2, 6, 6, 0, 0); m.op(10, 3, 3, 5, 0, 0); m.op(10, 4, 8, 3, 0, 0);
    return m;
  endfunction

endpackage
