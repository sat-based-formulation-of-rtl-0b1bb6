// mapping_checker: the constraint circuit of the mapping formulation. Its
// inputs are the binary mapping variables of a matrix-vector product of a
// Y x X matrix on a ring of C cores over T time cycles; its output `ok` is 1
// exactly when the variables describe a legal mapping. A SAT solver searching
// for an input that makes `ok` true therefore finds a mapping. Variables
// (index order [y][x][t][c], t and c counted from 0 here):
//   w_v[y][x][t][c]    w[y][x] is used on core c in cycle t
//   wis_v[y][x][t][c]  the product w[y][x]*Is[x] is done on core c in cycle t
//   is_v[x][t][c]      Is[x] is on core c in cycle t
//   istim_v[y][t][c]   Istim[y] is on core c in cycle t
//   is_nx[x][t][c]     Is[x] moves from core c to core c+1 after cycle t
//   istim_nx[y][t][c]  Istim[y] moves from core c to core c+1 after cycle t
// nz[y][x] marks the non-zero matrix elements. For a zero element the w and
// product variables do not exist (they are ignored), as in the sparse
// formulation; a dense matrix has nz all ones.
// Constraint groups, each with its own flag:
//   ok_map      every non-zero w and product used exactly once, every Is[x]
//               and Istim[y] on exactly one core in every cycle, and Istim[x]
//               ends on the core where Is[x] started
//   ok_transfer a datum on core c in cycle t is on core c or c+1 in cycle
//               t+1 and came from core c or c-1; a move flag is set exactly
//               when the datum is on c at t and on c+1 at t+1
//   ok_sop      a product needs w[y][x], Is[x] and Istim[y] on its core
//   ok_res      at most one product per core and cycle, at most REG_MAX data
//               per core and cycle, at most one datum moved per link and cycle
// Core c+1 of the last core is the first core (the ring closes). Design
// choices where the formulation is silent: the move flags of the last cycle
// must be 0, and the end-placement rule pairs Is[x] with Istim[x] (so X = Y).
// The circuit is purely combinational.
module mapping_checker #(
  parameter int unsigned X = 4,
  parameter int unsigned Y = 4,
  parameter int unsigned T = 4,
  parameter int unsigned C = 4,
  parameter int unsigned REG_MAX = (X + Y + C - 1) / C
) (
  input  logic nz       [Y][X],
  input  logic w_v      [Y][X][T][C],
  input  logic wis_v    [Y][X][T][C],
  input  logic is_v     [X][T][C],
  input  logic istim_v  [Y][T][C],
  input  logic is_nx    [X][T][C],
  input  logic istim_nx [Y][T][C],
  output logic ok_map,
  output logic ok_transfer,
  output logic ok_sop,
  output logic ok_res,
  output logic ok
);

  function automatic int unsigned nxt(input int unsigned c);
    return (c + 1 == C) ? 0 : c + 1;
  endfunction

  function automatic int unsigned prv(input int unsigned c);
    return (c == 0) ? C - 1 : c - 1;
  endfunction

  // Group 1: mapping constraints.
  always_comb begin
    automatic int unsigned n_w, n_wis, n_is, n_st;
    n_w = 0; n_wis = 0; n_is = 0; n_st = 0;
    ok_map = 1'b1;
    for (int unsigned y = 0; y < Y; y++)
      for (int unsigned x = 0; x < X; x++)
        if (nz[y][x]) begin
          n_w = 0; n_wis = 0;
          for (int unsigned t = 0; t < T; t++)
            for (int unsigned c = 0; c < C; c++) begin
              n_w   += int'(w_v[y][x][t][c]);
              n_wis += int'(wis_v[y][x][t][c]);
            end
          if (n_w != 1 || n_wis != 1) ok_map = 1'b0;
        end
    for (int unsigned t = 0; t < T; t++) begin
      for (int unsigned x = 0; x < X; x++) begin
        n_is = 0;
        for (int unsigned c = 0; c < C; c++) n_is += int'(is_v[x][t][c]);
        if (n_is != 1) ok_map = 1'b0;
      end
      for (int unsigned y = 0; y < Y; y++) begin
        n_st = 0;
        for (int unsigned c = 0; c < C; c++) n_st += int'(istim_v[y][t][c]);
        if (n_st != 1) ok_map = 1'b0;
      end
    end
    for (int unsigned x = 0; x < X && x < Y; x++)
      for (int unsigned c = 0; c < C; c++)
        if (is_v[x][0][c] != istim_v[x][T-1][c]) ok_map = 1'b0;
  end

  // Group 2: data transfer and move-flag constraints.
  always_comb begin
    ok_transfer = 1'b1;
    for (int unsigned t = 0; t < T; t++)
      for (int unsigned c = 0; c < C; c++) begin
        for (int unsigned x = 0; x < X; x++) begin
          if (t + 1 < T) begin
            if (is_v[x][t][c] && !is_v[x][t+1][c] && !is_v[x][t+1][nxt(c)]) ok_transfer = 1'b0;
            if (is_nx[x][t][c] != (is_v[x][t][c] && is_v[x][t+1][nxt(c)])) ok_transfer = 1'b0;
          end else if (is_nx[x][t][c]) ok_transfer = 1'b0;
          if (t > 0 && is_v[x][t][c] && !is_v[x][t-1][c] && !is_v[x][t-1][prv(c)])
            ok_transfer = 1'b0;
        end
        for (int unsigned y = 0; y < Y; y++) begin
          if (t + 1 < T) begin
            if (istim_v[y][t][c] && !istim_v[y][t+1][c] && !istim_v[y][t+1][nxt(c)]) ok_transfer = 1'b0;
            if (istim_nx[y][t][c] != (istim_v[y][t][c] && istim_v[y][t+1][nxt(c)])) ok_transfer = 1'b0;
          end else if (istim_nx[y][t][c]) ok_transfer = 1'b0;
          if (t > 0 && istim_v[y][t][c] && !istim_v[y][t-1][c] && !istim_v[y][t-1][prv(c)])
            ok_transfer = 1'b0;
        end
      end
  end

  // Group 3: sum-of-products constraints.
  always_comb begin
    ok_sop = 1'b1;
    for (int unsigned y = 0; y < Y; y++)
      for (int unsigned x = 0; x < X; x++)
        if (nz[y][x])
          for (int unsigned t = 0; t < T; t++)
            for (int unsigned c = 0; c < C; c++)
              if (wis_v[y][x][t][c] &&
                  !(w_v[y][x][t][c] && is_v[x][t][c] && istim_v[y][t][c]))
                ok_sop = 1'b0;
  end

  // Group 4: ALU, register and edge resource constraints.
  always_comb begin
    automatic int unsigned n_alu, n_reg, n_edge;
    n_alu = 0; n_reg = 0; n_edge = 0;
    ok_res = 1'b1;
    for (int unsigned t = 0; t < T; t++)
      for (int unsigned c = 0; c < C; c++) begin
        n_alu = 0; n_reg = 0; n_edge = 0;
        for (int unsigned y = 0; y < Y; y++)
          for (int unsigned x = 0; x < X; x++)
            if (nz[y][x]) n_alu += int'(wis_v[y][x][t][c]);
        for (int unsigned x = 0; x < X; x++) begin
          n_reg  += int'(is_v[x][t][c]);
          n_edge += int'(is_nx[x][t][c]);
        end
        for (int unsigned y = 0; y < Y; y++) begin
          n_reg  += int'(istim_v[y][t][c]);
          n_edge += int'(istim_nx[y][t][c]);
        end
        if (n_alu > 1 || n_reg > REG_MAX || n_edge > 1) ok_res = 1'b0;
      end
  end

  assign ok = ok_map && ok_transfer && ok_sop && ok_res;

endmodule
