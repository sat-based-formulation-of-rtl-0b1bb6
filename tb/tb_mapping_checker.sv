// tb_mapping_checker: feeds the constraint circuit the 4x4 / 4-core / 4-cycle
// worked example mapping (4x4 on 4 cores, 4 cycles) and expects acceptance, then
// breaks one constraint at a time and expects the matching group flag to
// drop: a weight used twice, a vector element on two cores, a missing
// partial sum, a product never done, a wrong end placement, a datum jumping
// two cores, a missing move flag, a product without its weight on the core,
// two products on one ALU, two moves on one link. A second instance with a
// register limit of one must reject the same mapping (two data per core).
// Finally a product is removed: rejected as a dense matrix, accepted once
// the element is marked zero (sparse formulation).
module tb_mapping_checker;
  import tb_map_pkg::*;

  localparam int unsigned N = 4;
  int checks = 0, failures = 0;

  logic nz [N][N];
  logic w_v [N][N][N][N];
  logic wis_v [N][N][N][N];
  logic is_v [N][N][N];
  logic istim_v [N][N][N];
  logic is_nx [N][N][N];
  logic istim_nx [N][N][N];
  logic ok_map, ok_transfer, ok_sop, ok_res, ok;
  logic r1_map, r1_transfer, r1_sop, r1_res, r1_ok;

  mapping_checker #(.X(N), .Y(N), .T(N), .C(N)) u_dut (.*);

  mapping_checker #(.X(N), .Y(N), .T(N), .C(N), .REG_MAX(1)) u_reg1 (
    .nz(nz), .w_v(w_v), .wis_v(wis_v), .is_v(is_v), .istim_v(istim_v),
    .is_nx(is_nx), .istim_nx(istim_nx), .ok_map(r1_map), .ok_transfer(r1_transfer),
    .ok_sop(r1_sop), .ok_res(r1_res), .ok(r1_ok));

  ring_map m;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_vars();
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) nz[y][x] = 1'b1;
    for (int t = 0; t < N; t++) for (int c = 0; c < N; c++) begin
      for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
        w_v[y][x][t][c]   = (m.mac_y[t][c] == y && m.mac_x[t][c] == x);
        wis_v[y][x][t][c] = (m.mac_y[t][c] == y && m.mac_x[t][c] == x);
      end
      for (int i = 0; i < N; i++) begin
        is_v[i][t][c]     = (m.is_loc[t][i] == c);
        istim_v[i][t][c]  = (m.st_loc[t][i] == c);
        is_nx[i][t][c]    = (m.snd_k[t][c] == 1 && m.snd_id[t][c] == i);
        istim_nx[i][t][c] = (m.snd_k[t][c] == 2 && m.snd_id[t][c] == i);
      end
    end
  endtask

  // expect: ok must be 0 and flag (one of the group outputs) must be 0
  task automatic expect_reject(string what, logic flag);
    checks++;
    if (ok !== 1'b0 || flag !== 1'b0) begin
      failures++;
      $display("%s not rejected: map=%b transfer=%b sop=%b res=%b", what,
               ok_map, ok_transfer, ok_sop, ok_res);
    end
  endtask

  initial begin
    m = map_4x4();
    checks++;
    if (m.build() != 0) begin failures++; $display("reference mapping inconsistent"); end

    set_vars(); #1;
    checks++;
    if (ok !== 1'b1) begin
      failures++;
      $display("legal mapping rejected: map=%b transfer=%b sop=%b res=%b",
               ok_map, ok_transfer, ok_sop, ok_res);
    end
    checks++;
    if (r1_ok !== 1'b0 || r1_res !== 1'b0 || r1_map !== 1'b1) begin
      failures++; $display("register limit 1 not enforced");
    end

    // (1) w[4][4] also used on core 2 in cycle 4
    set_vars(); w_v[3][3][3][1] = 1'b1; #1; expect_reject("w used twice", ok_map);
    // (2) Is[1] on a second core in cycle 2
    set_vars(); is_v[0][1][0] = 1'b1; #1; expect_reject("Is on two cores", ok_map);
    // (3) Istim[2] absent in cycle 3
    set_vars(); for (int c = 0; c < N; c++) istim_v[1][2][c] = 1'b0; #1;
    expect_reject("Istim missing", ok_map);
    // (4) product w[1][1]*Is[1] never executed (w variable kept)
    set_vars(); wis_v[0][0][0][2] = 1'b0; #1; expect_reject("product missing", ok_map);
    // (5) Istim[1] ends on core 4 instead of core 3 where Is[1] started
    set_vars(); istim_v[0][3][2] = 1'b0; istim_v[0][3][3] = 1'b1; #1;
    expect_reject("end placement", ok_map);
    // (6)/(7) Is[4] jumps from core 1 to core 3 after cycle 1
    set_vars(); is_v[3][1][1] = 1'b0; is_v[3][1][2] = 1'b1; is_v[3][2][2] = 1'b1; #1;
    expect_reject("two-core jump", ok_transfer);
    // (10) move flag of Is[4] after cycle 1 missing
    set_vars(); is_nx[3][0][0] = 1'b0; #1; expect_reject("move flag missing", ok_transfer);
    // (11) Istim move flag set without a move
    set_vars(); istim_nx[0][1][2] = 1'b1; #1; expect_reject("spurious Istim move", ok_transfer);
    // (12) w[3][3] used in cycle 1 on core 1 instead of core 2
    set_vars(); w_v[2][2][0][1] = 1'b0; w_v[2][2][0][0] = 1'b1; #1;
    expect_reject("product without weight", ok_sop);
    // (13) two products on core 1 in cycle 1
    set_vars(); wis_v[2][2][0][0] = 1'b1; #1; expect_reject("two products on one ALU", ok_res);
    // (15) two moves on the link of core 1 in cycle 1
    set_vars(); istim_nx[3][0][0] = 1'b1; #1; expect_reject("two moves on one link", ok_res);

    // sparse formulation: drop the product w[2][3] (core 4, cycle 3)
    set_vars(); w_v[1][2][2][3] = 1'b0; wis_v[1][2][2][3] = 1'b0; #1;
    expect_reject("dense matrix, product dropped", ok_map);
    nz[1][2] = 1'b0; #1;
    checks++;
    if (ok !== 1'b1) begin failures++; $display("sparse element not accepted"); end
    // a zero element's variables are ignored entirely
    w_v[1][2][0][0] = 1'b1; wis_v[1][2][0][0] = 1'b1; #1;
    checks++;
    if (ok !== 1'b1) begin failures++; $display("zero element's variables not ignored"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
