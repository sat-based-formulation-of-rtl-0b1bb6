// tb_ring_mv: end-to-end test of the ring-connected multiplier. It runs the
// two worked example mappings of the architecture (a 4x4 matrix on 4 cores in 4
// time cycles, all ALUs busy; a 3x3 matrix on 2 cores in 5 time cycles, with
// an idle ALU), a sparse 4x4 mapping on 4 cores in 3 time cycles and a
// sparse 8x8 mapping on 4 cores in 10 time cycles, with random data, each on a ring of that size, and checks results,
// run length and the constraint circuit's verdicts (the sparse one with the
// zero elements masked).
// Every mechanism of the ring must occur at least once: multiply-add, idle
// ALU, Is transfer, Istim transfer, ALU-to-link bypass, a register reused by
// an arriving datum in the cycle it is sent away, transfer across the ring's
// closing link, and a rejection by the constraint circuit.
module tb_ring_mv;
  import tb_map_pkg::*;

  int checks = 0, failures = 0;

  tb_ring_harness #(.C(4), .R(2), .T_MAX(4)) h4 ();
  tb_ring_harness #(.C(2), .R(3), .T_MAX(5), .CHK_X(3), .CHK_Y(3), .CHK_T(5), .CHK_C(2)) h3 ();
  tb_ring_harness #(.C(4), .R(2), .T_MAX(4), .CHK_T(3)) hs ();
  tb_ring_harness #(.C(4), .R(4), .T_MAX(16), .CHK_X(8), .CHK_Y(8), .CHK_T(10)) h8 ();

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never occurred: %s", what); end
    else $display("%-28s %0d", what, n);
  endtask

  initial begin
    ring_map m;
    for (int k = 0; k < 3; k++) begin
      m = map_4x4();
      h4.run(m, 11 + k, checks, failures);
      h4.check_map(m, checks, failures);
      m = map_3x3();
      h3.run(m, 23 + k, checks, failures);
      h3.check_map(m, checks, failures);
      m = map_sp4();
      hs.run(m, 37 + k, checks, failures);
      hs.check_map(m, checks, failures);
    end
    m = map_sp8();
    h8.run(m, 41, checks, failures);
    h8.check_map(m, checks, failures);
    need("multiply-add",          h4.n_mac_ops + h3.n_mac_ops + hs.n_mac_ops + h8.n_mac_ops);
    need("idle ALU",              h4.n_idle_alu + h3.n_idle_alu + hs.n_idle_alu + h8.n_idle_alu);
    need("Is transfer",           h4.n_is_moves + h3.n_is_moves + hs.n_is_moves + h8.n_is_moves);
    need("Istim transfer",        h4.n_istim_moves + h3.n_istim_moves + hs.n_istim_moves + h8.n_istim_moves);
    need("ALU-to-link bypass",    h4.n_bypass + h3.n_bypass + hs.n_bypass + h8.n_bypass);
    need("register reuse",        h4.n_reuse + h3.n_reuse + hs.n_reuse + h8.n_reuse);
    need("ring wrap transfer",    h4.n_wrap + h3.n_wrap + hs.n_wrap + h8.n_wrap);
    need("constraint rejection",  h4.n_chk_reject + h3.n_chk_reject + hs.n_chk_reject + h8.n_chk_reject);
    need("sparse run",            hs.n_runs + h8.n_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
