// tb_core_alu: checks the multiply-add unit against a 64-bit reference on
// directed corner values and random operands; the result must equal the low
// 32 bits of w*Is + Istim.
module tb_core_alu;
  import ring_pkg::*;

  int checks = 0, failures = 0;
  data_t w, is_val, istim_in, istim_out;

  core_alu u_dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(data_t a, data_t b, data_t s);
    longint full;
    data_t expect_v;
    w = a; is_val = b; istim_in = s;
    #1;
    full = longint'(a) * longint'(b) + longint'(s);
    expect_v = data_t'(full[31:0]);
    checks++;
    if (istim_out !== expect_v) begin
      failures++;
      $display("w=%0d Is=%0d Istim=%0d: got %0d, expected %0d", a, b, s, istim_out, expect_v);
    end
  endtask

  initial begin
    check(0, 0, 0);
    check(3, 4, 5);
    check(-3, 4, 5);
    check(-7, -9, -100);
    check(32'sh7fff_ffff, 2, 1);
    check(32'sh8000_0000, -1, 0);
    check(12345, 0, -99);
    for (int i = 0; i < 500; i++)
      check(data_t'($urandom), data_t'($urandom), data_t'($urandom));
    for (int i = 0; i < 500; i++)
      check(data_t'($urandom_range(0, 200)) - 100, data_t'($urandom_range(0, 200)) - 100,
            data_t'($urandom_range(0, 20000)) - 10000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
