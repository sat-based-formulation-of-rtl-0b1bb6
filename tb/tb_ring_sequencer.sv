// tb_ring_sequencer: starts runs of every length 1..T_MAX (and the clamped
// lengths 0 and above T_MAX) and checks that run stays high for exactly that
// many clock cycles, that t_idx counts 0, 1, ... in them, that done pulses
// once in the following cycle, and that start is ignored during a run.
module tb_ring_sequencer;
  localparam int unsigned T_MAX = 8;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0;
  logic [$clog2(T_MAX):0] n_cycles = '0;
  logic run, done;
  logic [$clog2(T_MAX)-1:0] t_idx;

  ring_sequencer #(.T_MAX(T_MAX)) u_dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_run(int n, int expect_n);
    int cyc = 0, ndone = 0;
    @(negedge clk);
    start = 1'b1; n_cycles = ($clog2(T_MAX)+1)'(n);
    @(negedge clk);
    start = 1'b0;
    while (run) begin
      checks++;
      if (int'(t_idx) != cyc) begin failures++; $display("t_idx %0d at step %0d", t_idx, cyc); end
      if (cyc == 1) start = 1'b1;   // must be ignored
      cyc++;
      @(negedge clk);
      start = 1'b0;
      if (done) ndone++;
    end
    repeat (2) begin @(negedge clk); if (done) ndone++; end
    checks++;
    if (cyc != expect_n || ndone != 1) begin
      failures++;
      $display("n=%0d: %0d cycles, %0d done pulses (expected %0d, 1)", n, cyc, ndone, expect_n);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (run || done) begin failures++; $display("not idle after reset"); end
    for (int n = 1; n <= T_MAX; n++) one_run(n, n);
    one_run(0, 1);
    one_run(T_MAX + 3, T_MAX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
