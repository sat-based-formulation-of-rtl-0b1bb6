// ring_sequencer: steps all cores of the ring through the time cycles of a
// mapping in lock step. A one-cycle `start` pulse with the number of time
// cycles `n_cycles` (1..T_MAX) raises `run` for exactly n_cycles clock
// cycles, presenting t_idx = 0, 1, ..., n_cycles-1 (time cycles 1..T of the
// mapping). `done` pulses in the clock cycle after the last time cycle.
// `start` is ignored while busy; n_cycles = 0 is treated as 1.
// The source only says that all cores work in parallel in every time cycle;
// this counter is the simplest control that does that.
module ring_sequencer #(
  parameter int unsigned T_MAX = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(T_MAX):0]   n_cycles,
  output logic                     run,
  output logic [$clog2(T_MAX)-1:0] t_idx,
  output logic                     done
);

  localparam int unsigned TW = $clog2(T_MAX);

  logic [TW-1:0] last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      t_idx <= '0;
      last  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run   <= 1'b1;
          t_idx <= '0;
          last  <= (n_cycles == 0) ? '0
                 : (n_cycles > (TW+1)'(T_MAX)) ? TW'(T_MAX - 1) : TW'(n_cycles - 1);
        end
      end else if (t_idx == last) begin
        run  <= 1'b0;
        done <= 1'b1;
      end else begin
        t_idx <= t_idx + 1'b1;
      end
    end
  end

endmodule
