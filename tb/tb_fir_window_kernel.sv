// tb_fir_window_kernel: self-checking test of the FIR shift-register kernel.
//
// 40 random samples go into a TAPS=4 kernel with 3 output lanes, offered at
// random, and lane consumers accept at random. Window n must appear on lane
// n mod 3 as x[n], x[n-1], x[n-2], x[n-3] (0 before the first sample). A
// start then clears the history: the first window of the next run must be
// zero-filled again. With all sides ready the kernel must take one sample
// every TAPS cycles.
module tb_fir_window_kernel;
  import stream_pkg::*;

  localparam int T = 4, L = 3;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic       in_valid, in_ready;
  word_t      in_data;
  logic [L-1:0] out_valid, out_ready;
  word_t      out_data [L];
  int         checks = 0, failures = 0, cyc = 0;
  int         pct = 60, limit = 40, nin = 0;
  bit         full_rate = 1'b0;
  word_t      hist[$];        // samples of the current run, oldest first
  word_t      exp_q [L][$];
  int         t_first, t_last, nwin = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fir_window_kernel #(.TAPS(T), .LANES(L)) dut (.*);

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0; in_data <= '0; out_ready <= '0;
    end else begin
      if (in_valid && in_ready) begin
        hist.push_back(in_data);
        for (int k = 0; k < T; k++)
          exp_q[nwin % L].push_back((hist.size() > k) ? hist[hist.size() - 1 - k] : '0);
        nwin++;
        nin++;
        if (nin == 1) t_first = cyc;
        t_last = cyc;
      end
      if (!in_valid || in_ready) begin
        in_valid <= (nin + (in_valid && in_ready) < limit) && (full_rate || ($urandom % 100) < pct);
        in_data  <= $urandom;
      end
      out_ready <= full_rate ? '1 : L'($urandom);
      for (int l = 0; l < L; l++) if (out_valid[l] && out_ready[l]) begin
        checks++;
        if (exp_q[l].size() == 0) begin
          failures++; $display("lane %0d: unexpected element", l);
        end else begin
          if (out_data[l] !== exp_q[l][0]) begin
            failures++; $display("lane %0d: got %h expected %h", l, out_data[l], exp_q[l][0]);
          end
          void'(exp_q[l].pop_front());
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain_check();
    for (int l = 0; l < L; l++) begin
      checks++;
      if (exp_q[l].size() != 0) begin failures++; $display("lane %0d: %0d missing", l, exp_q[l].size()); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (nin == limit);
    repeat (200) @(posedge clk);
    drain_check();
    // New run: history cleared, lane turn back to 0.
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    hist.delete(); nwin = 0; nin = 0; limit = 20; full_rate = 1'b1;
    wait (nin == limit);
    repeat (20) @(posedge clk);
    drain_check();
    checks++;
    if (t_last - t_first != (limit - 1) * T) begin
      failures++; $display("%0d samples took %0d cycles, expected %0d", limit, t_last - t_first, (limit - 1) * T);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
