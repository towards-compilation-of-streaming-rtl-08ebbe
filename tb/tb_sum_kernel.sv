// tb_sum_kernel: self-checking test of the reduction kernel r = r + a.
//
// A random producer sends 60 groups of GROUP=5 random elements and a random
// consumer takes the sums; each sum is compared with a reference sum modulo
// 2^32. The test checks that a start between runs realigns the run position
// (a run cut short by start is discarded), and that at full rate a group's
// sum appears one cycle after its last element.
module tb_sum_kernel;
  import stream_pkg::*;

  localparam int G = 5;
  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic  a_valid, a_ready, r_valid, r_ready;
  word_t a_data, r_data;
  int    checks = 0, failures = 0, cyc = 0;
  int    pct = 60, limit = 300, na = 0, nr = 0;
  bit    produce = 1'b1;
  word_t exp_q[$];
  word_t acc;
  int    last_in_cyc, last_out_cyc;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sum_kernel #(.GROUP(G)) dut (.*);

  always @(posedge clk) begin
    if (!rst_n) begin
      a_valid <= 1'b0; a_data <= '0; r_ready <= 1'b0;
    end else begin
      if (a_valid && a_ready) begin
        acc = (na % G == 0) ? a_data : acc + a_data;
        if (na % G == G - 1) exp_q.push_back(acc);
        na++;
        last_in_cyc = cyc;
      end
      if (!a_valid || a_ready) begin
        a_valid <= produce && (na + (a_valid && a_ready) < limit) && (($urandom % 100) < pct);
        a_data  <= $urandom;
      end
      r_ready <= ($urandom % 100) < pct;
      if (r_valid && r_ready) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected sum %h", r_data);
        end else begin
          if (r_data !== exp_q[0]) begin
            failures++; $display("sum %0d: got %h expected %h", nr, r_data, exp_q[0]);
          end
          void'(exp_q.pop_front());
        end
        nr++;
        last_out_cyc = cyc;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (nr == 60);
    // Cut a run short, then restart: the next sums must start a fresh run.
    limit = 303;
    wait (na == 303);
    produce = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (nr != 60) begin failures++; $display("sum emitted for a partial run"); end
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    na = 0; limit = 50; pct = 100;
    produce = 1'b1;
    wait (nr == 70);
    repeat (2) @(posedge clk);
    checks++;
    if (last_out_cyc - last_in_cyc != 1) begin
      failures++; $display("last sum came %0d cycles after its last element", last_out_cyc - last_in_cyc);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d sums missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
