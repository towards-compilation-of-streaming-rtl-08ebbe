// tb_stream_fifo: self-checking test of the inter-kernel FIFO.
//
// A random producer and a random consumer move 2000 elements through a
// depth-4 FIFO. The consumer compares every element with a reference queue.
// The test also checks that in_ready drops exactly when 4 elements are held,
// that out_valid drops exactly when none are, and that with both sides always
// ready the FIFO passes one element per cycle.
module tb_stream_fifo;
  import stream_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, in_ready, out_valid, out_ready;
  word_t in_data, out_data;
  int    checks = 0, failures = 0;
  word_t ref_q[$];
  int    sent = 0, got = 0, full_seen = 0;
  int    prod_pct = 70, cons_pct = 70;

  always #5 clk = ~clk;

  stream_fifo #(.DATA_W(32), .DEPTH(4)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Producer: holds an offered element until it is taken.
  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      in_data  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        ref_q.push_back(in_data);
        sent++;
      end
      if (!in_valid || in_ready) begin
        if (sent + (in_valid && in_ready) < 2000 && ($urandom % 100) < prod_pct) begin
          in_valid <= 1'b1;
          in_data  <= $urandom;
        end else begin
          in_valid <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_ready <= 1'b0;
    else        out_ready <= ($urandom % 100) < cons_pct;
  end

  // Consumer side checks and occupancy checks.
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (in_ready !== (ref_q.size() < 4)) begin
      failures++;
      $display("in_ready=%0d with %0d held", in_ready, ref_q.size());
    end
    checks++;
    if (out_valid !== (ref_q.size() > 0)) begin
      failures++;
      $display("out_valid=%0d with %0d held", out_valid, ref_q.size());
    end
    if (ref_q.size() == 4) full_seen++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data !== ref_q[0]) begin
        failures++;
        $display("element %0d: got %h expected %h", got, out_data, ref_q[0]);
      end
      void'(ref_q.pop_front());
      got++;
    end
  end

  int t0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (got == 2000);
    checks++;
    if (full_seen == 0) begin
      failures++;
      $display("FIFO never filled");
    end
    // Throughput: both sides always ready.
    @(negedge clk);
    rst_n = 1'b0;
    prod_pct = 100;
    cons_pct = 100;
    sent = 0;
    got = 0;
    ref_q.delete();
    @(negedge clk);
    rst_n = 1'b1;
    wait (got == 1);
    t0 = cyc;
    wait (got == 1001);
    checks++;
    if (cyc - t0 != 1000) begin
      failures++;
      $display("1000 elements took %0d cycles", cyc - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
