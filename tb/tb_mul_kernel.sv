// tb_mul_kernel: self-checking test of the map kernel c = a * b.
//
// Two random producers feed 1000 operand pairs at random times and a random
// consumer takes the products; each product is compared with the low 32 bits
// of the reference product. A second phase with all sides always ready checks
// the rate of one product per cycle.
module tb_mul_kernel;
  import stream_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  a_valid, a_ready, b_valid, b_ready, c_valid, c_ready;
  word_t a_data, b_data, c_data;
  int    checks = 0, failures = 0, cyc = 0;
  int    pct = 60;
  word_t qa[$], qb[$];
  int    na = 0, nb = 0, nc = 0;
  localparam int NTOT = 1000;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  mul_kernel dut (.*);

  always @(posedge clk) begin
    if (!rst_n) begin
      a_valid <= 1'b0; b_valid <= 1'b0; c_ready <= 1'b0;
      a_data <= '0; b_data <= '0;
    end else begin
      if (a_valid && a_ready) begin qa.push_back(a_data); na++; end
      if (b_valid && b_ready) begin qb.push_back(b_data); nb++; end
      if (!a_valid || a_ready) begin
        a_valid <= (na + (a_valid && a_ready) < NTOT) && (($urandom % 100) < pct);
        a_data  <= $urandom;
      end
      if (!b_valid || b_ready) begin
        b_valid <= (nb + (b_valid && b_ready) < NTOT) && (($urandom % 100) < pct);
        b_data  <= $urandom;
      end
      c_ready <= ($urandom % 100) < pct;
      if (c_valid && c_ready) begin
        checks++;
        if (qa.size() == 0 || qb.size() == 0) begin
          failures++; $display("product without operands");
        end else begin
          if (c_data !== 32'(qa[0] * qb[0])) begin
            failures++; $display("product %0d: got %h expected %h", nc, c_data, 32'(qa[0] * qb[0]));
          end
          void'(qa.pop_front()); void'(qb.pop_front());
        end
        nc++;
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

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (nc == NTOT);
    checks++;
    if (na != NTOT || nb != NTOT) begin failures++; $display("operand counts %0d %0d", na, nb); end
    @(posedge clk);
    rst_n <= 1'b0; pct = 100; na = 0; nb = 0; nc = 0; qa.delete(); qb.delete();
    @(posedge clk);
    rst_n <= 1'b1;
    wait (nc == 1);
    t0 = cyc;
    wait (nc == 501);
    checks++;
    if (cyc - t0 != 500) begin failures++; $display("500 products took %0d cycles", cyc - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
