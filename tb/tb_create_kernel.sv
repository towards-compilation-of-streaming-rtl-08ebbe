// tb_create_kernel: self-checking test of the stream source.
//
// Two sources run side by side. Source A deals single elements to 2 lanes
// (INNER=6, OUTER=3, START=5, INNER_STEP=2, OUTER_STEP=7); source B deals
// whole inner loops to 3 lanes (INNER=4, OUTER=5, START=1, INNER_STEP=3,
// OUTER_STEP=10). Consumers accept at random. Each lane's stream is compared
// with the sequence computed from the loop formula, element counts and done
// are checked, and a second start with always-ready consumers checks that a
// lane emits one element per cycle from the cycle after start.
module tb_create_kernel;
  import stream_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  int   checks = 0, failures = 0, cyc = 0;
  bit   all_ready = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  logic [1:0] a_valid, a_ready;
  word_t      a_data [2];
  logic       a_done;
  logic [2:0] b_valid, b_ready;
  word_t      b_data [3];
  logic       b_done;

  create_kernel #(.LANES(2), .INNER(6), .OUTER(3), .START(5), .INNER_STEP(2),
                  .OUTER_STEP(7), .SPLIT_OUTER(1'b0)) dut_a (
    .clk, .rst_n, .start, .out_valid(a_valid), .out_ready(a_ready),
    .out_data(a_data), .done(a_done));

  create_kernel #(.LANES(3), .INNER(4), .OUTER(5), .START(1), .INNER_STEP(3),
                  .OUTER_STEP(10), .SPLIT_OUTER(1'b1)) dut_b (
    .clk, .rst_n, .start, .out_valid(b_valid), .out_ready(b_ready),
    .out_data(b_data), .done(b_done));

  word_t exp_a [2][$];
  word_t exp_b [3][$];
  int    first_cyc_a [2];

  task automatic build_expected();
    for (int l = 0; l < 2; l++) exp_a[l].delete();
    for (int l = 0; l < 3; l++) exp_b[l].delete();
    for (int o = 0; o < 3; o++)
      for (int i = 0; i < 6; i++)
        exp_a[(o * 6 + i) % 2].push_back(32'(5 + i * 2 + o * 7));
    for (int o = 0; o < 5; o++)
      for (int i = 0; i < 4; i++)
        exp_b[o % 3].push_back(32'(1 + i * 3 + o * 10));
  endtask

  always @(posedge clk) begin
    a_ready <= all_ready ? 2'b11 : 2'($urandom);
    b_ready <= all_ready ? 3'b111 : 3'($urandom);
  end

  always @(posedge clk) if (rst_n && !start) begin
    for (int l = 0; l < 2; l++) if (a_valid[l] && a_ready[l]) begin
      checks++;
      if (exp_a[l].size() == 0) begin
        failures++; $display("A lane %0d: extra element %0d", l, a_data[l]);
      end else begin
        if (a_data[l] !== exp_a[l][0]) begin
          failures++; $display("A lane %0d: got %0d expected %0d", l, a_data[l], exp_a[l][0]);
        end
        void'(exp_a[l].pop_front());
      end
    end
    for (int l = 0; l < 3; l++) if (b_valid[l] && b_ready[l]) begin
      checks++;
      if (exp_b[l].size() == 0) begin
        failures++; $display("B lane %0d: extra element %0d", l, b_data[l]);
      end else begin
        if (b_data[l] !== exp_b[l][0]) begin
          failures++; $display("B lane %0d: got %0d expected %0d", l, b_data[l], exp_b[l][0]);
        end
        void'(exp_b[l].pop_front());
      end
    end
  end

  task automatic check_drained();
    for (int l = 0; l < 2; l++) begin
      checks++;
      if (exp_a[l].size() != 0) begin failures++; $display("A lane %0d: %0d missing", l, exp_a[l].size()); end
    end
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (exp_b[l].size() != 0) begin failures++; $display("B lane %0d: %0d missing", l, exp_b[l].size()); end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_go;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++;
    if (!a_done || !b_done || a_valid != 0 || b_valid != 0) begin
      failures++; $display("sources not idle after reset");
    end
    build_expected();
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    checks++;
    if (a_done || b_done) begin failures++; $display("done high while running"); end
    wait (a_done && b_done);
    repeat (5) @(posedge clk);
    check_drained();
    // Second run at full rate: lane streams last exactly their length.
    all_ready = 1'b1;
    repeat (2) @(posedge clk);
    build_expected();
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(negedge clk);
    t_go = cyc;
    wait (a_done && b_done);
    checks++;
    // A: 9 elements per lane; B: lane 0 holds 2 loops of 4 = 8 elements.
    if (cyc - t_go != 9) begin
      failures++; $display("full-rate run took %0d cycles, expected 9", cyc - t_go);
    end
    repeat (3) @(posedge clk);
    check_drained();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
