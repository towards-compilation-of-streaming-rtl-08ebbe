// tb_stream_top: end-to-end test of both streaming applications together.
//
// The top runs at reduced sizes with every kernel replicated twice:
// autocorrelation of 96 samples for 8 shifts and an 8-tap FIR filter over 48
// samples, both at once, each behind its own memory model that stalls about
// 30% of the cycles. Both applications are run twice to check that a new
// start reloads every kernel. All stored results are compared with values
// computed here.
//
// The test counts how often each mechanism of the design happened and fails
// if one never did: a full FIFO pushing back on its producer, a memory
// stall, work on the second replica of the autocorrelation and FIR branches,
// joining replica partial sums into one result, whole FIR windows dealt to
// the second branch, zero-filled windows at the start of the filter, and a
// second run after the first.
module tb_stream_top;
  import stream_pkg::*;

  localparam int NA = 96, NS = 8, NF = 48, T = 8;
  localparam logic [31:0] AC_BASE = 32'h0000_0000, FIR_BASE = 32'h0010_0000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ac_start = 1'b0, fir_start = 1'b0;
  logic        ac_busy, ac_finished, fir_busy, fir_finished;
  logic [31:0] ac_cycles, fir_cycles, ac_words_written, fir_words_written;
  logic        ac_mem_write, ac_mem_waitrequest, fir_mem_write, fir_mem_waitrequest;
  logic [31:0] ac_mem_address, fir_mem_address;
  word_t       ac_mem_writedata, fir_mem_writedata;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  stream_top #(.N_AC(NA), .NSHIFT(NS), .LANES_AC(2), .N_FIR(NF), .TAPS(T),
               .LANES_FIR(2), .AC_BASE(AC_BASE), .FIR_BASE(FIR_BASE)) dut (.*);

  sysmem_model #(.STALL_PCT(30)) mem_ac (.clk, .write(ac_mem_write), .address(ac_mem_address),
    .writedata(ac_mem_writedata), .waitrequest(ac_mem_waitrequest));
  sysmem_model #(.STALL_PCT(30)) mem_fir (.clk, .write(fir_mem_write), .address(fir_mem_address),
    .writedata(fir_mem_writedata), .waitrequest(fir_mem_waitrequest));

  // Mechanism counters.
  int n_fifo_full = 0, n_ac_branch1 = 0, n_join = 0, n_fir_branch1 = 0;
  int n_zero_fill = 0, n_runs = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_fir.u_samples.in_valid && !dut.u_fir.u_samples.in_ready) n_fifo_full++;
    if (dut.u_autocor.g_branch[1].u_mul.c_valid && dut.u_autocor.g_branch[1].u_mul.c_ready) n_ac_branch1++;
    if (ac_mem_write && !ac_mem_waitrequest) n_join++;
    if (dut.u_fir.u_window.out_valid[1] && dut.u_fir.u_window.out_ready[1]) n_fir_branch1++;
    if (dut.u_fir.u_window.sent && (dut.u_fir.u_window.filled <= dut.u_fir.u_window.k)) n_zero_fill++;
  end

  function automatic word_t ref_r(int d);
    word_t acc = '0;
    for (int n = 0; n < NA; n++) acc += word_t'(n) * word_t'(n + d);
    return acc;
  endfunction

  function automatic word_t ref_y(int n);
    word_t acc = '0;
    for (int k = 0; k < T; k++) if (n - k >= 0) acc += word_t'(k + 1) * word_t'(n - k);
    return acc;
  endfunction

  task automatic check_results();
    for (int d = 0; d < NS; d++) begin
      checks++;
      if (mem_ac.read_word(AC_BASE + 4 * d) !== ref_r(d)) begin
        failures++; $display("R[%0d]: got %h expected %h", d, mem_ac.read_word(AC_BASE + 4 * d), ref_r(d));
      end
    end
    for (int n = 0; n < NF; n++) begin
      checks++;
      if (mem_fir.read_word(FIR_BASE + 4 * n) !== ref_y(n)) begin
        failures++; $display("y[%0d]: got %h expected %h", n, mem_fir.read_word(FIR_BASE + 4 * n), ref_y(n));
      end
    end
    checks++;
    if (ac_words_written != NS || fir_words_written != NF) begin
      failures++; $display("words written %0d %0d", ac_words_written, fir_words_written);
    end
  endtask

  task automatic expect_seen(input int count, input string what);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      ac_start  <= 1'b1;
      fir_start <= 1'b1;
      @(posedge clk);
      ac_start  <= 1'b0;
      fir_start <= 1'b0;
      @(negedge clk);
      checks++;
      if (!ac_busy || !fir_busy) begin failures++; $display("not busy after start"); end
      wait (ac_finished && fir_finished);
      check_results();
      $display("run %0d: autocorrelation %0d cycles, FIR %0d cycles", run, ac_cycles, fir_cycles);
      // Clear memory so the second run must rewrite every word.
      mem_ac.mem.delete();
      mem_fir.mem.delete();
      n_runs++;
      @(posedge clk);
    end
    expect_seen(n_fifo_full,        "full FIFO pushed back");
    expect_seen(mem_ac.stalls + mem_fir.stalls, "memory stall cycles");
    expect_seen(n_ac_branch1,       "products on autocorrelation branch 2");
    expect_seen(n_join,             "partial sums joined and stored");
    expect_seen(n_fir_branch1,      "window elements on FIR branch 2");
    expect_seen(n_zero_fill,        "zero-filled window elements");
    expect_seen(n_runs - 1,         "runs after the first");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
